// tb_fsfb_fltr: end-to-end test of the column low-pass filter at its default
// parameters.
//
// Frames of 41 rows, 100 clocks per row (the 12195 Hz per-row sample rate at
// 50 MHz). Each row gets one feedback value per frame:
//   rows 0-3, 9-40  random values over the full 29-bit input range
//   row 5           constant +1000 (after the 2^-11 input scaling)
//   row 6           constant -50000
//   row 7           2 kHz sine, amplitude 50000   (stop band)
//   row 8           100 Hz sine, amplitude 20000  (cut-off)
//   row 4           slow ramp
// A 64-bit integer model of the two sections (written independently of the
// RTL) predicts every output; y_o, its row and its latency (4 cycles after
// calc_valid_i) are checked for every sample. Frame 0 and frame 300 run
// with the initialize window open, which clears the history of every row.
// Read requests are issued at random; each read-out must start at the next
// frame start and return, for every row, the value the model held at that
// frame start.
// Filter-level checks, with their reference numbers:
//   DC gain (rows 5, 6)         1216 +- 1 %
//   gain at 100 Hz (row 8)      1216 / sqrt(2) +- 3 %
//   gain at 2 kHz (row 7)       below 1216 / 1000
// Every mechanism (initialize window, re-initialisation, read deferred to a
// frame start, read started on a frame start, read held during a read-out,
// complete read-out) must occur at least once.
module tb_fsfb_fltr;
  import fsfb_fltr_pkg::*;

  localparam int ROWS = 41, ROW_LEN = 100, FRAMES = 1000;
  localparam int FRAME_LEN = ROWS * ROW_LEN;
  localparam int REINIT_FRAME = 300, MEAS_FRAME = 700;

  logic clk = 1'b0, rst;
  logic calc_valid, init_win, fs, rd_req;
  logic [5:0] row_addr;
  logic signed [28:0] fsfb;
  logic signed [31:0] y;
  logic [5:0] y_row;
  logic y_valid, busy;
  logic [31:0] rd_dat;
  logic [5:0] rd_row;
  logic rd_valid, rd_done, rd_pending;

  int checks = 0, failures = 0;
  int n_init_rows = 0, n_reinit_checked = 0, n_rd_deferred = 0, n_rd_immediate = 0;
  int n_rd_held = 0, n_readouts = 0, n_rd_words = 0;

  always #10 clk = ~clk;   // 50 MHz

  fsfb_fltr dut (
    .clk_i(clk), .rst_i(rst), .calc_valid_i(calc_valid), .row_addr_i(row_addr),
    .fsfb_i(fsfb), .initialize_window_i(init_win), .frame_start_i(fs),
    .y_o(y), .y_row_o(y_row), .y_valid_o(y_valid), .busy_o(busy),
    .rd_req_i(rd_req), .rd_dat_o(rd_dat), .rd_row_o(rd_row), .rd_valid_o(rd_valid),
    .rd_done_o(rd_done), .rd_pending_o(rd_pending));

  // ------------------------------------------------------------- model
  longint h1 [2][64];
  longint h2 [2][64];
  bit     h2_known [64];
  longint qmodel [64];
  longint qsnap  [64];
  bit     qvalid [64];
  bit     snapvalid [64];

  function automatic longint floor_div(longint a, longint d);
    longint q = a / d;
    if ((a % d != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic longint wrap(longint v, int bits);
    longint m = longint'(1) << bits;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  // one section: returns y, updates history of (sec,row)
  function automatic longint section(int sec, int row, longint x, bit in_init);
    longint b1 = (sec == 0) ? 32092 : 31238;
    longint b2 = (sec == 0) ? 15750 : 14895;
    longint w1 = in_init ? 0 : h1[sec][row];
    longint w2 = h2[sec][row];
    longint w  = wrap(x - floor_div(b2 * w2 - b1 * w1, 16384), 29);
    longint yy = w + 2 * w1 + w2;
    if (in_init) begin h1[sec][row] = 0; h2[sec][row] = 0; end
    else begin h2[sec][row] = h1[sec][row]; h1[sec][row] = w; end
    return yy;
  endfunction

  function automatic longint model_step(int row, longint fsfb_v, bit in_init);
    longint x  = wrap(floor_div(fsfb_v, 2048), 18);
    longint y1 = section(0, row, x, in_init);
    longint x2 = floor_div(y1, 2048);
    return wrap(section(1, row, x2, in_init), 32);
  endfunction

  function automatic longint stimulus(int row, int frame);
    real t = real'(frame) / 12195.0;
    real pi = 3.14159265358979;
    case (row)
      4: return longint'(((frame * 37) % 20000) - 10000) * 2048;
      5: return longint'(1000) * 2048;
      6: return longint'(-50000) * 2048;
      7: return longint'($rtoi(50000.0 * $sin(2.0 * pi * 2000.0 * t))) * 2048;
      8: return longint'($rtoi(20000.0 * $sin(2.0 * pi * 100.0 * t))) * 2048;
      default: return wrap(longint'({$urandom, $urandom}), 29);
    endcase
  endfunction

  // --------------------------------------------------------- output check
  longint exp_y;
  int     exp_row, exp_cycle;
  bit     exp_pending = 1'b0, exp_checked;
  int     cycle = 0;
  longint dc5, dc6, max7 = 0, max8 = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (!rst) begin
    if (y_valid) begin
      checks++;
      if (!exp_pending || cycle != exp_cycle || y_row != 6'(exp_row) ||
          (exp_checked && longint'(y) != exp_y)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: y=%0d row=%0d, expected %0d row %0d at cycle %0d",
                   cycle, y, y_row, exp_y, exp_row, exp_cycle);
      end
      exp_pending = 1'b0;
    end else if (exp_pending && cycle > exp_cycle) begin
      failures++; checks++;
      $display("cycle %0d: missing output for row %0d", cycle, exp_row);
      exp_pending = 1'b0;
    end
    // read-out stream
    if (rd_valid) begin
      n_rd_words++;
      if (snapvalid[rd_row]) begin
        checks++;
        if (longint'($signed(rd_dat)) != qsnap[rd_row]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: read-out row %0d = %0d, expected %0d",
                     cycle, rd_row, $signed(rd_dat), qsnap[rd_row]);
        end
      end
      if (rd_done) n_readouts++;
    end
  end

  // ------------------------------------------------------------- stimulus
  bit rd_model_pend = 1'b0;
  int rd_model_busy_until = -1;

  initial begin
    rst = 1'b1; calc_valid = 1'b0; init_win = 1'b0; fs = 1'b0; rd_req = 1'b0;
    row_addr = '0; fsfb = '0;
    for (int r = 0; r < 64; r++) begin
      h2_known[r] = 1'b0; qvalid[r] = 1'b0; snapvalid[r] = 1'b0;
    end
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < FRAMES; f++) begin
      automatic bit in_init = (f == 0) || (f == REINIT_FRAME);
      for (int c = 0; c < FRAME_LEN; c++) begin
        automatic int r = c / ROW_LEN;
        automatic int ph = c % ROW_LEN;
        automatic bit req;
        // drive this cycle's inputs at the falling edge
        fs = (c == 0);
        init_win = in_init;
        req = ($urandom_range(3 * FRAME_LEN) == 0) ||
              (f % 50 == 10 && c == 0) ||          // on a frame start
              (f % 50 == 20 && c == 700) ||        // mid-frame
              (f % 50 == 30 && c == 0) ||
              (f % 50 == 30 && c == 20);           // during a read-out
        rd_req = req;
        // read-out model: snapshot of the queue at the start of a read-out
        if (req) begin
          if (cycle <= rd_model_busy_until) n_rd_held++;
          else if (c == 0 && !rd_model_pend) n_rd_immediate++;
          else if (!rd_model_pend) n_rd_deferred++;
          rd_model_pend = 1'b1;
        end
        if (c == 0 && rd_model_pend && cycle > rd_model_busy_until) begin
          for (int k = 0; k < 64; k++) begin qsnap[k] = qmodel[k]; snapvalid[k] = qvalid[k]; end
          rd_model_busy_until = cycle + ROWS;
          rd_model_pend = 1'b0;
        end
        calc_valid = (ph == 10);
        if (ph == 10) begin
          automatic longint v = stimulus(r, f);
          row_addr = 6'(r);
          fsfb = 29'(v);
          exp_y = model_step(r, v, in_init);
          exp_row = r;
          exp_cycle = cycle + 4;
          exp_pending = 1'b1;
          exp_checked = !(in_init && !h2_known[r]);
          if (in_init) begin
            if (h2_known[r]) n_reinit_checked++;
            h2_known[r] = 1'b1;
            n_init_rows++;
          end
          qmodel[r] = exp_y; qvalid[r] = 1'b1;
          if (f >= MEAS_FRAME) begin
            if (r == 5) dc5 = exp_y;
            if (r == 6) dc6 = exp_y;
            if (r == 7 && (exp_y > max7 || -exp_y > max7)) max7 = (exp_y < 0) ? -exp_y : exp_y;
            if (r == 8 && (exp_y > max8 || -exp_y > max8)) max8 = (exp_y < 0) ? -exp_y : exp_y;
          end
        end
        @(negedge clk);
      end
    end
    calc_valid = 1'b0; rd_req = 1'b0; fs = 1'b0;
    repeat (10) @(negedge clk);

    // filter-level checks (the model has been checked against the RTL above)
    begin
      automatic real g5 = real'(dc5) / 1000.0;
      automatic real g6 = real'(dc6) / -50000.0;
      automatic real g7 = real'(max7) / 50000.0;
      automatic real g8 = real'(max8) / 20000.0;
      $display("DC gain %f (+1000) %f (-50000); gain at 100 Hz %f (ratio %f); gain at 2 kHz %f",
               g5, g6, g8, g8 / g5, g7);
      checks += 4;
      if (g5 < 1216.0 * 0.99 || g5 > 1216.0 * 1.01) begin failures++; $display("DC gain +"); end
      if (g6 < 1216.0 * 0.99 || g6 > 1216.0 * 1.01) begin failures++; $display("DC gain -"); end
      if (g8 < 1216.0 * 0.7071 * 0.97 || g8 > 1216.0 * 0.7071 * 1.03) begin failures++; $display("cut-off gain"); end
      if (g7 > 1.216) begin failures++; $display("stop band gain"); end
    end
    $display("mechanisms: init rows %0d, re-initialised rows checked %0d, reads started on frame start %0d, deferred %0d, held %0d, read-outs %0d (%0d words)",
             n_init_rows, n_reinit_checked, n_rd_immediate, n_rd_deferred, n_rd_held, n_readouts, n_rd_words);
    checks++;
    if (n_init_rows == 0 || n_reinit_checked == 0 || n_rd_immediate == 0 || n_rd_deferred == 0 ||
        n_rd_held == 0 || n_readouts == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * FRAME_LEN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
