// tb_fsfb_fltr_rd_align: self-checking test of the frame-aligned read-out.
//
// Frames are 100 clocks long (frame_start pulse every 100 cycles). Read
// requests are issued at random cycles, and some are forced onto a frame
// start and into a running read-out. A queue model with two cycles of read
// latency returns a word derived from the address. An independent event
// model predicts, for every cycle, whether a word must be on the output and
// which row it is: a read-out starts at the first frame start at or after a
// request and puts rows 0..40 out on consecutive cycles, the first one three
// cycles after the frame start. Every cycle's dat_valid_o, dat_row_o, dat_o
// and done_o are compared with that prediction.
module tb_fsfb_fltr_rd_align;

  localparam int W = 32, DEPTH = 64, ROWS = 41, FRAME = 100, NCYC = 30000;

  logic clk = 1'b0, rst, fs, req;
  logic [5:0] rdaddr, row_o;
  logic [W-1:0] qa, dat;
  logic [5:0] a1;
  logic valid, done, pending, busy;
  int checks = 0, failures = 0;
  int n_immediate = 0, n_deferred = 0, n_held = 0;

  int exp_row [NCYC + 200];
  bit req_at  [NCYC + 200];

  always #5 clk = ~clk;

  function automatic logic [W-1:0] word_of(logic [5:0] a);
    return {a, 2'b01, ~a, 2'b10, a, 4'hc, a ^ 6'h2a, 4'h3};
  endfunction

  // queue model: registered address, registered output
  always_ff @(posedge clk) begin
    a1 <= rdaddr;
    qa <= word_of(a1);
  end

  fsfb_fltr_rd_align #(.WIDTH(W), .DEPTH(DEPTH), .NUM_ROWS(ROWS), .RD_LATENCY(2)) dut (
    .clk_i(clk), .rst_i(rst), .frame_start_i(fs), .rd_req_i(req),
    .rdaddress_o(rdaddr), .qa_i(qa), .dat_o(dat), .dat_row_o(row_o),
    .dat_valid_o(valid), .done_o(done), .pending_o(pending), .busy_o(busy));

  initial begin
    bit pend;
    int read_last;
    // choose requests and predict the output stream
    for (int c = 0; c < NCYC + 200; c++) begin exp_row[c] = -1; req_at[c] = 1'b0; end
    for (int c = 0; c < NCYC; c++) begin
      automatic int ph = c % FRAME;
      automatic int fr = c / FRAME;
      req_at[c] = ($urandom_range(149) == 0) ||
                  (fr % 7 == 3 && ph == 0) ||      // on a frame start
                  (fr % 11 == 5 && ph == 20);      // inside a read-out
    end
    pend = 1'b0; read_last = -1;
    for (int c = 0; c < NCYC; c++) begin
      automatic bit fsc = (c % FRAME == 0);
      if (req_at[c]) begin
        if (c <= read_last) n_held++;
        else if (fsc && !pend) n_immediate++;
        else if (!pend) n_deferred++;
        pend = 1'b1;
      end
      if (pend && fsc && c > read_last) begin
        for (int r = 0; r < ROWS; r++) exp_row[c + 3 + r] = r;
        read_last = c + ROWS;
        pend = 1'b0;
      end
    end

    rst = 1'b1; fs = 1'b0; req = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      fs  = (c % FRAME == 0);
      req = req_at[c];
      @(posedge clk);
      #1;
      // outputs now belong to cycle c+1
      begin
        automatic int e = exp_row[c + 1];
        checks++;
        if (valid != (e >= 0) ||
            (e >= 0 && (row_o != 6'(e) || dat != word_of(6'(e)) || done != (e == ROWS - 1)))) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d: valid=%0b row=%0d dat=%h done=%0b, expected row %0d",
                     c + 1, valid, row_o, dat, done, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_immediate == 0 || n_deferred == 0 || n_held == 0) begin
      failures++;
      $display("coverage: immediate=%0d deferred=%0d held=%0d", n_immediate, n_deferred, n_held);
    end
    $display("read requests: started at once %0d, deferred to frame start %0d, held during read-out %0d",
             n_immediate, n_deferred, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
