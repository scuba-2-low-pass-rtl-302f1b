// fsfb_fltr: first-stage feedback low-pass filter of one readout column.
//
// Every row of the column delivers one feedback value per frame (at 50 MHz
// with 100 clocks per row and 41 rows this is a 12195 Hz sample rate per
// row). The filter runs a 4-pole Butterworth low-pass (100 Hz cut-off) over
// each row's sequence of values independently: two direct-form-II biquads in
// series, each with its own per-row history held in fsfb_filter_regs. The
// latest filtered value of every row is kept in a 64 x 32 queue, from which
// fsfb_fltr_rd_align reads a whole frame of rows, starting at a frame boundary.
//
// Data path for one row:
//   x   = fsfb_i >>> 11, kept to 18 bits        (input scaling 2^-11)
//   y1  = biquad 1 (x,  history 1)              (31 bits)
//   x2  = y1 >>> 11                              (scaling 1/k3, k3 = 2^11)
//   y   = biquad 2 (x2, history 2), sign-extended to 32 bits -> queue[row]
// The DC gain from x to y is about 1216.
//
// Sequencing (this design's own choice, the arithmetic is not shared with
// other logic): a calc_valid_i pulse with row_addr_i and fsfb_i starts a
// four-cycle pass
//   S_IDLE  latch row and x
//   S_READ  both history RAMs read the row
//   S_ST1   biquad 1 evaluated; history 1 updated; x2 registered
//   S_ST2   biquad 2 evaluated; history 2 updated; y written to the queue
// y_o/y_valid_o show the result in the cycle after S_ST2, four cycles after
// the cycle of calc_valid_i. calc_valid_i must not arrive while busy_o is high (rows
// arrive 100 clocks apart, so this never binds in normal operation).
//
// initialize_window_i (level) clears the history of every row processed
// while it is high; the first frame after power-up must be processed with it
// high, since the RAMs are not reset.
module fsfb_fltr
  import fsfb_fltr_pkg::*;
#(
  parameter int unsigned FSFB_WIDTH = FLTR_IN_WIDTH + FLTR_IN_SHIFT,  // 29
  parameter int unsigned NUM_WORDS  = FLTR_NUM_WORDS,                 // 64
  parameter int unsigned NUM_ROWS   = FLTR_NUM_ROWS,                  // 41
  localparam int unsigned AW        = $clog2(NUM_WORDS)
) (
  input  logic                             clk_i,
  input  logic                             rst_i,
  // from the feedback calculation
  input  logic                             calc_valid_i,        // one pulse per row
  input  logic        [AW-1:0]             row_addr_i,
  input  logic signed [FSFB_WIDTH-1:0]     fsfb_i,              // feedback value
  input  logic                             initialize_window_i,
  input  logic                             frame_start_i,       // pulse, start of frame
  // filtered value of the row just processed
  output logic signed [FLTR_OUT_WIDTH-1:0] y_o,
  output logic        [AW-1:0]             y_row_o,
  output logic                             y_valid_o,
  output logic                             busy_o,
  // read side (towards the wishbone frame-data slave)
  input  logic                             rd_req_i,
  output logic        [FLTR_OUT_WIDTH-1:0] rd_dat_o,
  output logic        [AW-1:0]             rd_row_o,
  output logic                             rd_valid_o,
  output logic                             rd_done_o,
  output logic                             rd_pending_o
);

  localparam int unsigned YW  = FLTR_DLY_WIDTH + 2;       // biquad output width
  localparam int unsigned X2W = YW - FLTR_K3_SHIFT;       // second-section input

  typedef enum logic [1:0] {S_IDLE, S_READ, S_ST1, S_ST2} state_t;

  state_t state;
  logic        [AW-1:0]              row_q;
  logic signed [FLTR_IN_WIDTH-1:0]   x_q;
  logic signed [X2W-1:0]             x2_q;

  logic signed [FLTR_DLY_WIDTH-1:0]  s1_wn1, s1_wn2, s1_wn;
  logic signed [FLTR_DLY_WIDTH-1:0]  s2_wn1, s2_wn2, s2_wn;
  logic signed [YW-1:0]              s1_y, s2_y;
  logic                              wren1, wren2;

  logic        [AW-1:0]              q_rdaddr;
  logic        [FLTR_OUT_WIDTH-1:0]  q_qa;

  assign wren1  = (state == S_ST1);
  assign wren2  = (state == S_ST2);
  assign busy_o = (state != S_IDLE);

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state     <= S_IDLE;
      y_valid_o <= 1'b0;
    end else begin
      y_valid_o <= 1'b0;
      unique case (state)
        S_IDLE: if (calc_valid_i) state <= S_READ;
        S_READ: state <= S_ST1;
        S_ST1:  state <= S_ST2;
        S_ST2: begin
          state     <= S_IDLE;
          y_valid_o <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk_i) begin
    if (state == S_IDLE && calc_valid_i) begin
      row_q <= row_addr_i;
      // input scaling: drop the 11 LSBs, keep 18 bits
      x_q   <= FLTR_IN_WIDTH'(fsfb_i >>> FLTR_IN_SHIFT);
    end
    if (state == S_ST1) x2_q <= X2W'(s1_y >>> FLTR_K3_SHIFT);
    if (state == S_ST2) begin
      y_o     <= FLTR_OUT_WIDTH'(s2_y);
      y_row_o <= row_q;
    end
  end

  // ---------------------------------------------------------------- section 1
  fsfb_filter_regs #(.DLY_WIDTH(FLTR_DLY_WIDTH), .DEPTH(NUM_WORDS)) u_regs1 (
    .clk_i               (clk_i),
    .initialize_window_i (initialize_window_i),
    .wn_i                (s1_wn),
    .addr_i              (row_q),
    .wren_i              (wren1),
    .wn1_o               (s1_wn1),
    .wn2_o               (s1_wn2)
  );

  fsfb_fltr_biquad #(
    .IN_WIDTH (FLTR_IN_WIDTH), .DLY_WIDTH(FLTR_DLY_WIDTH),
    .COEF_WIDTH(FLTR_COEF_WIDTH), .COEF_FRAC(FLTR_COEF_FRAC)
  ) u_biquad1 (
    .x_i   (x_q),
    .wn1_i (s1_wn1),
    .wn2_i (s1_wn2),
    .b1_i  (FLTR1_B1),
    .b2_i  (FLTR1_B2),
    .wn_o  (s1_wn),
    .yn_o  (s1_y)
  );

  // ---------------------------------------------------------------- section 2
  fsfb_filter_regs #(.DLY_WIDTH(FLTR_DLY_WIDTH), .DEPTH(NUM_WORDS)) u_regs2 (
    .clk_i               (clk_i),
    .initialize_window_i (initialize_window_i),
    .wn_i                (s2_wn),
    .addr_i              (row_q),
    .wren_i              (wren2),
    .wn1_o               (s2_wn1),
    .wn2_o               (s2_wn2)
  );

  fsfb_fltr_biquad #(
    .IN_WIDTH (X2W), .DLY_WIDTH(FLTR_DLY_WIDTH),
    .COEF_WIDTH(FLTR_COEF_WIDTH), .COEF_FRAC(FLTR_COEF_FRAC)
  ) u_biquad2 (
    .x_i   (x2_q),
    .wn1_i (s2_wn1),
    .wn2_i (s2_wn2),
    .b1_i  (FLTR2_B1),
    .b2_i  (FLTR2_B2),
    .wn_o  (s2_wn),
    .yn_o  (s2_y)
  );

  // ------------------------------------------------------------- result queue
  fsfb_fltr_queue #(.WIDTH(FLTR_OUT_WIDTH), .DEPTH(NUM_WORDS)) u_queue (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .data        (FLTR_OUT_WIDTH'(s2_y)),
    .wraddress   (row_q),
    .wren        (wren2),
    .rdaddress_a (q_rdaddr),
    .qa          (q_qa)
  );

  fsfb_fltr_rd_align #(
    .WIDTH(FLTR_OUT_WIDTH), .DEPTH(NUM_WORDS), .NUM_ROWS(NUM_ROWS), .RD_LATENCY(2)
  ) u_rd_align (
    .clk_i         (clk_i),
    .rst_i         (rst_i),
    .frame_start_i (frame_start_i),
    .rd_req_i      (rd_req_i),
    .rdaddress_o   (q_rdaddr),
    .qa_i          (q_qa),
    .dat_o         (rd_dat_o),
    .dat_row_o     (rd_row_o),
    .dat_valid_o   (rd_valid_o),
    .done_o        (rd_done_o),
    .pending_o     (rd_pending_o),
    .busy_o        ()
  );

  // A new row must not arrive while a pass is running.
  assert property (@(posedge clk_i) disable iff (rst_i) busy_o |-> !calc_valid_i)
    else $error("fsfb_fltr: calc_valid_i while busy");

endmodule
