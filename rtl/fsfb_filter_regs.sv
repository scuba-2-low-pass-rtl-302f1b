// fsfb_filter_regs: per-row history of one biquad, w_{n-1} and w_{n-2}.
//
// Two single-port RAMs of DEPTH words, one word per row, share the address
// addr_i and the write enable wren_i. The first RAM holds w_{n-1}: it is
// written with the new w_n. The second holds w_{n-2}: it is written with the
// first RAM's output, so one write shifts the history of the addressed row
// by one sample. Both RAMs read before write, so the old w_{n-1} is still on
// the first RAM's output when the write edge copies it into the second.
//
// Timing: present addr_i; one clock later wn1_o and wn2_o hold the history
// of that row. Pulse wren_i for one cycle, with the same address and wn_i
// holding the new w_n, to update it.
//
// Reset: while initialize_window_i is high the data into the first RAM and
// the w_{n-1} output are forced to zero, so every row that is written during
// the window is cleared (both RAMs get zero). w_{n-2} is taken straight from
// the second RAM, as in the original block diagram. The write enable is not
// gated by the window: this design's choice, so that the rows are actually
// written with zeros. There is no other reset.
module fsfb_filter_regs #(
  parameter int unsigned DLY_WIDTH = 29,
  parameter int unsigned DEPTH     = 64,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                        clk_i,
  input  logic                        initialize_window_i,
  input  logic signed [DLY_WIDTH-1:0] wn_i,     // new w_n of the addressed row
  input  logic        [AW-1:0]        addr_i,   // row
  input  logic                        wren_i,   // store wn_i, shift history
  output logic signed [DLY_WIDTH-1:0] wn1_o,    // w_{n-1} of the row
  output logic signed [DLY_WIDTH-1:0] wn2_o     // w_{n-2} of the row
);

  logic [DLY_WIDTH-1:0] ram1_data, ram1_q, ram2_q;

  assign ram1_data = initialize_window_i ? '0 : wn_i;
  assign wn1_o     = initialize_window_i ? '0 : signed'(ram1_q);
  assign wn2_o     = signed'(ram2_q);

  fsfb_fltr_ram_sp #(.WIDTH(DLY_WIDTH), .DEPTH(DEPTH)) u_ram_wn1 (
    .clk_i  (clk_i),
    .addr_i (addr_i),
    .data_i (ram1_data),
    .wren_i (wren_i),
    .q_o    (ram1_q)
  );

  fsfb_fltr_ram_sp #(.WIDTH(DLY_WIDTH), .DEPTH(DEPTH)) u_ram_wn2 (
    .clk_i  (clk_i),
    .addr_i (addr_i),
    .data_i (wn1_o),
    .wren_i (wren_i),
    .q_o    (ram2_q)
  );

endmodule
