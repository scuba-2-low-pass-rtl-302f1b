// fsfb_fltr_ram_sp: single-port synchronous RAM, one word per row.
//
// Address, data and write enable are sampled on the rising clock edge. The
// output q is registered: it shows the word at the address of the previous
// edge, and a write returns the word as it was before the write (read before
// write). The contents are not reset; the filter clears them by writing zeros
// while its initialize window is open.
module fsfb_fltr_ram_sp #(
  parameter int unsigned WIDTH = 29,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic [AW-1:0]    addr_i,
  input  logic [WIDTH-1:0] data_i,
  input  logic             wren_i,
  output logic [WIDTH-1:0] q_o
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (wren_i) mem[addr_i] <= data_i;
    q_o <= mem[addr_i];
  end

endmodule
