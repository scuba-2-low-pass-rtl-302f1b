// fsfb_fltr_queue: result queue of the filter, DEPTH x WIDTH (64 x 32) RAM.
//
// Holds the latest filter output of every row. The filter side writes
// (data, wraddress, wren); the wishbone side reads (rdaddress_a, qa). All
// inputs are registered on the rising edge and so is the output, so:
//   - a write presented in cycle t lands in the memory at the edge ending t+1;
//   - qa shows the word addressed in cycle t after the edge ending t+1
//     (two cycles of read latency).
// A read of the word being written in the same cycle returns the old word.
// The results are not double-buffered: a reader sees whatever the filter
// last wrote, which is why reads are started on a frame boundary.
module fsfb_fltr_queue #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic             rst_i,     // synchronous, clears the write enable register
  input  logic [WIDTH-1:0] data,
  input  logic [AW-1:0]    wraddress,
  input  logic             wren,
  input  logic [AW-1:0]    rdaddress_a,
  output logic [WIDTH-1:0] qa
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] data_r;
  logic [AW-1:0]    wraddress_r, rdaddress_r;
  logic             wren_r;

  // Input registers. Only the write enable is reset, so that no word is
  // written before the filter writes one.
  always_ff @(posedge clk_i) begin
    data_r      <= data;
    wraddress_r <= wraddress;
    rdaddress_r <= rdaddress_a;
    if (rst_i) wren_r <= 1'b0;
    else       wren_r <= wren;
  end

  always_ff @(posedge clk_i) begin
    if (wren_r) mem[wraddress_r] <= data_r;
    qa <= mem[rdaddress_r];
  end

endmodule
