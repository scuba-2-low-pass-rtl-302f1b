// fsfb_fltr_rd_align: frame-aligned read-out of the filter result queue.
//
// The queue is not double-buffered, so a read that started in the middle of
// a frame would return some rows from this frame and some from the last. A
// read request (rd_req_i, one-cycle pulse) is therefore held until the next
// frame boundary (frame_start_i, one-cycle pulse at the start of each frame).
// At that boundary the block reads rows 0 .. NUM_ROWS-1 from the queue, one
// address per clock, and forwards each word with its row number. A request
// that coincides with frame_start_i starts at once; a request made while a
// read-out is running is held for the following frame.
//
// Timing: rdaddress_o steps through the rows starting in the cycle after the
// frame boundary; dat_o/dat_valid_o follow RD_LATENCY cycles later (2 for the
// registered-input, registered-output queue). done_o pulses with the last word.
module fsfb_fltr_rd_align #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned DEPTH      = 64,
  parameter int unsigned NUM_ROWS   = 41,
  parameter int unsigned RD_LATENCY = 2,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic             rst_i,
  input  logic             frame_start_i,
  input  logic             rd_req_i,
  // queue read port
  output logic [AW-1:0]    rdaddress_o,
  input  logic [WIDTH-1:0] qa_i,
  // read-out stream
  output logic [WIDTH-1:0] dat_o,
  output logic [AW-1:0]    dat_row_o,
  output logic             dat_valid_o,
  output logic             done_o,
  output logic             pending_o,   // request waiting for a frame boundary
  output logic             busy_o       // addresses being issued
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_READ} state_t;

  state_t          state;
  logic [AW-1:0]   row;
  logic            held;          // request made during a read-out
  logic [RD_LATENCY-1:0]        vld_pipe;
  logic [RD_LATENCY-1:0]        last_pipe;
  logic [RD_LATENCY-1:0][AW-1:0] row_pipe;
  logic            issue, last;

  assign issue       = (state == S_READ);
  assign last        = issue && (row == AW'(NUM_ROWS - 1));
  assign rdaddress_o = row;
  assign pending_o   = (state == S_WAIT) || held;
  assign busy_o      = issue;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      state <= S_IDLE;
      row   <= '0;
      held  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          row <= '0;
          if (rd_req_i) state <= frame_start_i ? S_READ : S_WAIT;
        end
        S_WAIT: begin
          row <= '0;
          if (frame_start_i) state <= S_READ;
        end
        S_READ: begin
          if (rd_req_i) held <= 1'b1;
          if (last) begin
            row <= '0;
            if (held || rd_req_i) begin
              held  <= 1'b0;
              state <= frame_start_i ? S_READ : S_WAIT;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            row <= row + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Align the row number and valid flag with the queue's read latency.
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      vld_pipe  <= '0;
      last_pipe <= '0;
    end else begin
      vld_pipe  <= RD_LATENCY'({vld_pipe, issue});
      last_pipe <= RD_LATENCY'({last_pipe, last});
    end
    row_pipe <= {row_pipe[RD_LATENCY-2:0], row};
  end

  assign dat_o       = qa_i;
  assign dat_valid_o = vld_pipe[RD_LATENCY-1];
  assign dat_row_o   = row_pipe[RD_LATENCY-1];
  assign done_o      = last_pipe[RD_LATENCY-1];

  // A read-out must fit inside the queue.
  initial assert (NUM_ROWS >= 1 && NUM_ROWS <= DEPTH && RD_LATENCY >= 2)
    else $error("fsfb_fltr_rd_align: bad parameters");

endmodule
