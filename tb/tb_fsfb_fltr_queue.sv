// tb_fsfb_fltr_queue: self-checking test of the 64 x 32 result queue.
//
// Every cycle a random write (half of the cycles) and a random read address
// are driven. A model array is updated when a write is driven; a read driven
// in cycle r is expected to return the model as it stood before the writes
// of cycle r, and to appear on qa two cycles later. Reads of a word that was
// never written are not checked. Reads of the word being written in the same
// cycle are forced now and then, to check that they return the old word.
module tb_fsfb_fltr_queue;

  localparam int W = 32, DEPTH = 64;

  logic clk = 1'b0, rst;
  logic [W-1:0] data, qa;
  logic [5:0] wraddr, rdaddr;
  logic wren;
  int checks = 0, failures = 0, rw_same = 0;

  logic [W-1:0] model [DEPTH];
  bit           valid [DEPTH];
  logic [W-1:0] exp_q [2];
  bit           chk_q [2];

  always #5 clk = ~clk;

  fsfb_fltr_queue #(.WIDTH(W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_i(rst), .data(data), .wraddress(wraddr), .wren(wren),
    .rdaddress_a(rdaddr), .qa(qa));

  initial begin
    rst = 1'b1; wren = 1'b0; data = '0; wraddr = '0; rdaddr = '0;
    for (int i = 0; i < DEPTH; i++) valid[i] = 1'b0;
    chk_q[0] = 1'b0; chk_q[1] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // the read driven two cycles ago is now on qa
      if (chk_q[1]) begin
        checks++;
        if (qa !== exp_q[1]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: qa=%h expected %h", cyc, qa, exp_q[1]);
        end
      end
      chk_q[1] = chk_q[0]; exp_q[1] = exp_q[0];
      // drive this cycle
      wren   = ($urandom_range(1) == 1);
      wraddr = 6'($urandom);
      data   = $urandom;
      rdaddr = ($urandom_range(7) == 0) ? wraddr : 6'($urandom);
      if (wren && rdaddr == wraddr && valid[rdaddr]) rw_same++;
      chk_q[0] = valid[rdaddr];
      exp_q[0] = model[rdaddr];
      if (wren) begin
        model[wraddr] = data;
        valid[wraddr] = 1'b1;
      end
    end
    checks++;
    if (rw_same == 0) begin
      failures++;
      $display("no read of a word being written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
