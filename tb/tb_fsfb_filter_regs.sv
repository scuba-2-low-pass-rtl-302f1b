// tb_fsfb_filter_regs: self-checking test of the per-row history RAMs.
//
// A model keeps w_{n-1} and w_{n-2} of every row. Each access presents a row,
// checks wn1_o/wn2_o one clock later against the model, then writes a new
// random w_n with a one-cycle wren_i pulse and updates the model (history
// shifted, or both words cleared while initialize_window_i is high). The
// first pass clears all rows under the initialize window; later windows are
// opened at random. Rows are visited in random order.
module tb_fsfb_filter_regs;

  localparam int DW = 29, DEPTH = 64;

  logic clk = 1'b0;
  logic init;
  logic signed [DW-1:0] wn, wn1, wn2;
  logic [5:0] addr;
  logic wren;
  int checks = 0, failures = 0, init_writes = 0, shifts = 0;

  longint h1 [DEPTH];
  longint h2 [DEPTH];
  bit     known [DEPTH];

  always #5 clk = ~clk;

  fsfb_filter_regs #(.DLY_WIDTH(DW), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .initialize_window_i(init), .wn_i(wn), .addr_i(addr),
    .wren_i(wren), .wn1_o(wn1), .wn2_o(wn2));

  task automatic access(input int row, input bit in_init);
    longint v;
    @(negedge clk);
    addr = 6'(row); init = in_init; wren = 1'b0;
    @(negedge clk);          // q now holds the row
    checks++;
    if (in_init) begin
      if (wn1 != 0 || (known[row] && longint'(wn2) != h2[row])) begin
        failures++;
        $display("init read row %0d: wn1=%0d wn2=%0d exp 0/%0d", row, wn1, wn2, h2[row]);
      end
    end else if (longint'(wn1) != h1[row] || longint'(wn2) != h2[row]) begin
      failures++;
      $display("read row %0d: wn1=%0d wn2=%0d exp %0d/%0d", row, wn1, wn2, h1[row], h2[row]);
    end
    v = longint'($signed(DW'($urandom)));
    wn = DW'(v); wren = 1'b1;
    @(negedge clk);
    wren = 1'b0;
    if (in_init) begin
      h1[row] = 0; h2[row] = 0; known[row] = 1'b1; init_writes++;
    end else begin
      h2[row] = h1[row]; h1[row] = v; shifts++;
    end
  endtask

  initial begin
    init = 1'b1; wren = 1'b0; addr = '0; wn = '0;
    for (int r = 0; r < DEPTH; r++) known[r] = 1'b0;
    for (int r = 0; r < DEPTH; r++) access(r, 1'b1);
    for (int i = 0; i < 4000; i++) access(int'($urandom_range(DEPTH - 1)), ($urandom_range(19) == 0));
    checks++;
    if (init_writes <= DEPTH || shifts == 0) begin
      failures++;
      $display("coverage: init_writes=%0d shifts=%0d", init_writes, shifts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
