// tb_fsfb_fltr_biquad: self-checking test of the biquad arithmetic.
//
// Part 1 drives random inputs, histories and coefficients and compares w_n
// and y_n with a reference computed here with 64-bit integers (floor division
// by 2^14 written out explicitly, wrap of w_n to 29 bits).
// Part 2 closes the loop in the testbench with the first section's
// coefficients, feeds a constant input of 1000 and checks that the output
// settles to the section's DC gain 4 * 2^14 / (2^14 - |b1| + |b2|) within 0.5 %.
module tb_fsfb_fltr_biquad;
  import fsfb_fltr_pkg::*;

  localparam int IW = 18, DW = 29, YW = DW + 2;

  logic signed [IW-1:0] x;
  logic signed [DW-1:0] wn1, wn2, wn;
  logic signed [YW-1:0] yn;
  logic [14:0] b1, b2;
  int checks = 0, failures = 0;

  fsfb_fltr_biquad #(.IN_WIDTH(IW), .DLY_WIDTH(DW), .COEF_WIDTH(15), .COEF_FRAC(14)) dut (
    .x_i(x), .wn1_i(wn1), .wn2_i(wn2), .b1_i(b1), .b2_i(b2), .wn_o(wn), .yn_o(yn));

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

  function automatic longint rnd_signed(int bits);
    return wrap(longint'({$urandom, $urandom}), bits);
  endfunction

  longint ew, ey, t, settled;
  real gain, exp_gain;

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x   = IW'(rnd_signed(IW));
      // keep histories in the range the filter uses most of the time,
      // but also exercise full-range values
      wn1 = DW'((i % 4 == 0) ? rnd_signed(DW) : rnd_signed(24));
      wn2 = DW'((i % 4 == 0) ? rnd_signed(DW) : rnd_signed(24));
      b1  = 15'($urandom);
      b2  = 15'($urandom);
      if (i == 0) begin b1 = FLTR1_B1; b2 = FLTR1_B2; end
      #1;
      t  = longint'(b2) * longint'(wn2) - longint'(b1) * longint'(wn1);
      ew = wrap(longint'(x) - floor_div(t, 16384), DW);
      ey = ew + 2 * longint'(wn1) + longint'(wn2);
      checks++;
      if (longint'(wn) != ew || longint'(yn) != ey) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH x=%0d w1=%0d w2=%0d b1=%0d b2=%0d: wn=%0d (exp %0d) yn=%0d (exp %0d)",
                   x, wn1, wn2, b1, b2, wn, ew, yn, ey);
      end
    end

    // DC gain of section 1 with its history closed around the datapath
    b1 = FLTR1_B1; b2 = FLTR1_B2;
    wn1 = '0; wn2 = '0; x = 18'sd1000;
    for (int n = 0; n < 3000; n++) begin
      #1;
      settled = longint'(yn);
      wn2 = wn1;
      wn1 = wn;
    end
    gain     = real'(settled) / 1000.0;
    exp_gain = 4.0 * 16384.0 / real'(16384 - int'(FLTR1_B1) + int'(FLTR1_B2));
    checks++;
    if (gain < exp_gain * 0.995 || gain > exp_gain * 1.005) begin
      failures++;
      $display("DC gain %f, expected %f", gain, exp_gain);
    end
    $display("section 1 DC gain %f (ideal with these coefficients %f)", gain, exp_gain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
