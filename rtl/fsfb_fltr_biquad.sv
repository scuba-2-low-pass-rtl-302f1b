// fsfb_fltr_biquad: arithmetic of one direct-form-II Butterworth biquad.
//
// For one row it takes the new input x_n and the two stored interim values
// w_{n-1}, w_{n-2} and returns the new interim value w_n and the output y_n:
//
//   w_temp = |b2| * w_{n-2} - |b1| * w_{n-1}
//   w_n    = x_n - floor(w_temp / 2^COEF_FRAC)      (kept to DLY_WIDTH bits)
//   y_n    = w_n + 2 * w_{n-1} + w_{n-2}            (DLY_WIDTH + 2 bits)
//
// This is the textbook section H(z) = (1 + 2z^-1 + z^-2) / (1 + b1 z^-1 + b2 z^-2)
// with b1 < 0 < b2, as for every Butterworth low-pass section. The numerator
// needs no multiplier: it is a shift and two additions. The coefficient ports
// carry the magnitudes |b1| and |b2| in unsigned 1.14 format (15 bits), which
// is why the signs are fixed in the datapath; storing the signed b1 would take
// a 16th bit. The division by 2^COEF_FRAC is an arithmetic shift (rounds
// towards minus infinity) and w_n wraps on overflow: the design relies on the
// scaling between sections to stay in range, not on saturation.
//
// Purely combinational; the caller registers the results. No section gain
// (1/k) is applied.
module fsfb_fltr_biquad #(
  parameter int unsigned IN_WIDTH   = 18,
  parameter int unsigned DLY_WIDTH  = 29,
  parameter int unsigned COEF_WIDTH = 15,
  parameter int unsigned COEF_FRAC  = 14,
  localparam int unsigned Y_WIDTH   = DLY_WIDTH + 2
) (
  input  logic signed [IN_WIDTH-1:0]   x_i,     // new input sample x_n
  input  logic signed [DLY_WIDTH-1:0]  wn1_i,   // w_{n-1}
  input  logic signed [DLY_WIDTH-1:0]  wn2_i,   // w_{n-2}
  input  logic        [COEF_WIDTH-1:0] b1_i,    // |b1|, unsigned 1.14
  input  logic        [COEF_WIDTH-1:0] b2_i,    // |b2|, unsigned 1.14
  output logic signed [DLY_WIDTH-1:0]  wn_o,    // w_n
  output logic signed [Y_WIDTH-1:0]    yn_o     // y_n
);

  localparam int unsigned PW = COEF_WIDTH + 1 + DLY_WIDTH;  // product width
  localparam int unsigned TW = PW + 1;                      // w_temp width

  logic signed [COEF_WIDTH:0] b1_s, b2_s;
  logic signed [PW-1:0]       p1, p2;
  logic signed [TW-1:0]       w_temp, w_temp_sh, w_full;

  always_comb begin
    b1_s      = signed'({1'b0, b1_i});
    b2_s      = signed'({1'b0, b2_i});
    p1        = PW'(b1_s) * PW'(wn1_i);
    p2        = PW'(b2_s) * PW'(wn2_i);
    w_temp    = TW'(p2) - TW'(p1);
    w_temp_sh = w_temp >>> COEF_FRAC;
    w_full    = TW'(x_i) - w_temp_sh;
    wn_o      = w_full[DLY_WIDTH-1:0];
    yn_o      = Y_WIDTH'(wn_o) + (Y_WIDTH'(wn1_i) <<< 1) + Y_WIDTH'(wn2_i);
  end

endmodule
