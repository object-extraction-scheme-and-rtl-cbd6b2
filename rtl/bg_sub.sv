// bg_sub: background subtraction datapath (running Gaussian average).
//
// Computes, for one pixel,
//   Bn     = Bn_1 + (Fn - Bn_1) / 2^asel      (alpha = 1/2^asel)
//   Update = |Fn - Bn_1| > Thr
// without a multiplier: the 8-bit magnitude of the difference is shifted
// right by asel with zero fill, then added to Bn_1 when Fn >= Bn_1 (with the
// 9th adder bit clamping the result to 255) or subtracted from it otherwise.
// The difference is computed once and reused by the threshold compare. The
// shifter, adder and clamp follow the original datapath; keeping the sign of
// the difference apart, so that a darker pixel pulls the background down, is
// this design's reading of the running-average equation.
// Purely combinational; the caller registers inputs and outputs.
module bg_sub (
  input  logic [7:0] Bn_1,    // previous background pixel
  input  logic [7:0] Fn,      // current frame pixel
  input  logic [2:0] asel,    // update constant select
  input  logic [7:0] Thr,     // update threshold
  output logic [7:0] Bn,      // updated background pixel
  output logic       Update   // pixel differs from background
);
  logic       neg;
  logic [7:0] sub, shifted;
  logic [8:0] add;

  always_comb begin
    neg     = Fn < Bn_1;
    sub     = neg ? (Bn_1 - Fn) : (Fn - Bn_1);
    shifted = sub >> asel;
    add     = {1'b0, Bn_1} + {1'b0, shifted};
    if (neg)         Bn = Bn_1 - shifted;
    else if (add[8]) Bn = 8'd255;
    else             Bn = add[7:0];
    Update  = sub > Thr;
  end
endmodule
