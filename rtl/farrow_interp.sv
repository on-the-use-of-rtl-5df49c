// farrow_interp: piecewise-parabolic interpolator (Farrow structure, alpha = 1/2).
//
// Given four consecutive samples x(m-1), x(m), x(m+1), x(m+2) and a
// fractional interval mu in [0,1), it returns an estimate of the signal at
// time m + mu:
//   v2 = a x(m+2) - a x(m+1) - a x(m) + a x(m-1)
//   v1 = -a x(m+2) + (1+a) x(m+1) - (1-a) x(m) - a x(m-1)
//   y  = (v2 mu + v1) mu + x(m)
// with a = 1/2, so every coefficient is a shift. The result is exact for
// straight lines. mu is an unsigned MU_W-bit fraction; y is rounded and
// saturated to W bits. Purely combinational. The interpolator is this
// design's choice for the timing loop; the document names only the
// timing loop and its early-late detector.
module farrow_interp #(
  parameter int W    = pcmfm_pkg::DISC_W,
  parameter int MU_W = 16
) (
  input  logic signed [W-1:0] xm1,   // x(m-1)
  input  logic signed [W-1:0] x0,    // x(m)
  input  logic signed [W-1:0] xp1,   // x(m+1)
  input  logic signed [W-1:0] xp2,   // x(m+2)
  input  logic [MU_W-1:0]     mu,
  output logic signed [W-1:0] y
);
  import pcmfm_pkg::*;
  localparam int IW = W + MU_W + 4;   // headroom for the intermediate sums
  logic signed [IW-1:0] v2x2, v1x2, mu_s, t;

  always_comb begin
    // Twice v2 and v1 so that a = 1/2 stays integral.
    v2x2 = IW'(xp2) - IW'(xp1) - IW'(x0) + IW'(xm1);
    v1x2 = -IW'(xp2) + 3 * IW'(xp1) - IW'(x0) - IW'(xm1);
    mu_s = IW'({1'b0, mu});
    // t = 2*(v2 mu + v1) with MU_W fractional bits
    t    = ((v2x2 * mu_s) >>> MU_W) + v1x2;
    // y = x0 + (t * mu) / 2
    y    = W'(sat(longint'(x0) + rshift_round(longint'(t) * longint'(mu_s), MU_W + 1), W));
  end
endmodule
