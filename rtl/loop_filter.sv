// loop_filter: proportional-plus-integrator loop filter of a second-order
// discrete-time PLL, used both in the FM discriminator and the bit timing
// loop.
//
// Its parameters mirror the library loop-filter core: accumulator/output
// width ACC_W (32), normalised loop bandwidth LOOP_BW, damping factor
// DAMPING, phase-detector gain KP, NCO gain K0, samples per symbol SPS,
// constant precision K_PREC (44 bits) and ORDER (2: with integrator, 1:
// proportional only). From these the proportional and integral gains K1, K2
// follow from the standard PLL design equations (pcmfm_pkg::loop_k1/k2).
// GAIN_SCALE converts them to integers: it is the number of output LSBs per
// input LSB for a gain of one, and the gains are stored with K_FRAC
// fractional bits in K_PREC-bit signed constants.
//
//   integ[n] = integ[n-1] + K2 e[n]
//   v[n]     = K1 e[n] + integ[n]
//
// v is combinational from e and the integrator register (the loop's single
// unit delay is in the NCO); the integrator updates on cycles with en high.
// Both sums saturate to ACC_W bits.
module loop_filter #(
  parameter int  IN_W       = 18,
  parameter int  ACC_W      = 32,
  parameter real LOOP_BW    = 0.2,
  parameter real DAMPING    = 1.0,
  parameter real KP         = 1.0,
  parameter real K0         = 1.0,
  parameter int  SPS        = 1,
  parameter int  K_PREC     = 44,
  parameter int  ORDER      = 2,
  parameter int  K_FRAC     = 24,
  parameter real GAIN_SCALE = 20860.0   // (2^32 / 2pi) / 2^15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  e_in,
  output logic signed [ACC_W-1:0] v_out
);
  import pcmfm_pkg::*;

  localparam real K1_R = loop_k1(LOOP_BW, DAMPING, SPS, KP, K0) * GAIN_SCALE * (2.0 ** K_FRAC);
  localparam real K2_R = (ORDER >= 2) ?
                         loop_k2(LOOP_BW, DAMPING, SPS, KP, K0) * GAIN_SCALE * (2.0 ** K_FRAC) : 0.0;
  localparam logic signed [K_PREC-1:0] K1 = K_PREC'(longint'($floor(K1_R + 0.5)));
  localparam logic signed [K_PREC-1:0] K2 = K_PREC'(longint'($floor(K2_R + 0.5)));

  if (K1_R >= 2.0 ** (K_PREC - 1) || K1_R <= -(2.0 ** (K_PREC - 1)) ||
      K2_R >= 2.0 ** (K_PREC - 1) || K2_R <= -(2.0 ** (K_PREC - 1)))
  begin : g_gain_check
    $error("loop_filter: gain does not fit K_PREC bits");
  end

  logic signed [IN_W+K_PREC-1:0] p1, p2;
  logic signed [ACC_W-1:0]       integ, integ_next;

  always_comb begin
    p1         = (IN_W+K_PREC)'(e_in) * (IN_W+K_PREC)'(K1);
    p2         = (IN_W+K_PREC)'(e_in) * (IN_W+K_PREC)'(K2);
    integ_next = ACC_W'(sat(longint'(integ) + rshift_round(longint'(p2), K_FRAC), ACC_W));
    v_out      = ACC_W'(sat(rshift_round(longint'(p1), K_FRAC) + longint'(integ_next), ACC_W));
  end

  always_ff @(posedge clk) begin
    if (rst)     integ <= '0;
    else if (en) integ <= integ_next;
  end
endmodule
