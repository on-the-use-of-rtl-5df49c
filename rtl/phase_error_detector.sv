// phase_error_detector: phase detector of the PLL FM discriminator.
//
// Rotates the input I/Q sample by the conjugate of the DDS phasor and takes
// the imaginary part: e = Q cos(theta) - I sin(theta) = A sin(phi - theta),
// which for small errors is proportional to the phase difference between
// the input phasor (amplitude A, phase phi) and the local oscillator.
// The 25-bit sum of products is rounded by SHIFT bits and saturated to E_W
// bits for the loop filter (with the defaults, a full-scale input and a
// one-radian error give about 2^15). Purely combinational; the loop's
// registers live in the DDS and loop filter. The xprod-product detector and
// widths are this design's choices: the document names the block only.
module phase_error_detector #(
  parameter int IN_W  = pcmfm_pkg::BB_W,
  parameter int LO_W  = pcmfm_pkg::LUT_W,
  parameter int E_W   = 18,
  parameter int SHIFT = 7
) (
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  input  logic signed [LO_W-1:0] lo_cos,
  input  logic signed [LO_W-1:0] lo_sin,
  output logic signed [E_W-1:0]  err
);
  import pcmfm_pkg::*;
  logic signed [IN_W+LO_W:0] xprod;
  always_comb begin
    xprod = (IN_W+LO_W+1)'(q_in) * (IN_W+LO_W+1)'(lo_cos)
          - (IN_W+LO_W+1)'(i_in) * (IN_W+LO_W+1)'(lo_sin);
    err   = E_W'(sat(rshift_round(longint'(xprod), SHIFT), E_W));
  end
endmodule
