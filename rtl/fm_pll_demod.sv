// fm_pll_demod: FM discriminator built as a second-order discrete-time PLL.
//
// Loop: phase_error_detector compares the I/Q sample with the DDS phasor,
// loop_filter turns the error into a frequency word v, and the DDS advances
// its phase by v. Once locked, v tracks the instantaneous frequency of the
// input, so v is the demodulated signal (the derivative of the input phase).
// The loop has one sample of delay, closed in a single clock cycle: the DDS
// lookup, detector and filter are combinational between the DDS phase and
// integrator registers, and both update on every in_valid.
//
// Loop parameters follow the loop-filter settings of the library core:
// damping 1.0, detector and DDS gains 1.0, one sample per symbol and
// normalised bandwidth 0.2 (per sample at 20 Msamples/s). The output is
// resized from the 32-bit frequency word to DISC_W bits by an arithmetic
// right shift of OUT_SHIFT with saturation (17 by default: 2047 LSB is about
// 625 kHz at 20 Msamples/s) and registered.
//
// Interface: in_valid marks an I/Q pair; out_valid follows one cycle later
// with freq_out (positive for frequencies above the carrier).
module fm_pll_demod #(
  parameter int  IN_W      = pcmfm_pkg::BB_W,
  parameter int  OUT_W     = pcmfm_pkg::DISC_W,
  parameter int  PHASE_W   = pcmfm_pkg::PHASE_W,
  parameter int  LUT_AW    = pcmfm_pkg::LUT_AW,
  parameter int  LUT_W     = pcmfm_pkg::LUT_W,
  parameter int  E_W       = 18,
  parameter int  ACC_W     = 32,
  parameter real LOOP_BW   = 0.2,
  parameter real DAMPING   = 1.0,
  parameter int  OUT_SHIFT = 17
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] freq_out,
  output logic signed [E_W-1:0]   phase_err   // detector output, for monitoring
);
  import pcmfm_pkg::*;

  // Detector: 1 rad at full-scale input -> 2^(IN_W-1 + LUT_W-1 - PED_SHIFT).
  localparam int  PED_SHIFT = IN_W + LUT_W - 2 - (E_W - 3);
  localparam real GAIN_SCALE = (2.0 ** PHASE_W) / (2.0 * PI) / (2.0 ** (E_W - 3));

  logic signed [LUT_W-1:0] lo_cos, lo_sin;
  logic signed [ACC_W-1:0] v;

  dds #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .OUT_W(LUT_W)) u_dds (
    .clk, .rst, .en(in_valid), .freq(PHASE_W'(v)), .cos_o(lo_cos), .sin_o(lo_sin)
  );

  phase_error_detector #(.IN_W(IN_W), .LO_W(LUT_W), .E_W(E_W), .SHIFT(PED_SHIFT)) u_ped (
    .i_in, .q_in, .lo_cos, .lo_sin, .err(phase_err)
  );

  loop_filter #(
    .IN_W(E_W), .ACC_W(ACC_W), .LOOP_BW(LOOP_BW), .DAMPING(DAMPING),
    .KP(1.0), .K0(1.0), .SPS(1), .K_PREC(44), .ORDER(2), .K_FRAC(24),
    .GAIN_SCALE(GAIN_SCALE)
  ) u_lf (
    .clk, .rst, .en(in_valid), .e_in(phase_err), .v_out(v)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      freq_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        freq_out <= OUT_W'(sat(longint'(v) >>> OUT_SHIFT, OUT_W));
    end
  end
endmodule
