// quad_mixer: discrete-time quadrature mixer from the real IF to I/Q baseband.
//
// A local DDS runs at the IF (70 MHz at 100 Msamples/s by default; the phase
// step is IF/FS of a turn, which aliases to -30 MHz). Each ADC sample x[n] is
// multiplied by cos and -sin of the oscillator phase, giving
// I = x cos(w n) and Q = -x sin(w n), i.e. x[n] e^(-j w n): the IF component
// lands at 0 Hz and its image at 2*IF (40 MHz after aliasing), which the
// low-pass FIR filters that follow remove.
//
// Interface: one sample per cycle with adc_valid high; outputs are registered
// (1 cycle latency) and flagged by mix_valid. The products are scaled by
// 2^-(ADC_W+LUT_W-1-MIX_W) and saturated to MIX_W bits. The DDS-based local
// oscillator and the widths are this design's choices; the document only
// names a discrete-time quadrature mixer.
module quad_mixer #(
  parameter int  ADC_W   = pcmfm_pkg::ADC_W,
  parameter int  MIX_W   = pcmfm_pkg::MIX_W,
  parameter int  LUT_W   = pcmfm_pkg::LUT_W,
  parameter int  LUT_AW  = pcmfm_pkg::LUT_AW,
  parameter int  PHASE_W = pcmfm_pkg::PHASE_W,
  parameter real FS_HZ   = pcmfm_pkg::FS_ADC_HZ,
  parameter real IF_HZ   = pcmfm_pkg::IF_HZ
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    mix_valid,
  output logic signed [MIX_W-1:0] i_out,
  output logic signed [MIX_W-1:0] q_out
);
  import pcmfm_pkg::*;

  // Phase step: fractional part of IF/FS, in units of 2^-PHASE_W turn.
  localparam real STEP_R = (IF_HZ / FS_HZ - $floor(IF_HZ / FS_HZ)) * (2.0 ** PHASE_W);
  localparam logic [PHASE_W-1:0] STEP = PHASE_W'(longint'($floor(STEP_R + 0.5)));
  localparam int SHIFT = ADC_W + LUT_W - 1 - MIX_W;

  logic signed [LUT_W-1:0] lo_cos, lo_sin;
  logic signed [ADC_W+LUT_W-1:0] prod_i, prod_q;

  dds #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .OUT_W(LUT_W)) u_lo (
    .clk, .rst, .en(adc_valid), .freq(STEP),
    .cos_o(lo_cos), .sin_o(lo_sin)
  );

  always_comb begin
    prod_i = (ADC_W+LUT_W)'(adc_data) * (ADC_W+LUT_W)'(lo_cos);
    prod_q = -((ADC_W+LUT_W)'(adc_data) * (ADC_W+LUT_W)'(lo_sin));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mix_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      mix_valid <= adc_valid;
      if (adc_valid) begin
        i_out <= MIX_W'(sat(rshift_round(longint'(prod_i), SHIFT), MIX_W));
        q_out <= MIX_W'(sat(rshift_round(longint'(prod_q), SHIFT), MIX_W));
      end
    end
  end
endmodule
