// pcmfm_demod_top: complete PCM/FM demodulator, ADC samples in, bits out.
//
//   ADC (100 Ms/s, 70 MHz IF) -> quad_mixer -> fir_decim x2 (469 taps, 5:1)
//   -> fm_pll_demod (20 Ms/s) -> downsampler (5:1, 4 Ms/s = 4 samples/bit)
//   -> timing_sync (early-late timing PLL) -> bit_data / bit_clk
//
// All blocks run from one clock at the ADC rate (100 MHz) with one shared
// synchronous active-high reset. The lower-rate sections are clocked by
// the same clock and advance only on their valid strobes, which replace the
// separate 20 MHz and 4 MHz clock domains of the board design. This is the
// design's choice; the valid chain gives the same sample schedule.
//
// The intermediate streams are brought out for observation: the 20 Ms/s
// baseband, the discriminator output and the 4 Ms/s PCM pulse train.
module pcmfm_demod_top #(
  parameter int ADC_W = pcmfm_pkg::ADC_W,
  parameter int  NTAPS         = 469,
  parameter real FIR_CUTOFF_HZ = 265.0e3
) (
  input  logic                                clk,          // 100 MHz sample clock
  input  logic                                rst,
  input  logic                                adc_valid,
  input  logic signed [ADC_W-1:0]             adc_data,
  output logic                                bb_valid,     // 20 Ms/s baseband
  output logic signed [pcmfm_pkg::BB_W-1:0]   bb_i,
  output logic signed [pcmfm_pkg::BB_W-1:0]   bb_q,
  output logic                                disc_valid,   // 20 Ms/s discriminator
  output logic signed [pcmfm_pkg::DISC_W-1:0] disc_out,
  output logic                                pcm_valid,    // 4 Ms/s pulse train
  output logic signed [pcmfm_pkg::DISC_W-1:0] pcm_out,
  output logic                                bit_valid,
  output logic                                bit_data,
  output logic                                bit_clk,
  output logic signed [17:0]                  pll_phase_err, // FM PLL detector output
  output logic signed [15:0]                  timing_err,   // early-late detector output
  output logic [31:0]                         timing_step   // timing-loop counter step
);
  import pcmfm_pkg::*;

  logic                    mix_valid, fir_q_valid;
  logic signed [MIX_W-1:0] mix_i, mix_q;

  quad_mixer #(.ADC_W(ADC_W)) u_mixer (
    .clk, .rst, .adc_valid, .adc_data,
    .mix_valid, .i_out(mix_i), .q_out(mix_q)
  );

  fir_decim #(.NTAPS(NTAPS), .CUTOFF_HZ(FIR_CUTOFF_HZ)) u_fir_i (
    .clk, .rst, .in_valid(mix_valid), .x(mix_i), .out_valid(bb_valid), .y(bb_i)
  );

  fir_decim #(.NTAPS(NTAPS), .CUTOFF_HZ(FIR_CUTOFF_HZ)) u_fir_q (
    .clk, .rst, .in_valid(mix_valid), .x(mix_q), .out_valid(fir_q_valid), .y(bb_q)
  );

  fm_pll_demod u_fm (
    .clk, .rst, .in_valid(bb_valid), .i_in(bb_i), .q_in(bb_q),
    .out_valid(disc_valid), .freq_out(disc_out), .phase_err(pll_phase_err)
  );

  downsampler u_ds (
    .clk, .rst, .in_valid(disc_valid), .din(disc_out),
    .out_valid(pcm_valid), .dout(pcm_out)
  );

  timing_sync u_ts (
    .clk, .rst, .in_valid(pcm_valid), .din(pcm_out),
    .bit_valid, .bit_data, .bit_clk, .timing_err(timing_err), .step_w(timing_step)
  );

  // The two rails share one schedule.
  a_rails_aligned: assert property (@(posedge clk) disable iff (rst) bb_valid == fir_q_valid);
endmodule
