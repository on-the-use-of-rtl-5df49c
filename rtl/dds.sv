// dds: direct digital synthesizer (numerically controlled oscillator).
//
// A PHASE_W-bit phase accumulator, where 2^PHASE_W is one full turn, advances
// by the signed frequency word `freq` on every cycle `en` is high. The top
// LUT_AW bits of the phase address a cosine table of 2^LUT_AW entries with
// OUT_W-bit signed amplitude (full scale 2^(OUT_W-1)-1); the sine is read
// from the same table a quarter turn later (sin x = cos(x - pi/2)).
//
// Timing: cos_o/sin_o are combinational functions of the phase register, so
// they show the phase held *before* the update of the current enabled cycle.
// This lets a PLL close its loop with one sample of delay. The table is
// computed at elaboration from cos(); the table size and truncation of the
// phase (no dithering) are this design's choices.
module dds #(
  parameter int PHASE_W = 32,
  parameter int LUT_AW  = 10,
  parameter int OUT_W   = 12
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [PHASE_W-1:0] freq,   // phase step per enabled cycle
  output logic signed [OUT_W-1:0]   cos_o,
  output logic signed [OUT_W-1:0]   sin_o
);
  localparam int N = 1 << LUT_AW;
  typedef logic signed [OUT_W-1:0] tab_t [N];

  function automatic tab_t make_cos();
    tab_t t;
    real amp;
    amp = real'((1 << (OUT_W - 1)) - 1);
    for (int k = 0; k < N; k++)
      t[k] = OUT_W'($rtoi($floor(amp * $cos(2.0 * pcmfm_pkg::PI * real'(k) / real'(N)) + 0.5)));
    return t;
  endfunction

  localparam tab_t COS_TAB = make_cos();

  logic [PHASE_W-1:0] phase;
  logic [LUT_AW-1:0]  addr_c, addr_s;

  always_ff @(posedge clk) begin
    if (rst)     phase <= '0;
    else if (en) phase <= phase + PHASE_W'(freq);
  end

  always_comb begin
    addr_c = phase[PHASE_W-1 -: LUT_AW];
    addr_s = addr_c - LUT_AW'(N / 4);
    cos_o  = COS_TAB[addr_c];
    sin_o  = COS_TAB[addr_s];
  end
endmodule
