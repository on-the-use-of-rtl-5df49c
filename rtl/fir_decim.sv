// fir_decim: length-NTAPS low-pass FIR filter with DECIM:1 downsampling.
//
// This is the receiver's IF filter, one instance per I/Q rail: 469 taps at
// 100 Msamples/s with a 200 kHz 3-dB bandwidth, output at 20 Msamples/s.
// Only every DECIM-th output is needed, so the filter is time-multiplexed:
// output y[n] = sum_k h[k] x[n-k] is split by tap residue j = k mod DECIM,
// and while the sample x[n-j] is being shifted in, the taps with that
// residue are summed. Tap k = DECIM*q + j then always sits at delay-line
// position DECIM*q, so one bank of multipliers serves all phases, with the
// coefficient bank selected by a phase counter running DECIM-1 down to 0.
//
// The taps are symmetric (h[k] = h[NTAPS-1-k]), so each multiplier takes
// the sum of a tap and its mirror: the mirror of tap k is at position
// NTAPS-1-k-j, picked by a DECIM-way multiplexer, and the centre tap of an
// odd-length filter has no partner. With the defaults that is
// ceil(235/5) = 47 multipliers (17 x 18 bits) per rail instead of 469.
//
// Coefficients are a Hamming-windowed sinc with cutoff CUTOFF_HZ, normalised
// to unity DC gain, computed at elaboration and quantised to COEF_W bits with
// COEF_FRAC fractional bits. A 265 kHz cutoff puts the 3-dB point at about
// 200 kHz, and a 469-tap Hamming window gives a transition band of roughly
// 0.7 MHz. The window method, cutoff and word widths are this design's own.
//
// Interface: in_valid marks each input sample. out_valid pulses for one cycle,
// one cycle after every DECIM-th input; y = acc * 2^(GAIN_SHIFT) scaled from
// IN_W to OUT_W bits, rounded and saturated. Phase counter, accumulator and
// delay line are cleared by rst, so the first output follows DECIM inputs
// after reset.
module fir_decim #(
  parameter int  NTAPS      = 469,
  parameter int  DECIM      = pcmfm_pkg::DECIM_FIR,
  parameter int  IN_W       = pcmfm_pkg::MIX_W,
  parameter int  OUT_W      = pcmfm_pkg::BB_W,
  parameter int  COEF_W     = 18,
  parameter int  COEF_FRAC  = 24,
  parameter int  GAIN_SHIFT = 3,
  parameter real FS_HZ      = pcmfm_pkg::FS_ADC_HZ,
  parameter real CUTOFF_HZ  = 265.0e3
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output logic signed [OUT_W-1:0] y
);
  import pcmfm_pkg::*;

  localparam int NH    = NTAPS / 2;                     // mirrored pairs
  localparam int NF    = NTAPS - NH;                    // pairs plus centre
  localparam int NQ    = (NF + DECIM - 1) / DECIM;      // multipliers
  localparam int ACC_W = IN_W + COEF_W + $clog2(NTAPS) + 1;
  localparam int SHIFT = COEF_FRAC + IN_W - OUT_W - GAIN_SHIFT;

  // Bank r, multiplier q holds h[DECIM*q + r] for the front half of the
  // taps (k < NF), stored flat at r*NQ + q; zero past the centre.
  typedef logic signed [COEF_W-1:0] coef_t [DECIM*NQ];

  function automatic coef_t make_coefs();
    coef_t c;
    real h [NTAPS];
    real sum, t, wc, win, hmax;
    sum = 0.0;
    wc  = 2.0 * CUTOFF_HZ / FS_HZ;
    for (int k = 0; k < NTAPS; k++) begin
      t   = real'(k) - real'(NTAPS - 1) / 2.0;
      win = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(NTAPS - 1));
      if (t == 0.0) h[k] = wc;
      else          h[k] = $sin(PI * wc * t) / (PI * t);
      h[k] = h[k] * win;
      sum  = sum + h[k];
    end
    hmax = real'((1 << (COEF_W - 1)) - 1);
    for (int r = 0; r < DECIM; r++)
      for (int q = 0; q < NQ; q++) begin
        if (DECIM * q + r < NF) begin
          t = h[DECIM * q + r] / sum * (2.0 ** COEF_FRAC);
          if (t > hmax) t = hmax;
          if (t < -hmax) t = -hmax;
          c[r*NQ+q] = COEF_W'($rtoi($floor(t + 0.5)));
        end else begin
          c[r*NQ+q] = '0;
        end
      end
    return c;
  endfunction

  localparam coef_t COEF = make_coefs();

  logic signed [IN_W-1:0]  dl [NTAPS-1];       // x[n-1] .. x[n-NTAPS+1]
  logic [$clog2(DECIM+1)-1:0] ph;               // residue being accumulated
  logic signed [ACC_W-1:0] acc, partial, total;

  // Delay-line tap i after this cycle's shift: x[n-i].
  function automatic logic signed [IN_W-1:0] tap(input int i,
                                                 input logic signed [IN_W-1:0] xin,
                                                 input logic signed [IN_W-1:0] line [NTAPS-1]);
    return (i == 0) ? xin : line[i - 1];
  endfunction

  // Partial sum of the current phase: pairs (k, NTAPS-1-k) with k = DECIM*q + ph.
  always_comb begin
    logic signed [IN_W:0] front, mirror;
    partial = '0;
    for (int q = 0; q < NQ; q++) begin
      front  = (IN_W+1)'(tap(DECIM * q, x, dl));
      mirror = '0;
      for (int j = 0; j < DECIM; j++)
        if (int'(ph) == j && DECIM * q + j < NH)
          mirror = (IN_W+1)'(tap(NTAPS - 1 - DECIM * q - 2 * j, x, dl));
      partial = partial + ACC_W'(front + mirror) * ACC_W'(COEF[int'(ph)*NQ + q]);
    end
    total = acc + partial;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph        <= ($clog2(DECIM+1))'(DECIM - 1);
      acc       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (ph == 0) begin
          y         <= OUT_W'(sat(rshift_round(longint'(total), SHIFT), OUT_W));
          out_valid <= 1'b1;
          acc       <= '0;
          ph        <= ($clog2(DECIM+1))'(DECIM - 1);
        end else begin
          acc <= total;
          ph  <= ph - 1'b1;
        end
      end
    end
  end

  // Delay line: plain shift register, cleared so the first outputs after
  // reset are defined.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS - 1; i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= x;
      for (int i = 1; i < NTAPS - 1; i++) dl[i] <= dl[i-1];
    end
  end
endmodule
