// tb_pcmfm_demod_top: end-to-end test of the PCM/FM demodulator at its
// default parameters.
//
// A behavioural transmitter sends a length-(2^15-1) PN sequence
// (s[n] = s[n-14] xor s[n-15]) as NRZ PCM/FM with modulation index 0.7 on a
// 70 MHz IF, sampled at 100 Ms/s and quantised to 14 bits, with a small
// amount of uniform noise. Its bit clock runs 500 ppm fast, so the timing
// loop has to pull away from its nominal step. After the loops settle, every
// recovered bit is checked against the PN recurrence applied to the
// previously recovered bits, which tests value and polarity without needing
// the pipeline delay. It also checks the 20 Ms/s, 20 Ms/s and 4 Ms/s output
// rates and that the mechanisms of the design were exercised: FIR
// decimation, both signs of PLL phase error, both directions of timing
// correction, and recovered bits at 1 per 100 clocks on average.
module tb_pcmfm_demod_top;
  import pcmfm_pkg::*;

  localparam int  NBITS    = 4000;     // transmitted bits
  localparam int  SETTLE   = 150;      // recovered bits ignored while locking
  localparam real H        = 0.7;
  localparam real AMP      = 0.2 * 8191.0;
  localparam real BIT_SAMP = 100.0 / 1.0005;   // transmitter 500 ppm fast

  logic clk = 1'b0, rst = 1'b1;
  logic adc_valid;
  logic signed [ADC_W-1:0] adc_data;
  logic bb_valid, disc_valid, pcm_valid, bit_valid, bit_data, bit_clk;
  logic signed [BB_W-1:0] bb_i, bb_q;
  logic signed [DISC_W-1:0] disc_out, pcm_out;
  logic signed [17:0] pll_phase_err;
  logic signed [15:0] timing_err;
  logic [31:0] timing_step;

  pcmfm_demod_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_adc = 0, n_bb = 0, n_disc = 0, n_pcm = 0, n_bits = 0, n_pll_pos = 0, n_pll_neg = 0;
  int n_w_up = 0, n_w_down = 0, n_bit_err = 0, n_bit_chk = 0, cycles = 0;
  logic [14:0] hist = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Transmitter model.
  initial begin
    logic [14:0] lfsr;
    real carrier, dev, t_bit, noise;
    int  sym, bits_sent;
    lfsr = 15'h7fff;
    carrier = 0.0; dev = 0.0; t_bit = 0.0; bits_sent = 0;
    sym = 1;
    adc_valid = 1'b0;
    adc_data  = '0;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    while (bits_sent < NBITS) begin
      @(posedge clk);
      if (t_bit <= 0.0) begin
        logic nb;
        nb   = lfsr[13] ^ lfsr[14];
        lfsr = {lfsr[13:0], nb};
        sym  = nb ? 1 : -1;
        t_bit += BIT_SAMP;
        bits_sent++;
      end
      t_bit   -= 1.0;
      dev     += PI * H * real'(sym) / BIT_SAMP;
      carrier += 2.0 * PI * 0.7;
      if (carrier > 2.0 * PI) carrier -= 2.0 * PI;
      noise = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.02 * 8191.0;
      adc_valid <= 1'b1;
      adc_data  <= ADC_W'($rtoi($floor(AMP * $cos(carrier + dev) + noise + 0.5)));
    end
    @(posedge clk);
    adc_valid <= 1'b0;
    repeat (200) @(posedge clk);

    $display("bb=%0d disc=%0d pcm=%0d bits=%0d pll+=%0d pll-=%0d w_up=%0d w_down=%0d bit_checks=%0d bit_errors=%0d",
             n_bb, n_disc, n_pcm, n_bits, n_pll_pos, n_pll_neg, n_w_up, n_w_down, n_bit_chk, n_bit_err);
    check(n_bb > 0 && n_bb - n_adc / 5 <= 1 && n_adc / 5 - n_bb <= 1, "baseband rate: one output per 5 ADC samples");
    check(n_disc == n_bb, "discriminator one output per baseband sample");
    check((n_pcm * 5 - n_disc) <= 5 && (n_disc - n_pcm * 5) <= 5, "PCM rate 4 Ms/s");
    check(n_bits > NBITS - 20 && n_bits < NBITS + 5, "about one bit per 100 clocks");
    check(n_pll_pos > 0 && n_pll_neg > 0, "PLL phase error of both signs");
    check(n_w_up > 0 && n_w_down > 0, "timing corrections in both directions");
    check(n_bit_chk > NBITS - SETTLE - 50, "enough bits checked");
    check(n_bit_err == 0, "recovered bits follow the PN sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitors.
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (adc_valid)  n_adc++;
    if (bb_valid)   n_bb++;
    if (disc_valid) begin
      n_disc++;
      if (pll_phase_err > 0) n_pll_pos++;
      if (pll_phase_err < 0) n_pll_neg++;
    end
    if (pcm_valid) n_pcm++;
    if (timing_step > 32'h8000_0000) n_w_up++;
    if (timing_step < 32'h8000_0000) n_w_down++;
    if (bit_valid) begin
      n_bits++;
      if (n_bits > SETTLE) begin
        n_bit_chk++;
        if (bit_data != (hist[13] ^ hist[14])) n_bit_err++;
      end
      hist = {hist[13:0], bit_data};
    end
  end

  // Watchdog.
  initial begin
    repeat (NBITS * 100 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
