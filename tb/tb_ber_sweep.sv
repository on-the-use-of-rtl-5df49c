// tb_ber_sweep: bit error rate of the full demodulator in white Gaussian
// noise, the measurement the receiver is characterised by.
//
// The transmitter model of tb_pcmfm_demod_top (PN sequence of length
// 2^15-1, NRZ PCM/FM with modulation index 0.7 at 1 Mbit/s on a 70 MHz IF,
// 100 Ms/s, 14 bits) adds Gaussian noise (Box-Muller) at the ADC. With
// signal amplitude A and noise standard deviation s per 100 Ms/s sample,
// Eb/N0 = (A^2/2 * Tb) / (2 s^2 / fs) = 25 A^2 / s^2. Each Eb/N0 point runs
// with a fresh reset; after 200 bits of acquisition every recovered bit is
// checked against the PN recurrence s[n] = s[n-14] xor s[n-15] applied to
// the recovered bits. A single channel error breaks the recurrence in up to
// three places, so the bit error rate is estimated as mismatches / 3.
// Two receivers see the same samples: one with the default IF filter
// (3-dB point at 200 kHz) and one with a 539 kHz cutoff.
// Checks: the error rate of each must fall as Eb/N0 rises; at 12 dB it
// must be below 0.2 with the default filter and below 1e-3 with the wide
// one, and below 1e-4 at 15 dB with the wide one; no noise-free run may
// have errors; the wide-filter receiver must not lose bits (the default one
// slips bits at low Eb/N0 and is only held to that from 15 dB).
module tb_ber_sweep;
  import pcmfm_pkg::*;

  localparam int  NBITS  = 6000;
  localparam int  SETTLE = 200;
  localparam real H      = 0.7;
  localparam real AMP    = 0.2 * 8191.0;
  localparam int  NPTS   = 5;
  localparam real EBN0_DB [NPTS] = '{6.0, 9.0, 12.0, 15.0, 100.0};

  logic clk = 1'b0, rst = 1'b1;
  logic adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_data = '0;
  logic bb_valid, disc_valid, pcm_valid, bit_valid, bit_data, bit_clk;
  logic signed [BB_W-1:0] bb_i, bb_q;
  logic signed [DISC_W-1:0] disc_out, pcm_out;
  logic signed [17:0] pll_phase_err;
  logic signed [15:0] timing_err;
  logic [31:0] timing_step;

  pcmfm_demod_top dut (.*);

  // Second receiver on the same samples with a wider IF filter
  // (cutoff 539 kHz: 200 kHz pass-band edge plus half the 678 kHz
  // transition band), for comparison.
  logic w_bb_valid, w_disc_valid, w_pcm_valid, w_bit_valid, w_bit_data, w_bit_clk;
  logic signed [BB_W-1:0] w_bb_i, w_bb_q;
  logic signed [DISC_W-1:0] w_disc_out, w_pcm_out;
  logic signed [17:0] w_pll_phase_err;
  logic signed [15:0] w_timing_err;
  logic [31:0] w_timing_step;
  pcmfm_demod_top #(.FIR_CUTOFF_HZ(539.0e3)) dut_wide (
    .clk, .rst, .adc_valid, .adc_data,
    .bb_valid(w_bb_valid), .bb_i(w_bb_i), .bb_q(w_bb_q),
    .disc_valid(w_disc_valid), .disc_out(w_disc_out),
    .pcm_valid(w_pcm_valid), .pcm_out(w_pcm_out),
    .bit_valid(w_bit_valid), .bit_data(w_bit_data), .bit_clk(w_bit_clk),
    .pll_phase_err(w_pll_phase_err), .timing_err(w_timing_err), .timing_step(w_timing_step));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bits = 0, n_chk = 0, n_err = 0;
  int w_bits = 0, w_chk = 0, w_err = 0;
  logic [14:0] hist = '0, w_hist = '0;

  always @(posedge clk) if (!rst && w_bit_valid) begin
    w_bits++;
    if (w_bits > SETTLE) begin
      w_chk++;
      if (w_bit_data != (w_hist[13] ^ w_hist[14])) w_err++;
    end
    w_hist = {w_hist[13:0], w_bit_data};
  end

  always @(posedge clk) if (!rst && bit_valid) begin
    n_bits++;
    if (n_bits > SETTLE) begin
      n_chk++;
      if (bit_data != (hist[13] ^ hist[14])) n_err++;
    end
    hist = {hist[13:0], bit_data};
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic run_point(input real ebn0_db, output real ber, output real wber);
    logic [14:0] lfsr;
    real carrier, dev, t_bit, sigma, v;
    int  sym, bits_sent;
    sigma = AMP * $sqrt(25.0 / (10.0 ** (ebn0_db / 10.0)));
    lfsr = 15'h7fff; carrier = 0.0; dev = 0.0; t_bit = 0.0; bits_sent = 0; sym = 1;
    @(posedge clk);
    rst <= 1'b1;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    n_bits = 0; n_chk = 0; n_err = 0;
    w_bits = 0; w_chk = 0; w_err = 0;
    while (bits_sent < NBITS) begin
      @(posedge clk);
      if (t_bit <= 0.0) begin
        logic nb;
        nb   = lfsr[13] ^ lfsr[14];
        lfsr = {lfsr[13:0], nb};
        sym  = nb ? 1 : -1;
        t_bit += 100.0;
        bits_sent++;
      end
      t_bit   -= 1.0;
      dev     += PI * H * real'(sym) / 100.0;
      carrier += 2.0 * PI * 0.7;
      if (carrier > 2.0 * PI) carrier -= 2.0 * PI;
      v = AMP * $cos(carrier + dev) + sigma * gauss();
      if (v > 8191.0) v = 8191.0;
      if (v < -8192.0) v = -8192.0;
      adc_valid <= 1'b1;
      adc_data  <= ADC_W'($rtoi($floor(v + 0.5)));
    end
    @(posedge clk);
    adc_valid <= 1'b0;
    repeat (1000) @(posedge clk);
    ber  = real'(n_err) / 3.0 / real'(n_chk);
    wber = real'(w_err) / 3.0 / real'(w_chk);
    $display("Eb/N0 %5.1f dB: default filter %0d bits, %0d mismatches, BER ~ %e | wide filter %0d bits, %0d mismatches, BER ~ %e",
             ebn0_db, n_chk, n_err, ber, w_chk, w_err, wber);
    checks++;
    if (w_chk < NBITS - SETTLE - 300 || (ebn0_db >= 15.0 && n_chk < NBITS - SETTLE - 300)) begin
      failures++; $display("FAIL: too few bits recovered");
    end
  endtask

  initial begin
    real ber [NPTS], wber [NPTS];
    for (int p = 0; p < NPTS; p++) run_point(EBN0_DB[p], ber[p], wber[p]);
    for (int p = 1; p < NPTS; p++) begin
      checks++;
      if ((ber[p] > ber[p-1] && ber[p] > 0.0) || (wber[p] > wber[p-1] && wber[p] > 0.0)) begin
        failures++;
        $display("FAIL: BER rises from %f to %f dB", EBN0_DB[p-1], EBN0_DB[p]);
      end
    end
    checks++;
    if (ber[NPTS-3] >= 0.2 || wber[NPTS-3] >= 1.0e-3 || wber[NPTS-2] >= 1.0e-4) begin
      failures++; $display("FAIL: BER at 12 or 15 dB too high");
    end
    checks++;
    if (ber[NPTS-1] != 0.0 || wber[NPTS-1] != 0.0) begin failures++; $display("FAIL: errors without noise"); end
    checks++;
    if (ber[0] == 0.0) begin failures++; $display("FAIL: no errors at %f dB, noise not effective", EBN0_DB[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * (NBITS * 100 + 2000)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
