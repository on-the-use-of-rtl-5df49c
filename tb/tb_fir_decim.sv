// tb_fir_decim: checks the decimating low-pass FIR filter.
//
// DUT a (wide output, gain chosen so one output LSB is one coefficient LSB)
// receives an impulse; its outputs must equal the Hamming-windowed sinc
// taps, recomputed here, in the polyphase order a 5:1 decimator produces.
// DUT b has the default parameters and receives DC and tones at 100 kHz,
// 200 kHz (the 3-dB point) and 1.5 MHz (stop band); the output amplitudes
// are compared with the expected response. Both check one output per five
// inputs, one cycle after the fifth input.
module tb_fir_decim;
  localparam real PI = 3.14159265358979323846;
  localparam int  NTAPS = 469, DECIM = 5;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [15:0] x = '0;
  logic va, vb;
  logic signed [19:0] ya;
  logic signed [11:0] yb;

  fir_decim #(.OUT_W(20), .GAIN_SHIFT(8)) dut_a (
    .clk, .rst, .in_valid, .x, .out_valid(va), .y(ya));
  fir_decim dut_b (
    .clk, .rst, .in_valid, .x, .out_valid(vb), .y(yb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real h [NTAPS];
  int  hq [NTAPS];

  task automatic fail(input string s);
    failures++;
    if (failures < 15) $display("FAIL: %s", s);
  endtask

  initial begin
    real sum, t, wc;
    wc = 2.0 * 265.0e3 / 100.0e6;
    sum = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      t = real'(k) - 234.0;
      h[k] = (t == 0.0) ? wc : $sin(PI * wc * t) / (PI * t);
      h[k] *= 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 468.0);
      sum += h[k];
    end
    for (int k = 0; k < NTAPS; k++) hq[k] = $rtoi($floor(h[k] / sum * 16777216.0 + 0.5));
  end

  // Drive n samples from a function of the sample index, checking the output
  // cadence of both DUTs; outputs are collected by the monitor below.
  int in_count = 0, last_va_in = -1, out_a [$];
  real out_b [$];
  always @(posedge clk) if (!rst) begin
    if (va) begin
      checks++;
      if (in_count % DECIM != 0) fail($sformatf("output after input %0d", in_count));
      out_a.push_back(int'(ya));
    end
    if (vb) out_b.push_back(real'(yb));
    if (va != vb) fail("the two instances disagree on the schedule");
    if (in_valid) in_count++;
  end

  task automatic tone(input real f_hz, input real amp, input int n, output real out_amp);
    real mx;
    out_b.delete();
    for (int k = 0; k < n; k++) begin
      x <= 16'($rtoi($floor(amp * $cos(2.0 * PI * f_hz / 100.0e6 * real'(k)) + 0.5)));
      in_valid <= 1'b1;
      @(posedge clk);
    end
    mx = 0.0;
    for (int k = 120; k < out_b.size(); k++) if (fabs(out_b[k]) > mx) mx = fabs(out_b[k]);
    out_amp = mx;
  endtask

  initial begin
    real a, ea;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Impulse of 4096 at input index 0: output m (input index 5m+4) is
    // 4096 * hq[5m+4] / 2^12 = hq[5m+4].
    for (int k = 0; k < NTAPS + 20; k++) begin
      x <= (k == 0) ? 16'sd4096 : 16'sd0;
      in_valid <= 1'b1;
      @(posedge clk);
      if (k % 7 == 3) begin     // gaps in in_valid must not matter
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (out_a.size() != (NTAPS + 20) / DECIM) fail($sformatf("got %0d outputs", out_a.size()));
    for (int m = 0; m < out_a.size(); m++) begin
      int e;
      e = (DECIM * m + 4 < NTAPS) ? hq[DECIM * m + 4] : 0;
      checks++;
      if (out_a[m] - e > 1 || e - out_a[m] > 1) fail($sformatf("tap %0d: %0d, expected %0d", DECIM*m+4, out_a[m], e));
    end

    // DC: 2000 in -> 2000 * 8 * 2^-4 = 1000 out.
    tone(0.0, 2000.0, 1500, a);
    checks++;
    if (fabs(a - 1000.0) > 2.0) fail($sformatf("DC gain: %f", a));
    tone(100.0e3, 2000.0, 6000, a);
    checks++;
    if (a < 900.0 || a > 1010.0) fail($sformatf("100 kHz: %f", a));
    tone(200.0e3, 2000.0, 6000, a);
    ea = 1000.0 * 0.7079;
    checks++;
    if (fabs(a - ea) > 60.0) fail($sformatf("200 kHz (3-dB point): %f", a));
    tone(1.5e6, 2000.0, 4000, a);
    checks++;
    if (a > 4.0) fail($sformatf("1.5 MHz stop band: %f", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
