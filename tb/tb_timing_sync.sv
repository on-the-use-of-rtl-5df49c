// tb_timing_sync: checks bit timing recovery on a 4-samples-per-bit signal.
//
// Random bits a_k = +-1 are shaped with a raised-cosine pulse two bits long
// (free of intersymbol interference at the bit centres) and sampled 4 times
// per bit with a starting offset of 0.37 bit and a bit rate that is off
// nominal. Two runs use rates 0.2 % fast and 0.2 % slow. After 300 bits of
// acquisition the recovered bits must match the sent ones (after a fixed
// delay found by search), the counter step must have moved the right way
// from 1/2, and the detector output and bit clock must be active. The
// samples arrive every 25 clocks, as in the receiver.
module tb_timing_sync;
  localparam real PI = 3.14159265358979323846;
  localparam int  NB = 1500;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [11:0] din = '0;
  logic bit_valid, bit_data, bit_clk;
  logic signed [15:0] timing_err;
  logic [31:0] step_w;

  timing_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit sent [NB + 10];
  bit got [$];
  int n_clk_edges = 0;
  logic bit_clk_q = 1'b0;

  always @(posedge clk) begin
    if (bit_valid) got.push_back(bit_data);
    if (bit_clk && !bit_clk_q) n_clk_edges++;
    bit_clk_q <= bit_clk;
  end

  function automatic real pulse(input real t);   // raised cosine, |t| < 1 bit
    if (t <= -1.0 || t >= 1.0) return 0.0;
    return 0.5 * (1.0 + $cos(PI * t));
  endfunction

  task automatic run(input real rate);   // bits per input sample * 4
    real t, v;
    int best_err, best_d, errs, n_samp;
    longint w_sum;
    got.delete();
    n_clk_edges = 0;
    w_sum = 0;
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < NB + 10; k++) sent[k] = $urandom_range(0, 1);
    n_samp = int'(real'(NB) * 4.0 / rate);
    for (int n = 0; n < n_samp; n++) begin
      int kb;
      t  = real'(n) * rate / 4.0 + 0.37;        // time in bits
      kb = $rtoi($floor(t));
      v  = 0.0;
      for (int j = kb - 1; j <= kb + 1; j++)
        if (j >= 0 && j < NB + 10) v += (sent[j] ? 1.0 : -1.0) * pulse(t - real'(j));
      @(negedge clk);
      din = 12'($rtoi($floor(700.0 * v + 0.5)));
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      repeat (23) @(negedge clk);
      if (n > n_samp / 2) w_sum += longint'(step_w);
    end
    // Find the delay between sent and recovered bits over the tail.
    best_err = 1 << 30; best_d = 0;
    for (int d = -4; d <= 4; d++) begin
      errs = 0;
      for (int i = 300; i < got.size() - 5; i++)
        if (i + d >= 0 && i + d < NB + 10 && got[i] != sent[i + d]) errs++;
      if (errs < best_err) begin best_err = errs; best_d = d; end
    end
    $display("rate %f: %0d bits recovered, delay %0d, %0d errors, mean W = %f, %0d bit clock edges",
             rate, got.size(), best_d, best_err, real'(w_sum) / real'(n_samp - n_samp / 2 - 1) / 4294967296.0,
             n_clk_edges);
    checks++;
    if (best_err != 0) begin failures++; $display("FAIL: bit errors"); end
    checks++;
    if (got.size() < NB - 5 || got.size() > NB + 5) begin failures++; $display("FAIL: bit count"); end
    checks++;
    if (n_clk_edges < got.size() - 2) begin failures++; $display("FAIL: bit clock"); end
    checks++;   // faster bits -> more strobes per sample -> larger W
    if ((rate > 1.0) != (real'(w_sum) / real'(n_samp - n_samp / 2 - 1) > 2147483648.0)) begin
      failures++; $display("FAIL: counter step moved the wrong way");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(1.002);
    run(0.998);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NB * 4 * 26 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
