// tb_quad_mixer: checks the quadrature mixer against a real-valued model.
//
// Feeds random 14-bit samples and compares I and Q with x cos(2 pi 0.7 n)
// and -x sin(2 pi 0.7 n), scaled by 2047/2^9, allowing for the 12-bit
// oscillator table and phase truncation. A second phase feeds a 70 MHz
// tone and checks that the average of I is half its amplitude (the
// baseband term) and the average of Q is near zero.
module tb_quad_mixer;
  localparam real PI = 3.14159265358979323846;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic clk = 1'b0, rst = 1'b1, adc_valid = 1'b0;
  logic signed [13:0] adc_data = '0;
  logic mix_valid;
  logic signed [15:0] i_out, q_out;

  quad_mixer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    real sum_i, sum_q, x, a, ei, eq, tol;
    int cnt;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Random samples.
    for (int k = 0; k < 2000; k++) begin
      logic signed [13:0] smp;
      smp = 14'($urandom);
      adc_valid <= 1'b1;
      adc_data  <= smp;
      @(posedge clk);
      #1;
      begin
        x  = real'(smp);
        a  = 2.0 * PI * 0.7 * real'(k);
        ei = x * $cos(a) * 2047.0 / 512.0;
        eq = -x * $sin(a) * 2047.0 / 512.0;
        tol = fabs(x) * 2047.0 / 512.0 * 2.0 * PI / 1024.0 * 1.5 + 2.0;  // one table step
        checks++;
        if (!mix_valid || fabs(real'(i_out) - ei) > tol || fabs(real'(q_out) - eq) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d i=%0d (%f) q=%0d (%f)", k, i_out, ei, q_out, eq);
        end
      end
    end
    // 70 MHz tone: baseband term of amplitude A/2.
    sum_i = 0.0; sum_q = 0.0; cnt = 0;
    for (int k = 2000; k < 4000; k++) begin
      adc_data <= 14'($rtoi($floor(4000.0 * $cos(2.0 * PI * 0.7 * real'(k)) + 0.5)));
      @(posedge clk);
      #1;
      if (k > 2010) begin
        sum_i += real'(i_out); sum_q += real'(q_out); cnt++;
      end
    end
    sum_i /= cnt; sum_q /= cnt;
    checks++;
    if (fabs(sum_i - 2000.0 * 2047.0 / 512.0) > 40.0 || fabs(sum_q) > 40.0) begin
      failures++;
      $display("FAIL tone: mean I=%f Q=%f", sum_i, sum_q);
    end
    adc_valid <= 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++;
    if (mix_valid) begin failures++; $display("FAIL: valid without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
