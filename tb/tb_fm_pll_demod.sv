// tb_fm_pll_demod: checks the PLL FM discriminator on frequency steps.
//
// I/Q tones at 20 Ms/s (one sample every fifth clock, as in the receiver)
// step through +300 kHz, -250 kHz, 0 and +600 kHz with continuous phase.
// After each step the output must settle to f / 20 MHz * 2^32 / 2^17 LSB
// within 30 samples, stay within 25 LSB of it and average to it within
// 2 LSB (the loop's normalised bandwidth is 0.2) and the
// detector error must fall to a small value. Half- and full-amplitude
// inputs are both used. Output valid follows each input by one cycle.
module tb_fm_pll_demod;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [11:0] i_in = '0, q_in = '0;
  logic out_valid;
  logic signed [11:0] freq_out;
  logic signed [17:0] phase_err;

  fm_pll_demod dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real ph = 0.0;

  task automatic run(input real f_hz, input real amp, input int n);
    real expct;
    int settle;
    real sum = 0.0;
    logic signed [17:0] err_now;
    expct  = f_hz / 20.0e6 * 32768.0;
    settle = -1;
    for (int k = 0; k < n; k++) begin
      ph += 2.0 * PI * f_hz / 20.0e6;
      @(negedge clk);
      i_in = 12'($rtoi($floor(amp * $cos(ph) + 0.5)));
      q_in = 12'($rtoi($floor(amp * $sin(ph) + 0.5)));
      in_valid = 1'b1;
      #1 err_now = phase_err;     // error of this sample against the current phase
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: no output one cycle after input"); end
      if (settle < 0 && real'(freq_out) - expct < 3.0 && expct - real'(freq_out) < 3.0) settle = k;
      repeat (3) @(negedge clk);
      if (k >= 50) begin
        sum += real'(freq_out);
        checks++;
        if (real'(freq_out) - expct > 25.0 || expct - real'(freq_out) > 25.0 ||
            err_now > 600 || err_now < -600) begin
          failures++;
          if (failures < 10) $display("FAIL f=%f k=%0d out=%0d expected %f err=%0d", f_hz, k, freq_out, expct, err_now);
        end
      end
    end
    $display("f=%0.0f Hz amp=%0.0f: output %0d (expected %0.1f), settled after %0d samples",
             f_hz, amp, freq_out, expct, settle);
    checks++;
    if (sum / real'(n - 50) - expct > 2.0 || expct - sum / real'(n - 50) > 2.0) begin
      failures++;
      $display("FAIL: mean output %f, expected %f", sum / real'(n - 50), expct);
    end
    checks++;
    if (settle < 0 || settle > 30) begin failures++; $display("FAIL: settling"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(300.0e3, 1800.0, 200);
    run(-250.0e3, 1800.0, 200);
    run(0.0, 1000.0, 200);
    run(600.0e3, 1000.0, 200);
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
