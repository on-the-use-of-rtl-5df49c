// tb_farrow_interp: checks the piecewise-parabolic interpolator.
//
// Straight lines must be reproduced exactly (within rounding) for any mu;
// for random samples the output must match the parabolic formula
// y = ((v2 mu) + v1) mu + x(m) with alpha = 1/2 computed in real arithmetic;
// a sinusoid at 0.2 rad per sample must be reproduced to within 10 LSB
// (the parabolic approximation error); mu = 0 must
// return x(m).
module tb_farrow_interp;
  localparam real PI = 3.14159265358979323846;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  logic signed [11:0] xm1, x0, xp1, xp2, y;
  logic [15:0] mu;

  farrow_interp dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_close(input real e, input real tol, input string what);
    checks++;
    if (fabs(real'(y) - e) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: y=%0d expected %f (mu=%0d)", what, y, e, mu);
    end
  endtask

  initial begin
    real m, v1, v2, a, ph;
    for (int k = 0; k < 2000; k++) begin
      int b, s;
      b = $urandom_range(0, 800) - 400; s = $urandom_range(0, 600) - 300;
      xm1 = 12'(b - s); x0 = 12'(b); xp1 = 12'(b + s); xp2 = 12'(b + 2 * s);
      mu = 16'($urandom);
      #1 expect_close(real'(b) + real'(s) * real'(mu) / 65536.0, 1.0, "line");
    end
    for (int k = 0; k < 2000; k++) begin
      xm1 = 12'($urandom_range(0, 1000) - 500); x0 = 12'($urandom_range(0, 1000) - 500);
      xp1 = 12'($urandom_range(0, 1000) - 500); xp2 = 12'($urandom_range(0, 1000) - 500);
      mu = 16'($urandom);
      m  = real'(mu) / 65536.0;
      a  = 0.5;
      v2 = a * real'(xp2) - a * real'(xp1) - a * real'(x0) + a * real'(xm1);
      v1 = -a * real'(xp2) + (1.0 + a) * real'(xp1) - (1.0 - a) * real'(x0) - a * real'(xm1);
      #1 expect_close((v2 * m + v1) * m + real'(x0), 1.5, "formula");
      mu = '0;
      #1 expect_close(real'(x0), 0.0, "mu=0");
    end
    for (int k = 0; k < 500; k++) begin
      ph = real'($urandom_range(0, 9999)) / 10000.0 * 2.0 * PI;
      xm1 = 12'($rtoi($floor(1500.0 * $sin(ph - 0.2) + 0.5)));
      x0  = 12'($rtoi($floor(1500.0 * $sin(ph) + 0.5)));
      xp1 = 12'($rtoi($floor(1500.0 * $sin(ph + 0.2) + 0.5)));
      xp2 = 12'($rtoi($floor(1500.0 * $sin(ph + 0.4) + 0.5)));
      mu  = 16'($urandom);
      #1 expect_close(1500.0 * $sin(ph + 0.2 * real'(mu) / 65536.0), 10.0, "sinusoid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
