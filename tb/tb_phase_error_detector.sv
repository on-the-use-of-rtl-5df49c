// tb_phase_error_detector: checks the cross-product phase detector.
//
// Random I/Q and oscillator values are compared with
// round((Q cos - I sin) / 2^7), saturated to 18 bits. A second sweep puts a
// full-scale phasor at a known phase offset from the oscillator and checks
// that the error follows A sin(offset): positive for a leading input,
// negative for a lagging one.
module tb_phase_error_detector;
  localparam real PI = 3.14159265358979323846;
  logic signed [11:0] i_in, q_in, lo_cos, lo_sin;
  logic signed [17:0] err;

  phase_error_detector dut (.*);

  int checks = 0, failures = 0;

  initial begin
    longint ref_v;
    real th, d, exp_e;
    for (int k = 0; k < 5000; k++) begin
      i_in = 12'($urandom); q_in = 12'($urandom);
      lo_cos = 12'($urandom); lo_sin = 12'($urandom);
      #1;
      ref_v = longint'(q_in) * longint'(lo_cos) - longint'(i_in) * longint'(lo_sin);
      ref_v = (ref_v + 64) >>> 7;
      if (ref_v > 131071) ref_v = 131071;
      if (ref_v < -131072) ref_v = -131072;
      checks++;
      if (longint'(err) != ref_v) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d q=%0d c=%0d s=%0d err=%0d ref=%0d", i_in, q_in, lo_cos, lo_sin, err, ref_v);
      end
    end
    for (int k = -8; k <= 8; k++) begin
      th = 0.3 * real'(k);          // oscillator phase
      d  = 0.1 * real'(k);          // input leads by d
      i_in   = 12'($rtoi($floor(2047.0 * $cos(th + d) + 0.5)));
      q_in   = 12'($rtoi($floor(2047.0 * $sin(th + d) + 0.5)));
      lo_cos = 12'($rtoi($floor(2047.0 * $cos(th) + 0.5)));
      lo_sin = 12'($rtoi($floor(2047.0 * $sin(th) + 0.5)));
      #1;
      exp_e = 2047.0 * 2047.0 / 128.0 * $sin(d);
      checks++;
      if (real'(err) - exp_e > 40.0 || exp_e - real'(err) > 40.0 ||
          (k > 0 && err <= 0) || (k < 0 && err >= 0)) begin
        failures++;
        $display("FAIL offset %f: err=%0d expected %f", d, err, exp_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
