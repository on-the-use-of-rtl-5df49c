// tb_loop_filter: checks the proportional-plus-integrator loop filter.
//
// The gains are recomputed here from the loop design equations
// (theta = BnT / (zeta + 1/(4 zeta)) / N, K1 = 4 zeta theta / d,
// K2 = 4 theta^2 / d, d = 1 + 2 zeta theta + theta^2) and the filter is run
// with random errors against an integer model of
// integ += K2 e, v = K1 e + integ. Cycles with en low must leave the
// integrator alone. A second instance with ORDER = 1 must have no memory.
// Finally a constant error drives the integrator into saturation.
module tb_loop_filter;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [17:0] e_in = '0;
  logic signed [31:0] v_out, v1_out;

  loop_filter dut (.*);
  loop_filter #(.ORDER(1)) dut1 (.clk, .rst, .en, .e_in, .v_out(v1_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint k1, k2, integ;

  function automatic longint rnd(input longint v, input int s);
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction
  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  initial begin
    real th, d, scale;
    longint exp_i, exp_v, p1;
    th = 0.2 / 1.25;
    d  = 1.0 + 2.0 * th + th * th;
    scale = 20860.0 * 16777216.0;
    k1 = longint'($floor(4.0 * th / d * scale + 0.5));
    k2 = longint'($floor(4.0 * th * th / d * scale + 0.5));
    integ = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic signed [17:0] e;
      logic go;
      e  = (n < 2000) ? 18'($signed($urandom_range(0, 4000)) - 2000) : 18'sd131071;
      go = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      e_in = e; en = go;
      #1;
      p1    = rnd(longint'(e) * k1, 24);
      exp_i = sat32(integ + rnd(longint'(e) * k2, 24));
      exp_v = sat32(p1 + exp_i);
      checks++;
      if (longint'(v_out) != exp_v || longint'(v1_out) != sat32(p1)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d e=%0d v=%0d exp=%0d v1=%0d exp1=%0d", n, e, v_out, exp_v, v1_out, p1);
      end
      if (go) integ = exp_i;
    end
    checks++;
    if (integ != 64'sd2147483647) begin
      failures++;
      $display("FAIL: integrator did not saturate (%0d)", integ);
    end
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
