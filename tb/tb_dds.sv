// tb_dds: checks the DDS phase accumulator and its cosine/sine outputs.
//
// Runs the oscillator at several frequency words (positive and negative),
// and at every enabled cycle compares cos_o/sin_o against cos and sin of the
// phase the testbench accumulates itself, truncated to the table address.
// Also checks that the phase holds while en is low.
module tb_dds;
  localparam int PHASE_W = 32, LUT_AW = 10, OUT_W = 12;
  localparam real PI = 3.14159265358979323846;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [PHASE_W-1:0] freq = '0;
  logic signed [OUT_W-1:0] cos_o, sin_o;

  dds #(.PHASE_W(PHASE_W), .LUT_AW(LUT_AW), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [PHASE_W-1:0] ref_phase = '0;

  task automatic compare();
    real a, ec, es;
    a  = 2.0 * PI * real'(ref_phase[PHASE_W-1 -: LUT_AW]) / real'(1 << LUT_AW);
    ec = 2047.0 * $cos(a);
    es = 2047.0 * $sin(a);
    checks++;
    if (fabs(real'(cos_o) - ec) > 1.0 || fabs(real'(sin_o) - es) > 1.0) begin
      failures++;
      if (failures < 10)
        $display("FAIL phase=%h cos=%0d (%f) sin=%0d (%f)", ref_phase, cos_o, ec, sin_o, es);
    end
  endtask

  initial begin
    int steps [4] = '{32'h0123_4567, -32'sh0765_4321, 32'h4000_0000, 32'h0000_1000};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    foreach (steps[s]) begin
      freq <= steps[s];
      en   <= 1'b1;
      for (int n = 0; n < 300; n++) begin
        @(posedge clk);
        #1;
        ref_phase = ref_phase + PHASE_W'(steps[s]);
        compare();
      end
      en <= 1'b0;
      repeat (5) @(posedge clk);
      #1 compare();   // phase held while disabled
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
