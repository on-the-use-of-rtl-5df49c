// tb_downsampler: checks 5:1 downsampling with irregular input strobes.
// Samples are numbered 0, 1, 2, ...; the outputs must be samples 0, 5, 10,
// ... in order, each one cycle after its input, and nothing else.
module tb_downsampler;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [11:0] din = '0, dout;
  logic out_valid;

  downsampler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (dout != 12'(n_out * 5) || n_in != n_out * 5 + 1) begin
        failures++;
        $display("FAIL: output %0d = %0d after %0d inputs", n_out, dout, n_in);
      end
      n_out++;
    end
    if (in_valid) n_in++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < 500; k++) begin
      int gap;
      gap = $urandom_range(0, 3);
      @(negedge clk);
      din = 12'(k);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      repeat (gap) @(negedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != 100) begin failures++; $display("FAIL: %0d outputs", n_out); end
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
