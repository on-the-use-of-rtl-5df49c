// downsampler: keeps one sample in FACTOR.
//
// Takes the 20 Msamples/s discriminator output down to 4 Msamples/s, i.e.
// 4 samples per bit at 1 Mbit/s. A modulo-FACTOR counter advances on every
// in_valid and passes the sample that arrives when it is zero; out_valid is
// registered (1 cycle latency). Plain decimation without a filter is this
// design's reading: the loop bandwidth of the discriminator already limits
// the spectrum. The counter starts at zero after reset, so the first input
// sample is the first one kept.
module downsampler #(
  parameter int FACTOR = pcmfm_pkg::DECIM_PCM,
  parameter int W      = pcmfm_pkg::DISC_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);
  localparam int CW = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cnt <= (cnt == CW'(FACTOR - 1)) ? '0 : cnt + 1'b1;
        if (cnt == '0) begin
          dout      <= din;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
