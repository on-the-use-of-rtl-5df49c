// timing_sync: bit timing synchronisation PLL with an early-late detector.
//
// Input: the PCM pulse train at 4 samples per bit (in_valid at 4 Msamples/s).
// The loop, closed once per bit, is built from:
//  * interpolation control: a modulo-1 decrementing counter eta that steps
//    by W on every input sample; W is nominally 1/2, so the counter
//    underflows twice per bit. An underflow at sample m marks an
//    interpolation instant m + mu, with mu = eta/W approximated as 2*eta
//    (exact at the nominal W, off by at most the small loop correction);
//  * farrow_interp, which computes the sample at m + mu from x(m-1)..x(m+2);
//  * strobes alternate between on-time samples (bit decisions) and
//    mid-bit samples; the early-late detector forms, at each mid-bit strobe,
//      e = sign(on-time sample) * (late mid-bit sample - early mid-bit sample)
//    which is negative when the on-time sample comes late;
//  * loop_filter (proportional plus integrator) turning e into a correction
//    v, applied as W = 1/2 - v: a late estimate raises W so the strobes come
//    sooner.
// Outputs: bit_data (1 for a positive on-time sample, i.e. above-carrier
// frequency), bit_valid for one cycle per recovered bit, and bit_clk, a
// 1 MHz square wave that rises half a bit after bit_data changes, for a
// receiver that samples on the rising edge.
//
// The loop bandwidth (LOOP_BW per bit, damping 1) and the detector and
// counter gains are this design's choices; the document gives the detector
// type and the 4 samples per bit only.
module timing_sync #(
  parameter int  W_IN    = pcmfm_pkg::DISC_W,
  parameter int  CNT_W   = 32,
  parameter int  MU_W    = 16,
  parameter int  E_W     = 16,
  parameter real LOOP_BW = 0.01,
  parameter real DAMPING = 1.0,
  parameter real TED_KP  = 0.5,    // detector slope, full-scale units per bit of error
  parameter real CTRL_K0 = 2.0     // bits of timing shift per unit of W per bit
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [W_IN-1:0] din,
  output logic                   bit_valid,
  output logic                   bit_data,
  output logic                   bit_clk,
  output logic signed [E_W-1:0]  timing_err,  // last detector output
  output logic        [CNT_W-1:0] step_w       // current counter step W
);
  import pcmfm_pkg::*;

  localparam logic [CNT_W-1:0] W_NOM = CNT_W'(longint'(1) <<< (CNT_W - 1));
  localparam int V_LIM = CNT_W - 3;          // |v| < 1/8: W within 3/8 .. 5/8

  logic signed [W_IN-1:0] d0, d1, d2;        // x(m+1), x(m), x(m-1); din is x(m+2)
  logic [CNT_W-1:0]       eta, w;
  logic                   under;
  logic [MU_W-1:0]        mu;
  logic signed [W_IN-1:0] interp;

  logic                   strobe_q, ontime_next;
  logic signed [W_IN-1:0] y_q, on_val, early;
  logic signed [E_W-1:0]  e;
  logic                   lf_en;
  logic signed [31:0]     v;

  assign step_w = w;

  // Interpolation instant and fractional interval.
  always_comb begin
    longint two_eta;
    under   = (eta < w);
    two_eta = longint'(eta) <<< 1;
    if (two_eta >= (longint'(1) <<< CNT_W)) two_eta = (longint'(1) <<< CNT_W) - 1;
    mu = MU_W'(two_eta >>> (CNT_W - MU_W));
  end

  farrow_interp #(.W(W_IN), .MU_W(MU_W)) u_interp (
    .xm1(d2), .x0(d1), .xp1(d0), .xp2(din), .mu(mu), .y(interp)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      d0 <= '0; d1 <= '0; d2 <= '0;
      eta <= '0;
      strobe_q <= 1'b0;
      y_q <= '0;
    end else begin
      strobe_q <= 1'b0;
      if (in_valid) begin
        d0  <= din;
        d1  <= d0;
        d2  <= d1;
        eta <= eta - w;
        if (under) begin
          strobe_q <= 1'b1;
          y_q      <= interp;
        end
      end
    end
  end

  // Early-late detector on the mid-bit strobes.
  always_comb begin
    longint diff;
    diff = longint'(y_q) - longint'(early);
    if (on_val < 0) diff = -diff;
    e     = E_W'(sat(diff, E_W));
    lf_en = strobe_q && !ontime_next;
  end

  loop_filter #(
    .IN_W(E_W), .ACC_W(32), .LOOP_BW(LOOP_BW), .DAMPING(DAMPING),
    .KP(TED_KP), .K0(CTRL_K0), .SPS(1), .K_PREC(44), .ORDER(2), .K_FRAC(24),
    .GAIN_SCALE((2.0 ** CNT_W) / (2.0 ** (W_IN - 1)))
  ) u_lf (
    .clk, .rst, .en(lf_en), .e_in(e), .v_out(v)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ontime_next <= 1'b1;
      on_val      <= '0;
      early       <= '0;
      w           <= W_NOM;
      timing_err  <= '0;
      bit_valid   <= 1'b0;
      bit_data    <= 1'b0;
      bit_clk     <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (strobe_q) begin
        ontime_next <= !ontime_next;
        if (ontime_next) begin
          on_val    <= y_q;
          bit_data  <= (y_q >= 0);
          bit_valid <= 1'b1;
          bit_clk   <= 1'b0;
        end else begin
          early      <= y_q;
          timing_err <= e;
          w          <= CNT_W'(longint'(W_NOM) - sat(longint'(v), V_LIM + 1));
          bit_clk    <= 1'b1;
        end
      end
    end
  end
endmodule
