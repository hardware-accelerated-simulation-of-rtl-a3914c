// outband_proc: last stage of the crest factor reduction chain. Hard clipping
// spreads energy into neighbouring channels (adjacent channel power). This
// stage shapes the weighted clipping error with a FIR cancellation pulse so
// that the correction stays inside the band, then adds it to the sample:
//     y[n] = sat( x[n-HALF] + (sum_k taps[k] * err[n-k]) >>> COEF_FRAC ),
// with HALF = (MAX_TAPS-1)/2 (at least 1), the centre of the pulse. With a centre tap of
// 1.0 a lone peak is brought to the clipped value exactly, and its
// neighbours receive the tapering tails of the pulse.
//
// Each accepted input yields one output, so the stream keeps its length but
// is delayed by HALF samples: the first HALF outputs after reset come from
// the zeroed delay line. Taps are signed Q2.14 and come from the shared
// registers (default: a 15-tap raised-cosine window). `clr` empties the
// delay lines between runs so that a run does not see the previous one's tail;
// no input is taken while it is high.
//
// Interface: valid/ready stream, one register stage, in_ready =
// out_ready | ~out_valid. The original work names this block and its purpose
// (spectral mask, ACPR); the pulse-shaping filter is this design's choice.
module outband_proc
  import cfr_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clr,
  input  logic [MAX_TAPS-1:0][COEF_W-1:0] taps,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  iq_t                             in_data,
  input  logic signed [SAMPLE_W+1:0]      in_err_i,
  input  logic signed [SAMPLE_W+1:0]      in_err_q,
  output logic                            out_valid,
  input  logic                            out_ready,
  output iq_t                             out_data
);
  localparam int unsigned HALF = (MAX_TAPS - 1) / 2;
  localparam int unsigned AW   = SAMPLE_W + 2 + COEF_W + 4;

  logic en, take;
  logic signed [SAMPLE_W+1:0] ei_sr [MAX_TAPS];
  logic signed [SAMPLE_W+1:0] eq_sr [MAX_TAPS];
  iq_t                        x_sr  [HALF];
  logic signed [SAMPLE_W+1:0] ei_nx [MAX_TAPS];
  logic signed [SAMPLE_W+1:0] eq_nx [MAX_TAPS];
  iq_t                        x_ctr;
  logic signed [AW-1:0]       acc_i, acc_q;
  logic signed [AW-1:0]       yi, yq;

  assign en       = out_ready | ~out_valid;
  assign in_ready = en & ~clr;
  assign take     = en & in_valid & ~clr;

  // Delay-line contents once the incoming sample is shifted in.
  always_comb begin
    ei_nx[0] = in_err_i;
    eq_nx[0] = in_err_q;
    for (int k = 1; k < MAX_TAPS; k++) begin
      ei_nx[k] = ei_sr[k-1];
      eq_nx[k] = eq_sr[k-1];
    end
    x_ctr = x_sr[HALF-1];
    acc_i = '0;
    acc_q = '0;
    for (int k = 0; k < MAX_TAPS; k++) begin
      acc_i += AW'(ei_nx[k] * $signed(taps[k]));
      acc_q += AW'(eq_nx[k] * $signed(taps[k]));
    end
    yi = AW'(x_ctr.i) + (acc_i >>> COEF_FRAC);
    yq = AW'(x_ctr.q) + (acc_q >>> COEF_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAX_TAPS; k++) begin
        ei_sr[k] <= '0;
        eq_sr[k] <= '0;
      end
      for (int k = 0; k < HALF; k++) x_sr[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (clr) begin
      // empty the delay lines between runs; the output stage drains normally
      for (int k = 0; k < MAX_TAPS; k++) begin
        ei_sr[k] <= '0;
        eq_sr[k] <= '0;
      end
      for (int k = 0; k < HALF; k++) x_sr[k] <= '0;
      if (out_ready) out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (take) begin
        for (int k = 0; k < MAX_TAPS; k++) begin
          ei_sr[k] <= ei_nx[k];
          eq_sr[k] <= eq_nx[k];
        end
        x_sr[0] <= in_data;
        for (int k = 1; k < HALF; k++) x_sr[k] <= x_sr[k-1];
        out_data.i <= sat_smp((SAMPLE_W+16)'(yi));
        out_data.q <= sat_smp((SAMPLE_W+16)'(yq));
      end
    end
  end

endmodule
