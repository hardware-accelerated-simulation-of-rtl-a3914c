// inband_proc: third stage of the crest factor reduction chain. It bounds the
// in-band distortion that clipping adds (which sets the error vector
// magnitude, EVM) by weighting the clipping error:
//     err_w = (err * weight) >>> 15,   weight unsigned Q1.15 (32768 = 1.0).
// A weight below 1.0 cancels only part of each peak and so trades peak
// reduction for EVM; 1.0 cancels the peak fully.
//
// Interface: valid/ready stream with one register stage, in_ready =
// out_ready | ~out_valid. The sample travels along unchanged. The original work
// only names this block and the EVM limit it serves; the weighting is this
// design's choice.
module inband_proc
  import cfr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [SAMPLE_W-1:0]        weight,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  iq_t                        in_data,
  input  logic signed [SAMPLE_W+1:0] in_err_i,
  input  logic signed [SAMPLE_W+1:0] in_err_q,
  output logic                       out_valid,
  input  logic                       out_ready,
  output iq_t                        out_data,
  output logic signed [SAMPLE_W+1:0] out_err_i,
  output logic signed [SAMPLE_W+1:0] out_err_q
);
  logic en;
  logic signed [2*SAMPLE_W+2:0] pi_w, pq_w;

  assign en       = out_ready | ~out_valid;
  assign in_ready = en;

  assign pi_w = in_err_i * $signed({1'b0, weight});
  assign pq_w = in_err_q * $signed({1'b0, weight});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_err_i <= '0;
      out_err_q <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_data  <= in_data;
      out_err_i <= (SAMPLE_W+2)'(pi_w >>> 15);
      out_err_q <= (SAMPLE_W+2)'(pq_w >>> 15);
    end
  end

endmodule
