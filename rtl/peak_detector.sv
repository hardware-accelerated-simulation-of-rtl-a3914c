// peak_detector: first stage of the crest factor reduction chain. It finds
// the peaks of the signal envelope that exceed the clipping threshold and
// hands every sample on with its angle and a peak flag; the clipper needs the
// angle to place the clipped value.
//
// A vectoring CORDIC measures magnitude and angle of each sample. A sample is
// flagged as a peak when its magnitude is above the threshold and it is a
// local maximum of the envelope: not smaller than the sample before it and
// larger than the sample after it. Flagging only the top of each excursion,
// rather than every sample above the threshold, lets one cancellation pulse
// per excursion do the work downstream; flagging every sample would stack a
// pulse on each and over-cancel. Because the test needs the next sample, a
// sample is handed on when its successor arrives: the stream is delayed by
// one sample (the first output after reset or `clr` is a zero sample), and
// one output still leaves per input.
//
// The CORDIC magnitude carries the gain K, so the threshold is scaled by K
// (Q2.14 constant) instead of un-scaling every magnitude.
//
// Interface: valid/ready stream in and out, throughput one sample per clock.
// The CORDIC (CORDIC_ITER+1 stages) and the one-sample window move only when
// the output is free or being taken: in_ready = out_ready | ~out_valid; the
// first output appears CORDIC_ITER+2 clocks after the first input. `clr`
// empties the window between runs (no input is taken while it is high).
// The original work names the block and its job (detect peaks above an
// acceptable level); the CORDIC, the local-maximum rule and the threshold
// format are this design's.
module peak_detector
  import cfr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic [SAMPLE_W-1:0] threshold,   // clipping magnitude, Q1.15
  input  logic                in_valid,
  output logic                in_ready,
  input  iq_t                 in_data,
  output logic                out_valid,
  input  logic                out_ready,
  output iq_t                 out_data,    // the sample, unchanged
  output ang_t                out_ang,     // its angle
  output logic                out_peak     // peak above the threshold
);
  logic                 en;
  logic                 c_valid;
  logic [SAMPLE_W+1:0]  c_mag;
  ang_t                 c_ang;
  iq_t                  c_data;
  logic [SAMPLE_W+15:0] thr_k_full;
  logic [SAMPLE_W+1:0]  thr_k;

  // window: the sample waiting for its successor, and its predecessor's magnitude
  iq_t                  cur_data;
  ang_t                 cur_ang;
  logic [SAMPLE_W+1:0]  cur_mag, prev_mag;

  assign en       = out_ready | ~out_valid;
  assign in_ready = en & ~clr;

  // threshold * K, both unsigned; K in Q2.14.
  assign thr_k_full = threshold * CORDIC_K_Q14;
  assign thr_k      = thr_k_full[SAMPLE_W+15:14];

  cordic_vec #(.SIDE_W($bits(iq_t))) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .in_valid (in_valid & ~clr),
    .x_in     (in_data.i),
    .y_in     (in_data.q),
    .side_in  (in_data),
    .out_valid(c_valid),
    .mag      (c_mag),
    .ang      (c_ang),
    .side_out (c_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_ang   <= '0;
      out_peak  <= 1'b0;
      cur_data  <= '0;
      cur_ang   <= '0;
      cur_mag   <= '0;
      prev_mag  <= '0;
    end else if (clr) begin
      cur_data <= '0;
      cur_ang  <= '0;
      cur_mag  <= '0;
      prev_mag <= '0;
      if (out_ready) out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= c_valid;
      if (c_valid) begin
        out_data <= cur_data;
        out_ang  <= cur_ang;
        out_peak <= (cur_mag > thr_k) && (cur_mag >= prev_mag) && (cur_mag > c_mag);
        prev_mag <= cur_mag;
        cur_data <= c_data;
        cur_ang  <= c_ang;
        cur_mag  <= c_mag;
      end
    end
  end

endmodule
