// clipper: second stage of the crest factor reduction chain. For a sample
// flagged as a peak it builds the clipped sample, the threshold magnitude at
// the sample's own angle, and outputs the clipping error
//     err = clipped - sample      (zero for samples that are not peaks),
// together with the unchanged sample. Working on the error instead of the
// clipped signal lets the following stages weight and filter only what the
// clipping added.
//
// The clipped value comes from a rotation-mode CORDIC that turns the vector
// (threshold/K, 0) by the peak's angle; threshold/K uses the Q0.16 constant
// 1/K so that the CORDIC gain cancels. The rotation runs with F = 4
// fractional bits and the clipped value is rounded to whole LSBs.
//
// Interface: valid/ready stream, CORDIC_ITER+1 stages, in_ready =
// out_ready | ~out_valid. The original work names the block (clipping of detected
// peaks); polar clipping with a CORDIC and the error form are this design's.
module clipper
  import cfr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] threshold,
  input  logic                in_valid,
  output logic                in_ready,
  input  iq_t                 in_data,
  input  ang_t                in_ang,
  input  logic                in_peak,
  output logic                out_valid,
  input  logic                out_ready,
  output iq_t                 out_data,     // the sample, unchanged
  output logic signed [SAMPLE_W+1:0] out_err_i,
  output logic signed [SAMPLE_W+1:0] out_err_q,
  output logic                out_peak
);
  localparam int unsigned F  = 4;               // fractional bits of the clipped value
  localparam int unsigned XW = SAMPLE_W + 3 + F;

  logic                 en;
  logic [SAMPLE_W+15:0] x0_full;
  logic signed [XW-1:0] x0;
  logic signed [XW-1:0] cx, cy;
  logic signed [XW-1:0] cxr, cyr;
  logic [$bits(iq_t):0] side_o;
  iq_t                  smp;
  logic                 pk;

  assign en       = out_ready | ~out_valid;
  assign in_ready = en;

  assign x0_full = threshold * CORDIC_INVK_Q16;
  assign x0      = XW'(x0_full[SAMPLE_W+15:16-F]);

  cordic_rot #(.SIDE_W($bits(iq_t) + 1), .XW(XW)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .in_valid (in_valid),
    .x_in     (x0),
    .y_in     ('0),
    .ang_in   (in_ang),
    .side_in  ({in_peak, in_data}),
    .out_valid(out_valid),
    .x_out    (cx),
    .y_out    (cy),
    .side_out (side_o)
  );

  assign smp      = side_o[$bits(iq_t)-1:0];
  assign pk       = side_o[$bits(iq_t)];
  assign out_data = smp;
  assign out_peak = pk;

  // Round the clipped value to whole LSBs.
  assign cxr = (cx + XW'(1 << (F-1))) >>> F;
  assign cyr = (cy + XW'(1 << (F-1))) >>> F;

  always_comb begin
    if (pk) begin
      out_err_i = (SAMPLE_W+2)'(cxr - XW'(smp.i));
      out_err_q = (SAMPLE_W+2)'(cyr - XW'(smp.q));
    end else begin
      out_err_i = '0;
      out_err_q = '0;
    end
  end

endmodule
