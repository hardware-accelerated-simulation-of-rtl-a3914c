// cfr: crest factor reduction of a complex sample stream. Four stages in a
// row: the peak detector flags samples whose magnitude exceeds the clipping
// threshold, the clipper forms the error between the clipped and the original
// sample, the in-band stage weights that error to bound the added EVM, and
// the out-of-band stage shapes it with a cancellation pulse and adds it to
// the delayed signal. The result is the input with its peaks pulled down to
// about the threshold and little energy spilled outside the band.
//
// Interface: valid/ready stream in and out, one sample per clock when the
// output is free. The first output leaves 2*(CORDIC_ITER+1) + 3 clocks after
// the first input. The stream is delayed by 1 + HALF samples, HALF =
// (MAX_TAPS-1)/2: one in the peak detector's local-maximum window and HALF
// in the cancellation filter (one output per input). `clr` empties both
// between runs. `peak_evt` pulses once for every sample the
// clipper hands on as a peak. The order of the four stages follows the
// original work; what happens inside each is described in its own file.
module cfr
  import cfr_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clr,      // empty the filter between runs
  input  logic [SAMPLE_W-1:0]             threshold,
  input  logic [SAMPLE_W-1:0]             weight,
  input  logic [MAX_TAPS-1:0][COEF_W-1:0] taps,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  iq_t                             in_data,
  output logic                            out_valid,
  input  logic                            out_ready,
  output iq_t                             out_data,
  output logic                            peak_evt
);
  // peak detector -> clipper
  logic pd_valid, pd_ready, pd_peak;
  iq_t  pd_data;
  ang_t pd_ang;
  // clipper -> in-band
  logic cl_valid, cl_ready, cl_peak;
  iq_t  cl_data;
  logic signed [SAMPLE_W+1:0] cl_ei, cl_eq;
  // in-band -> out-of-band
  logic ib_valid, ib_ready;
  iq_t  ib_data;
  logic signed [SAMPLE_W+1:0] ib_ei, ib_eq;

  peak_detector u_peak (
    .clk, .rst_n, .clr, .threshold,
    .in_valid, .in_ready, .in_data,
    .out_valid(pd_valid), .out_ready(pd_ready), .out_data(pd_data),
    .out_ang(pd_ang), .out_peak(pd_peak)
  );

  clipper u_clip (
    .clk, .rst_n, .threshold,
    .in_valid(pd_valid), .in_ready(pd_ready), .in_data(pd_data),
    .in_ang(pd_ang), .in_peak(pd_peak),
    .out_valid(cl_valid), .out_ready(cl_ready), .out_data(cl_data),
    .out_err_i(cl_ei), .out_err_q(cl_eq), .out_peak(cl_peak)
  );

  inband_proc u_inband (
    .clk, .rst_n, .weight,
    .in_valid(cl_valid), .in_ready(cl_ready), .in_data(cl_data),
    .in_err_i(cl_ei), .in_err_q(cl_eq),
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data),
    .out_err_i(ib_ei), .out_err_q(ib_eq)
  );

  outband_proc u_outband (
    .clk, .rst_n, .clr, .taps,
    .in_valid(ib_valid), .in_ready(ib_ready), .in_data(ib_data),
    .in_err_i(ib_ei), .in_err_q(ib_eq),
    .out_valid, .out_ready, .out_data
  );

  assign peak_evt = cl_valid & cl_ready & cl_peak;

endmodule
