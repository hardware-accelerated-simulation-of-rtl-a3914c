// duc: digital up-converter for up to MAX_CARRIERS carriers. The input stream
// holds the carriers' baseband samples interleaved (carrier 0, carrier 1,
// ..., one frame per baseband instant, `num_carriers` words a frame). Each
// carrier is
//   1. interpolated by INTERP = 2**LOG2_INTERP with a linear interpolator:
//        u[n*INTERP + m] = b[n-1] + ((b[n] - b[n-1]) * m) >>> LOG2_INTERP,
//      m = 0 .. INTERP-1 (the first frame ramps up from zero);
//   2. shifted to its carrier frequency by a numerically controlled
//      oscillator: a 32-bit phase accumulator stepping by freq[c] per output
//      sample, whose top ANGLE_W bits drive a rotation-mode CORDIC; the sample
//      is pre-scaled by 1/K so the rotation has unit gain;
//   3. summed with the other active carriers, saturating to SAMPLE_W bits.
// Every frame in yields INTERP samples out.
//
// Interface: valid/ready streams. A frame register accepts input words while
// it is not full; the interpolator takes a frame when it starts a new segment.
// The rotation pipeline (CORDIC_ITER+1 stages) stalls as a whole when the
// output is not taken. `clr` returns the frame register, interpolator and
// oscillator phases to their reset state (used between runs).
//
// The original work states only that the DUC up-samples the carriers ahead of the
// CFR; the interpolation factor, the interpolator and the oscillator are this
// design's choices.
module duc
  import cfr_pkg::*;
#(
  parameter int unsigned LOG2_INTERP = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic [1:0]                    num_carriers,  // 1 .. MAX_CARRIERS
  input  logic [MAX_CARRIERS-1:0][31:0] freq,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  iq_t                           in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output iq_t                           out_data
);
  localparam int unsigned INTERP = 1 << LOG2_INTERP;
  localparam int unsigned XW     = SAMPLE_W + 3;
  localparam int unsigned CW     = (MAX_CARRIERS > 1) ? $clog2(MAX_CARRIERS) : 1;

  logic en;

  // ---------------- frame register ----------------
  iq_t                 frame   [MAX_CARRIERS];
  logic [CW-1:0]       idx;
  logic                frame_full;
  logic                frame_take;   // interpolator takes the frame
  logic [CW-1:0]       last_idx;

  always_comb begin
    if (num_carriers == 2'd0)                      last_idx = '0;
    else if (32'(num_carriers) > MAX_CARRIERS)     last_idx = CW'(MAX_CARRIERS - 1);
    else                                           last_idx = CW'(num_carriers - 2'd1);
  end

  assign in_ready = ~frame_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      frame_full <= 1'b0;
      for (int c = 0; c < MAX_CARRIERS; c++) frame[c] <= '0;
    end else if (clr) begin
      idx        <= '0;
      frame_full <= 1'b0;
      for (int c = 0; c < MAX_CARRIERS; c++) frame[c] <= '0;
    end else begin
      if (frame_take) frame_full <= 1'b0;
      if (in_valid && in_ready) begin
        frame[idx] <= in_data;
        if (idx == last_idx) begin
          idx        <= '0;
          frame_full <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  // ---------------- interpolator and oscillators ----------------
  iq_t                 prv [MAX_CARRIERS];
  iq_t                 cur [MAX_CARRIERS];
  logic [LOG2_INTERP-1:0] m;
  logic                seg_v;
  logic [31:0]         phase [MAX_CARRIERS];
  logic                emit;

  assign emit       = en & seg_v;
  // A frame is loaded when the segment ends (or none is running).
  assign frame_take = frame_full & ((emit & (m == LOG2_INTERP'(INTERP-1))) | ~seg_v);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m     <= '0;
      seg_v <= 1'b0;
      for (int c = 0; c < MAX_CARRIERS; c++) begin
        prv[c]   <= '0;
        cur[c]   <= '0;
        phase[c] <= '0;
      end
    end else if (clr) begin
      m     <= '0;
      seg_v <= 1'b0;
      for (int c = 0; c < MAX_CARRIERS; c++) begin
        prv[c]   <= '0;
        cur[c]   <= '0;
        phase[c] <= '0;
      end
    end else begin
      if (emit) begin
        m <= m + 1'b1;
        for (int c = 0; c < MAX_CARRIERS; c++) phase[c] <= phase[c] + freq[c];
        if (m == LOG2_INTERP'(INTERP-1)) seg_v <= frame_take;
      end else if (frame_take) begin
        seg_v <= 1'b1;
      end
      if (frame_take) begin
        m <= '0;
        for (int c = 0; c < MAX_CARRIERS; c++) begin
          prv[c] <= cur[c];
          cur[c] <= (CW'(c) <= last_idx) ? frame[c] : '0;
        end
      end
    end
  end

  // ---------------- rotation to the carrier frequency ----------------
  logic [MAX_CARRIERS-1:0] rv;
  logic signed [XW-1:0]    rx [MAX_CARRIERS];
  logic signed [XW-1:0]    ry [MAX_CARRIERS];

  for (genvar c = 0; c < MAX_CARRIERS; c++) begin : g_lane
    logic signed [SAMPLE_W+LOG2_INTERP+1:0] di, dq;
    logic signed [SAMPLE_W+1:0]             ui, uq;
    logic signed [SAMPLE_W+17:0]            si, sq;
    logic signed [XW-1:0]                   xi, xq;

    always_comb begin
      di = (SAMPLE_W+LOG2_INTERP+2)'(cur[c].i - prv[c].i) * $signed({1'b0, m});
      dq = (SAMPLE_W+LOG2_INTERP+2)'(cur[c].q - prv[c].q) * $signed({1'b0, m});
      ui = (SAMPLE_W+2)'(prv[c].i) + (SAMPLE_W+2)'(di >>> LOG2_INTERP);
      uq = (SAMPLE_W+2)'(prv[c].q) + (SAMPLE_W+2)'(dq >>> LOG2_INTERP);
      si = ui * $signed({1'b0, CORDIC_INVK_Q16});
      sq = uq * $signed({1'b0, CORDIC_INVK_Q16});
      xi = XW'(si >>> 16);
      xq = XW'(sq >>> 16);
    end

    cordic_rot #(.SIDE_W(1), .XW(XW)) u_rot (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .in_valid (seg_v),
      .x_in     (xi),
      .y_in     (xq),
      .ang_in   (phase[c][31 -: ANGLE_W]),
      .side_in  (1'b0),
      .out_valid(rv[c]),
      .x_out    (rx[c]),
      .y_out    (ry[c]),
      .side_out ()
    );
  end

  // ---------------- carrier sum ----------------
  logic signed [SAMPLE_W+15:0] sum_i, sum_q;
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int c = 0; c < MAX_CARRIERS; c++) begin
      sum_i += (SAMPLE_W+16)'(rx[c]);
      sum_q += (SAMPLE_W+16)'(ry[c]);
    end
  end

  assign out_valid  = rv[0];
  assign out_data.i = sat_smp(sum_i);
  assign out_data.q = sat_smp(sum_q);
  assign en         = out_ready | ~out_valid;

endmodule
