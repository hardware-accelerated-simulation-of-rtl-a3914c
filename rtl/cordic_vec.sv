// cordic_vec: pipelined CORDIC in vectoring mode. It turns a complex sample
// (x, y) into its magnitude and its angle, one CORDIC micro-rotation per
// pipeline stage. A pre-rotation by pi folds the left half plane onto the
// right one, then CORDIC_ITER shift-and-add stages drive y to zero while the
// rotation angles, taken from cfr_pkg::ATAN_TABLE, are summed into the angle.
//
// The magnitude comes out multiplied by the CORDIC gain K (about 1.6468);
// the user compensates for it. The angle is a binary angle of ANGLE_W bits.
//
// Interface: one sample per cycle in, results CORDIC_ITER+1 cycles later. All
// stages move together while `en` is high (a stall freezes the pipeline), so
// the parent builds `en` from its output handshake. `side_in` is carried
// alongside each sample unchanged. Internally the datapath keeps G = 4
// fractional guard bits so that small vectors still get an accurate angle.
// The original work only names CORDIC as a
// signal processing primitive; the structure is the textbook one.
module cordic_vec
  import cfr_pkg::*;
#(
  parameter int unsigned SIDE_W = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        in_valid,
  input  smp_t                        x_in,
  input  smp_t                        y_in,
  input  logic [SIDE_W-1:0]           side_in,
  output logic                        out_valid,
  output logic [SAMPLE_W+1:0]         mag,      // unsigned, K * |x + jy|
  output ang_t                        ang,
  output logic [SIDE_W-1:0]           side_out
);
  localparam int unsigned G  = 4;               // fractional guard bits
  localparam int unsigned XW = SAMPLE_W + 3 + G;
  localparam int unsigned NS = CORDIC_ITER + 1;

  logic signed [XW-1:0] xs [NS];
  logic signed [XW-1:0] ys [NS];
  logic [ZW-1:0]        zs [NS];
  logic                 vs [NS];
  logic [SIDE_W-1:0]    ss [NS];

  // Stage 0: fold onto the right half plane.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      ss[0] <= '0;
    end else if (en) begin
      vs[0] <= in_valid;
      ss[0] <= side_in;
      if (x_in < 0) begin
        xs[0] <= -(XW'(x_in) <<< G);
        ys[0] <= -(XW'(y_in) <<< G);
        zs[0] <= ZW'(1) << (ZW-1);
      end else begin
        xs[0] <= XW'(x_in) <<< G;
        ys[0] <= XW'(y_in) <<< G;
        zs[0] <= '0;
      end
    end
  end

  for (genvar s = 0; s < CORDIC_ITER; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[s+1] <= 1'b0;
        xs[s+1] <= '0;
        ys[s+1] <= '0;
        zs[s+1] <= '0;
        ss[s+1] <= '0;
      end else if (en) begin
        vs[s+1] <= vs[s];
        ss[s+1] <= ss[s];
        if (ys[s] >= 0) begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + ATAN_TABLE[s];
        end else begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - ATAN_TABLE[s];
        end
      end
    end
  end

  assign out_valid = vs[NS-1];
  assign mag       = xs[NS-1][SAMPLE_W+1+G:G];
  // Round the angle to ANGLE_W bits.
  assign ang       = ang_t'((zs[NS-1] + ZW'(1 << (ANGLE_GUARD-1))) >> ANGLE_GUARD);
  assign side_out  = ss[NS-1];

endmodule
