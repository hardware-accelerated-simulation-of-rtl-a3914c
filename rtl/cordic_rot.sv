// cordic_rot: pipelined CORDIC in rotation mode. It rotates a vector (x, y)
// by a binary angle, one micro-rotation per stage: a pre-rotation by pi brings
// the angle into [-pi/2, pi/2), then CORDIC_ITER shift-and-add stages drive
// the residual angle to zero using cfr_pkg::ATAN_TABLE.
//
// The result is multiplied by the CORDIC gain K (about 1.6468); callers
// pre-scale the input by 1/K when they need unit gain. Inputs are XW-bit
// signed values so that a pre-scaled vector and the grown result both fit.
//
// Interface and timing as cordic_vec: CORDIC_ITER+1 cycles of latency, all
// stages advance while `en` is high, `side_in` travels with the sample.
// G = 4 fractional guard bits are kept inside and dropped at the output. Used
// both for clipping (placing the threshold magnitude at the peak's angle)
// and as the frequency shifter of the up-converter. Structure: textbook.
module cordic_rot
  import cfr_pkg::*;
#(
  parameter int unsigned SIDE_W = 1,
  parameter int unsigned XW     = SAMPLE_W + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  input  ang_t                 ang_in,
  input  logic [SIDE_W-1:0]    side_in,
  output logic                 out_valid,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic [SIDE_W-1:0]    side_out
);
  localparam int unsigned NS = CORDIC_ITER + 1;
  localparam int unsigned G  = 4;               // fractional guard bits
  localparam int unsigned IW = XW + G;

  logic signed [IW-1:0]      xs [NS];
  logic signed [IW-1:0]      ys [NS];
  logic signed [ZW-1:0]      zs [NS];
  logic                      vs [NS];
  logic [SIDE_W-1:0]         ss [NS];

  // Stage 0: angles in the left half turn are rotated by pi first.
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
      if (ang_in[ANGLE_W-1] ^ ang_in[ANGLE_W-2]) begin
        xs[0] <= -(IW'(x_in) <<< G);
        ys[0] <= -(IW'(y_in) <<< G);
        zs[0] <= $signed({~ang_in[ANGLE_W-1], ang_in[ANGLE_W-2:0], ANGLE_GUARD'(0)});
      end else begin
        xs[0] <= IW'(x_in) <<< G;
        ys[0] <= IW'(y_in) <<< G;
        zs[0] <= $signed({ang_in, ANGLE_GUARD'(0)});
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
        if (zs[s] >= 0) begin
          xs[s+1] <= xs[s] - (ys[s] >>> s);
          ys[s+1] <= ys[s] + (xs[s] >>> s);
          zs[s+1] <= zs[s] - $signed(ATAN_TABLE[s]);
        end else begin
          xs[s+1] <= xs[s] + (ys[s] >>> s);
          ys[s+1] <= ys[s] - (xs[s] >>> s);
          zs[s+1] <= zs[s] + $signed(ATAN_TABLE[s]);
        end
      end
    end
  end

  assign out_valid = vs[NS-1];
  assign x_out     = XW'(xs[NS-1] >>> G);
  assign y_out     = XW'(ys[NS-1] >>> G);
  assign side_out  = ss[NS-1];

endmodule
