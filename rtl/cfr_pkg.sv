// cfr_pkg: types and constants shared by the crest factor reduction (CFR)
// accelerator. Samples are complex baseband or IF values, I and Q each a
// signed two's-complement fraction of SAMPLE_W bits (Q1.15 by default). The
// sample width, the angle format and the CORDIC constants are this design's
// choices; the original work gives no word lengths.
package cfr_pkg;

  // Width of one I or Q component.
  localparam int unsigned SAMPLE_W = 16;
  // Binary angle: 2**ANGLE_W units per full turn.
  localparam int unsigned ANGLE_W = 16;
  // CORDIC iterations (one pipeline stage each).
  localparam int unsigned CORDIC_ITER = 16;
  // Maximum number of carriers the up-converter can sum.
  localparam int unsigned MAX_CARRIERS = 2;
  // Taps of the out-of-band cancellation filter.
  localparam int unsigned MAX_TAPS = 15;
  // Coefficient format of the cancellation filter: signed Q2.14.
  localparam int unsigned COEF_W = 16;
  localparam int unsigned COEF_FRAC = 14;

  typedef logic signed [SAMPLE_W-1:0] smp_t;
  typedef logic [ANGLE_W-1:0]          ang_t;
  typedef logic signed [COEF_W-1:0]    coef_t;

  typedef struct packed {
    smp_t i;
    smp_t q;
  } iq_t;

  // Model selected by the host: which hardware model the accelerator runs.
  typedef enum logic [1:0] {
    MODEL_DUC_CFR  = 2'd0,
    MODEL_DUC      = 2'd1,
    MODEL_CFR      = 2'd2,
    MODEL_LOOPBACK = 2'd3
  } model_e;

  // Run-time configuration held in the shared registers.
  typedef struct packed {
    logic                              start;
    model_e                            model;
    logic [1:0]                        num_carriers;  // 1..MAX_CARRIERS
    logic [SAMPLE_W-1:0]               threshold;     // clipping magnitude, Q1.15
    logic [SAMPLE_W-1:0]               weight;        // in-band error weight, unsigned Q1.15
    logic [MAX_CARRIERS-1:0][31:0]     freq;          // NCO phase step per output sample
    logic [MAX_TAPS-1:0][COEF_W-1:0]   taps;          // cancellation pulse, Q2.14
  } cfg_t;

  // CORDIC gain K = prod sqrt(1 + 2**-2i), i = 0..15: 1.6467602...
  localparam logic [15:0] CORDIC_K_Q14    = 16'd26981;  // round(K * 2**14)
  localparam logic [15:0] CORDIC_INVK_Q16 = 16'd39797;  // round(2**16 / K)

  // Inside the CORDICs angles carry ANGLE_GUARD extra bits so that the
  // rounding of the table entries does not add up.
  localparam int unsigned ANGLE_GUARD = 4;
  localparam int unsigned ZW          = ANGLE_W + ANGLE_GUARD;

  // atan(2**-i) as a binary angle of ZW bits:
  // round(atan(2**-i) / (2*pi) * 2**20), i = 0..15.
  localparam logic [ZW-1:0] ATAN_TABLE [CORDIC_ITER] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213,
    20'd2607,   20'd1304,  20'd652,   20'd326,   20'd163,   20'd81,
    20'd41,     20'd20,    20'd10,    20'd5
  };

  // Default cancellation pulse: raised-cosine (Hann) window,
  // taps[k] = round(sin^2(pi*(k+1)/16) * 2**14), k = 0..14, centre tap 1.0.
  localparam logic [MAX_TAPS-1:0][COEF_W-1:0] DEFAULT_TAPS = {
    16'd624,   16'd2399,  16'd5057,  16'd8192,  16'd11327,
    16'd13985, 16'd15760, 16'd16384, 16'd15760, 16'd13985,
    16'd11327, 16'd8192,  16'd5057,  16'd2399,  16'd624
  };

  // Saturate a wide signed value to one sample.
  function automatic smp_t sat_smp(input logic signed [SAMPLE_W+15:0] v);
    localparam logic signed [SAMPLE_W+15:0] MAXV = (1 <<< (SAMPLE_W-1)) - 1;
    localparam logic signed [SAMPLE_W+15:0] MINV = -(1 <<< (SAMPLE_W-1));
    if (v > MAXV)      return smp_t'(MAXV);
    else if (v < MINV) return smp_t'(MINV);
    else               return smp_t'(v);
  endfunction

endpackage
