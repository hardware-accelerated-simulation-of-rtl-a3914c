// shared_regs: the shared registers through which the host configures the
// hardware model between runs and reads its status, so a loaded model can be
// re-run with new parameters without reloading it.
//
// Register map (word addresses, 32-bit data):
//   0x00 START         bit 0: 1 = run (the model reads its input FIFO)
//   0x01 MODEL         0 DUC+CFR, 1 DUC only, 2 CFR only, 3 loopback
//   0x02 NUM_CARRIERS  carriers in the input stream, 1..MAX_CARRIERS
//   0x03 THRESHOLD     clipping magnitude, unsigned Q1.15
//   0x04 WEIGHT        in-band error weight, unsigned Q1.15 (0x8000 = 1.0)
//   0x05 PEAKS         read only: peaks clipped since the last start
//   0x06 OUT_SAMPLES   read only: samples written to the output FIFO
//   0x08 + c           FREQ[c], NCO phase step of carrier c per output sample
//   0x10 + k           TAP[k], cancellation pulse tap k, signed Q2.14
// Unused addresses read as zero; writes to them and to read-only registers
// are ignored.
//
// Interface: `we` writes `wdata` to `addr` at the clock edge; `rdata` shows
// the register at `addr` combinationally. `cfg` holds all settings. The reset
// values (2 carriers at -1/16 and +1/16 of the output rate, threshold 0.5,
// weight 1.0, raised-cosine pulse) are this design's; the original work names the
// kind of settings (clipping threshold, allowable EVM, number of carriers)
// and the Start register.
module shared_regs
  import cfr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [5:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [31:0] stat_peaks,
  input  logic [31:0] stat_out_samples,
  output cfg_t        cfg
);
  localparam logic [5:0] A_START   = 6'h00;
  localparam logic [5:0] A_MODEL   = 6'h01;
  localparam logic [5:0] A_NCARR   = 6'h02;
  localparam logic [5:0] A_THRESH  = 6'h03;
  localparam logic [5:0] A_WEIGHT  = 6'h04;
  localparam logic [5:0] A_PEAKS   = 6'h05;
  localparam logic [5:0] A_OUTCNT  = 6'h06;
  localparam logic [5:0] A_FREQ    = 6'h08;
  localparam logic [5:0] A_TAP     = 6'h10;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.start        <= 1'b0;
      cfg.model        <= MODEL_DUC_CFR;
      cfg.num_carriers <= 2'(MAX_CARRIERS);
      cfg.threshold    <= 16'h4000;
      cfg.weight       <= 16'h8000;
      for (int c = 0; c < MAX_CARRIERS; c++)
        cfg.freq[c] <= (c % 2 == 0) ? 32'hF000_0000 : 32'h1000_0000;
      cfg.taps         <= DEFAULT_TAPS;
    end else if (we) begin
      unique case (addr)
        A_START:  cfg.start        <= wdata[0];
        A_MODEL:  cfg.model        <= model_e'(wdata[1:0]);
        A_NCARR:  cfg.num_carriers <= wdata[1:0];
        A_THRESH: cfg.threshold    <= wdata[SAMPLE_W-1:0];
        A_WEIGHT: cfg.weight       <= wdata[SAMPLE_W-1:0];
        default: begin
          for (int c = 0; c < MAX_CARRIERS; c++)
            if (addr == A_FREQ + 6'(c)) cfg.freq[c] <= wdata;
          for (int k = 0; k < MAX_TAPS; k++)
            if (addr == A_TAP + 6'(k)) cfg.taps[k] <= wdata[COEF_W-1:0];
        end
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    case (addr)
      A_START:  rdata = 32'(cfg.start);
      A_MODEL:  rdata = 32'(cfg.model);
      A_NCARR:  rdata = 32'(cfg.num_carriers);
      A_THRESH: rdata = 32'(cfg.threshold);
      A_WEIGHT: rdata = 32'(cfg.weight);
      A_PEAKS:  rdata = stat_peaks;
      A_OUTCNT: rdata = stat_out_samples;
      default: begin
        for (int c = 0; c < MAX_CARRIERS; c++)
          if (addr == A_FREQ + 6'(c)) rdata = cfg.freq[c];
        for (int k = 0; k < MAX_TAPS; k++)
          if (addr == A_TAP + 6'(k)) rdata = 32'($signed(cfg.taps[k]));
      end
    endcase
  end

endmodule
