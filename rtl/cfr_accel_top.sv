// cfr_accel_top: free-running hardware model of a base-station transmit path
// segment, digital up-conversion (DUC) followed by crest factor reduction
// (CFR), built to run simulations of the CFR algorithm on an FPGA in fixed
// point. The host converts its test signal to fixed point, streams it into
// the shared input FIFO, sets the shared registers, sets START, and drains
// the shared output FIFO; the hardware runs at its own pace, not in
// lock-step with the host.
//
//   host --> input FIFO --> fr_input_port --+--> duc --+--> cfr --+--> output FIFO --> host
//                                           |          |          |
//   MODEL selects the path:  0 DUC+CFR, 1 DUC only, 2 CFR only, 3 loopback
//
// Input and output words are {I, Q}, two signed Q1.15 halves (I in the upper
// half). In the DUC models the input words are the carriers' baseband samples,
// interleaved, NUM_CARRIERS words per baseband instant; every such frame
// yields 2**LOG2_INTERP output words. In the CFR model each input word yields
// one output word, delayed by 1 + (MAX_TAPS-1)/2 = 8 words (the first 8
// outputs carry no input sample of their own).
// The loopback model copies words through, the original work's interface
// throughput test.
//
// Host-side ports are plain: a register port (see shared_regs for the map),
// the input FIFO's write side and the output FIFO's read side. The JTAG or
// Ethernet link that would drive them is outside this design. MODEL may only
// be changed while START is low and the pipeline is empty. While START is
// low the DUC's interpolator and oscillators and the CFR's cancellation
// filter are held in their reset state,
// and the PEAKS and OUT_SAMPLES counters are cleared when START rises.
//
// The original work's models are separate FPGA configurations; putting them behind
// one MODEL register is this design's choice.
module cfr_accel_top
  import cfr_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 8192,
  parameter int unsigned LOG2_INTERP = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // shared registers
  input  logic                            reg_we,
  input  logic [5:0]                      reg_addr,
  input  logic [31:0]                     reg_wdata,
  output logic [31:0]                     reg_rdata,
  // input FIFO, host write side
  input  logic                            in_we,
  input  logic [31:0]                     in_data,
  output logic                            in_rfd,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] in_count,
  // output FIFO, host read side
  input  logic                            out_re,
  output logic [31:0]                     out_data,
  output logic                            out_nd,
  output logic                            out_empty,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] out_count
);
  cfg_t        cfg;
  logic [31:0] peaks, out_samples;
  logic        start_q;

  // ---------------- shared registers ----------------
  shared_regs u_regs (
    .clk, .rst_n,
    .we(reg_we), .addr(reg_addr), .wdata(reg_wdata), .rdata(reg_rdata),
    .stat_peaks(peaks), .stat_out_samples(out_samples),
    .cfg
  );

  // ---------------- input FIFO and its read control ----------------
  logic        ififo_re, ififo_en, ififo_nd, ififo_empty;
  logic [31:0] ififo_dout;
  logic        src_valid, src_ready;
  logic [31:0] src_word;
  iq_t         src;

  shared_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(32)) u_in_fifo (
    .clk, .rst_n,
    .we(in_we), .din(in_data), .rfd(in_rfd),
    .re(ififo_re), .en(ififo_en), .dout(ififo_dout), .nd(ififo_nd),
    .empty(ififo_empty), .count(in_count)
  );

  fr_input_port #(.WIDTH(32)) u_in_port (
    .clk, .rst_n,
    .start(32'(cfg.start)),
    .fifo_re(ififo_re), .fifo_en(ififo_en),
    .fifo_dout(ififo_dout), .fifo_nd(ififo_nd),
    .out_valid(src_valid), .out_ready(src_ready), .out_data(src_word)
  );
  assign src = iq_t'(src_word);

  // ---------------- datapath ----------------
  logic use_duc, use_cfr;
  assign use_duc = (cfg.model == MODEL_DUC_CFR) || (cfg.model == MODEL_DUC);
  assign use_cfr = (cfg.model == MODEL_DUC_CFR) || (cfg.model == MODEL_CFR);

  logic duc_in_valid, duc_in_ready, duc_out_valid, duc_out_ready;
  iq_t  duc_out;
  logic cfr_in_valid, cfr_in_ready, cfr_out_valid, cfr_out_ready, peak_evt;
  iq_t  cfr_in, cfr_out;
  logic snk_valid, snk_ready;
  iq_t  snk;

  assign duc_in_valid = src_valid & use_duc;

  duc #(.LOG2_INTERP(LOG2_INTERP)) u_duc (
    .clk, .rst_n,
    .clr(~cfg.start),
    .num_carriers(cfg.num_carriers), .freq(cfg.freq),
    .in_valid(duc_in_valid), .in_ready(duc_in_ready), .in_data(src),
    .out_valid(duc_out_valid), .out_ready(duc_out_ready), .out_data(duc_out)
  );

  assign cfr_in_valid = use_duc ? (duc_out_valid & use_cfr) : (src_valid & use_cfr);
  assign cfr_in       = use_duc ? duc_out : src;

  cfr u_cfr (
    .clk, .rst_n,
    .clr(~cfg.start),
    .threshold(cfg.threshold), .weight(cfg.weight), .taps(cfg.taps),
    .in_valid(cfr_in_valid), .in_ready(cfr_in_ready), .in_data(cfr_in),
    .out_valid(cfr_out_valid), .out_ready(cfr_out_ready), .out_data(cfr_out),
    .peak_evt
  );

  always_comb begin
    unique case (cfg.model)
      MODEL_DUC_CFR, MODEL_CFR: begin snk_valid = cfr_out_valid; snk = cfr_out; end
      MODEL_DUC:                begin snk_valid = duc_out_valid; snk = duc_out; end
      default:                  begin snk_valid = src_valid;     snk = src;     end
    endcase
  end

  assign cfr_out_ready = snk_ready & use_cfr;
  assign duc_out_ready = use_cfr ? cfr_in_ready : snk_ready;
  always_comb begin
    unique case (cfg.model)
      MODEL_DUC_CFR, MODEL_DUC: src_ready = duc_in_ready;
      MODEL_CFR:                src_ready = cfr_in_ready;
      default:                  src_ready = snk_ready;
    endcase
  end

  // ---------------- output FIFO ----------------
  logic ofifo_rfd, ofifo_we;
  assign ofifo_we  = snk_valid & ofifo_rfd;
  assign snk_ready = ofifo_rfd;

  shared_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(32)) u_out_fifo (
    .clk, .rst_n,
    .we(ofifo_we), .din(32'(snk)), .rfd(ofifo_rfd),
    .re(out_re), .en(1'b1), .dout(out_data), .nd(out_nd),
    .empty(out_empty), .count(out_count)
  );

  // ---------------- status counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q     <= 1'b0;
      peaks       <= '0;
      out_samples <= '0;
    end else begin
      start_q <= cfg.start;
      if (cfg.start && !start_q) begin
        peaks       <= '0;
        out_samples <= '0;
      end else begin
        if (peak_evt) peaks       <= peaks + 1'b1;
        if (ofifo_we) out_samples <= out_samples + 1'b1;
      end
    end
  end

endmodule
