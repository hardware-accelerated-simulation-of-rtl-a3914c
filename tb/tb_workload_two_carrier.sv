// tb_workload_two_carrier: the two-carrier DUC+CFR workload on the top at its default
// sizes. Two band-limited QPSK-like carriers (4096 frames, 32768 output samples,
// a full input FIFO) are up-converted, measured, then clipped 4 dB above their
// RMS level with full and with half error weight. Reports the peak-to-average
// power ratio (PAPR) before and after, the EVM added by the CFR, and how
// closely the hardware follows the floating-point reference, and checks that
// the CFR lowers the PAPR and that the weight trades PAPR against EVM.
//
// A host model drives the top through its plain ports as the host software
// would: it stops the model (START = 0), selects MODEL, streams the input
// words into the input FIFO, sets START and drains the output FIFO, while
// throttling its own reads now and then. Outputs are compared with the
// floating-point reference models of tb_ref_pkg:
//   loopback  exact copy                 (the interface throughput model)
//   CFR       ref_cfr,           32 LSB
//   DUC       ref_duc,            6 LSB
//   DUC+CFR   ref_cfr(ref_duc),  40 LSB
// Checked as well: the OUT_SAMPLES and PEAKS status registers, that nothing
// leaves while START is low, and that each mechanism occurred: every model
// run (model switch), peaks clipped, the input FIFO full (host held off) and
// the output FIFO full (model stalled).
module tb_workload_two_carrier;
  import cfr_pkg::*;
  localparam int DEPTH  = 8192;
  localparam int LOG2L  = 3;
  localparam int NLOOP  = 0;   // loopback words
  localparam int NCFR   = 0;   // CFR samples
  localparam int NDUC   = 0;   // DUC frames (2 carriers)
  localparam int NDC    = 4096;   // DUC+CFR frames (2 carriers)
  localparam int CW     = $clog2(DEPTH + 1);

  logic        clk = 0, rst_n = 0;
  logic        reg_we = 0;
  logic [5:0]  reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic        in_we = 0, in_rfd;
  logic [31:0] in_data = 0;
  logic [CW-1:0] in_count, out_count;
  logic        out_re = 0, out_nd, out_empty;
  logic [31:0] out_data;

  int checks = 0, failures = 0;
  int n_in_full = 0, n_out_full = 0, n_models = 0, n_peaks_total = 0, n_gated = 0;
  int wi[$], wq[$];          // words to send
  int ei[$], eq[$];          // expected outputs
  int ci[$], cq[$];          // captured outputs
  bit amb[$];                // outputs not compared (see tb_ref_pkg::ref_cfr)
  int n_amb = 0;
  int got = 0, tol = 0;
  bit reading = 0;

  cfr_accel_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic reg_wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic reg_rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1;
    d = reg_rdata;
  endtask

  // output FIFO full: the model is held off
  always @(posedge clk) if (rst_n && out_count == CW'(DEPTH)) n_out_full++;

  // host reader
  always @(posedge clk) if (reading && out_nd) begin
    smp_t oi, oq;
    oi = smp_t'(out_data[31:16]);
    oq = smp_t'(out_data[15:0]);
    if (got < amb.size() && amb[got]) n_amb++;
    else if (got < ei.size())
      check(tb_ref_pkg::rabs(real'(int'(oi) - ei[got])) <= real'(tol) &&
            tb_ref_pkg::rabs(real'(int'(oq) - eq[got])) <= real'(tol),
            $sformatf("out %0d: (%0d,%0d) vs (%0d,%0d)", got, oi, oq, ei[got], eq[got]));
    ci.push_back(int'(oi));
    cq.push_back(int'(oq));
    got++;
  end

  task automatic host_read(input int n);
    int pause;
    pause = 0;
    while (got < n) begin
      @(negedge clk);
      if (pause > 0) begin
        pause--;
        out_re = 0;
      end else begin
        // now and then stop reading long enough for the output FIFO to fill
        if ($urandom_range(0, 8 * DEPTH - 1) == 0) pause = 2 * DEPTH + 100;
        out_re = !out_empty && ($urandom_range(0, 7) != 0);
      end
    end
    out_re = 0;
  endtask

  task automatic host_write(input int first, input int last);
    for (int k = first; k < last; k++) begin
      @(negedge clk);
      in_we = 0;
      while (!in_rfd) begin
        n_in_full++;
        @(negedge clk);
      end
      in_we   = 1;
      in_data = {16'(wi[k]), 16'(wq[k])};
    end
    @(negedge clk);
    in_we = 0;
  endtask

  task automatic run_model(input string name, input model_e m, input int t, input int ref_peaks);
    logic [31:0] v;
    int pre;
    reg_wr(6'h00, 0);
    reg_wr(6'h01, 32'(m));
    got = 0;
    n_amb = 0;
    ci = {};
    cq = {};
    tol = t;
    reading = 1;
    // words written while START is low must stay in the input FIFO
    pre = (wi.size() < 8) ? wi.size() : 8;
    host_write(0, pre);
    repeat (50) @(negedge clk);
    check(in_count == CW'(pre) && out_empty, "nothing moves while START is low");
    n_gated++;
    reg_wr(6'h00, 1);
    fork
      host_write(pre, wi.size());
      host_read(ei.size());
    join
    repeat (100) @(negedge clk);
    check(got == ei.size(), $sformatf("%s: %0d outputs, expected %0d", name, got, ei.size()));
    check(out_empty, "no extra outputs");
    reg_rd(6'h06, v);
    check(v == 32'(ei.size()), "OUT_SAMPLES register");
    reg_rd(6'h05, v);
    $display("%s: %0d outputs, %0d peaks (reference %0d)", name, got, v, ref_peaks);
    check(int'(v) - ref_peaks <= 3 && ref_peaks - int'(v) <= 3, "PEAKS register");
    n_peaks_total += int'(v);
    reading = 0;
    n_models++;
  endtask

  // test signal: carriers of random baseband samples, occasional large ones
  task automatic make_baseband(input int n, input int amp, input int big);
    wi = {}; wq = {};
    for (int k = 0; k < n; k++) begin
      int a;
      a = ($urandom_range(0, 19) == 0) ? big : amp;
      wi.push_back($urandom_range(0, 2 * a) - a);
      wq.push_back($urandom_range(0, 2 * a) - a);
    end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Band-limited carrier: random QPSK values smoothed by a 7-tap Hann window
  // h[k] = sin^2(pi*(k+1)/8), normalised, so each carrier occupies roughly a
  // quarter of its baseband rate.
  task automatic make_carriers(input int nframes, input real amp);
    real h[7], hs;
    real si[2][$], sq[2][$];
    hs = 0.0;
    for (int k = 0; k < 7; k++) begin
      h[k] = $sin(tb_ref_pkg::PI * real'(k + 1) / 8.0) ** 2;
      hs += h[k];
    end
    for (int c = 0; c < 2; c++)
      for (int n = 0; n < nframes + 7; n++) begin
        si[c].push_back($urandom_range(0, 1) ? 1.0 : -1.0);
        sq[c].push_back($urandom_range(0, 1) ? 1.0 : -1.0);
      end
    wi = {}; wq = {};
    for (int n = 0; n < nframes; n++)
      for (int c = 0; c < 2; c++) begin
        real ai, aq;
        ai = 0.0; aq = 0.0;
        for (int k = 0; k < 7; k++) begin
          ai += h[k] * si[c][n + k];
          aq += h[k] * sq[c][n + k];
        end
        wi.push_back(tb_ref_pkg::sat16(amp * ai / hs));
        wq.push_back(tb_ref_pkg::sat16(amp * aq / hs));
      end
  endtask

  function automatic real papr_db(input int xi[$], input int xq[$], input int from);
    real p, pk;
    p = 0.0; pk = 0.0;
    for (int n = from; n < xi.size(); n++) begin
      real e;
      e = real'(xi[n]) ** 2 + real'(xq[n]) ** 2;
      p += e;
      if (e > pk) pk = e;
    end
    p = p / real'(xi.size() - from);
    return 10.0 * $log10(pk / p);
  endfunction

  // EVM of the CFR output y against its input x (y is x delayed by 8).
  function automatic real evm_pct(input int xi[$], input int xq[$], input int yi[$], input int yq[$]);
    real ne, ns;
    ne = 0.0; ns = 0.0;
    for (int n = 0; n + 8 < yi.size(); n++) begin
      ne += real'(yi[n+8] - xi[n]) ** 2 + real'(yq[n+8] - xq[n]) ** 2;
      ns += real'(xi[n]) ** 2 + real'(xq[n]) ** 2;
    end
    return 100.0 * $sqrt(ne / ns);
  endfunction

  // Agreement of the hardware output with the reference, as fractions of full
  // scale, over all outputs; outputs near ties between neighbouring peaks are
  // not held to the bound.
  task automatic compare_stats(input string name);
    real se, mx, n3, n2;
    int  bad;
    se = 0.0; mx = 0.0; n3 = 0.0; n2 = 0.0; bad = 0;
    for (int n = 0; n < ci.size(); n++) begin
      real d;
      d = $sqrt(real'(ci[n] - ei[n]) ** 2 + real'(cq[n] - eq[n]) ** 2) / 32768.0;
      se += d * d;
      if (d > mx) mx = d;
      if (d < 1.0e-3) n3 += 1.0;
      if (d < 1.0e-2) n2 += 1.0;
      else if (!amb[n]) bad++;
    end
    $display("%s: %0d of %0d outputs near ties not checked", name, n_amb, ci.size());
    $display("%s vs reference, all outputs: rms %.2e, peak %.2e of full scale; %.1f%% below 1e-3, %.1f%% below 1e-2",
             name, $sqrt(se / real'(ci.size())), mx, 100.0 * n3 / real'(ci.size()),
             100.0 * n2 / real'(ci.size()));
    check(bad == 0, "every checked sample within 1e-2 of full scale");
    check(n_amb < ci.size() / 10, "few ties");
  endtask

  initial begin
    int taps[15], xi[$], xq[$], np, thr;
    int unsigned f[2];
    real rms, p_in, p_full, p_half, evm_full, evm_half;
    tb_ref_pkg::default_taps(taps);
    f[0] = 32'hF000_0000;
    f[1] = 32'h1000_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. up-convert the two carriers alone to measure the signal
    make_carriers(NDC, 7000.0);
    tb_ref_pkg::ref_duc(wi, wq, 2, f, LOG2L, ei, eq);
    amb = {};
    run_model("DUC", MODEL_DUC, 6, 0);
    xi = ci; xq = cq;
    rms = 0.0;
    for (int n = 0; n < xi.size(); n++) rms += real'(xi[n]) ** 2 + real'(xq[n]) ** 2;
    rms = $sqrt(rms / real'(xi.size()));
    p_in = papr_db(xi, xq, 0);
    // clip 4 dB above the RMS level
    thr = $rtoi(rms * 1.585);
    reg_wr(6'h03, 32'(thr));

    // 2. DUC+CFR with full cancellation (WEIGHT = 1.0)
    tb_ref_pkg::ref_cfr(xi, xq, thr, 32768, taps, ei, eq, np, amb);
    run_model("DUC+CFR, weight 1.0", MODEL_DUC_CFR, 40, np);
    compare_stats("weight 1.0");
    p_full   = papr_db(ci, cq, 8);
    evm_full = evm_pct(xi, xq, ci, cq);

    // 3. DUC+CFR with half cancellation (WEIGHT = 0.5)
    reg_wr(6'h04, 32'h4000);
    tb_ref_pkg::ref_cfr(xi, xq, thr, 16384, taps, ei, eq, np, amb);
    run_model("DUC+CFR, weight 0.5", MODEL_DUC_CFR, 40, np);
    compare_stats("weight 0.5");
    p_half   = papr_db(ci, cq, 8);
    evm_half = evm_pct(xi, xq, ci, cq);

    $display("RMS %.0f LSB, threshold %0d; PAPR in %.2f dB, out %.2f dB (weight 1.0), %.2f dB (weight 0.5)",
             rms, thr, p_in, p_full, p_half);
    $display("EVM %.2f%% (weight 1.0), %.2f%% (weight 0.5)", evm_full, evm_half);
    check(p_full < p_in - 1.5, "CFR lowers the peak-to-average ratio");
    check(p_half < p_in && p_half > p_full, "half weight: less peak reduction");
    check(evm_half < evm_full, "half weight: lower EVM");
    check(evm_full < 15.0, "EVM bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
