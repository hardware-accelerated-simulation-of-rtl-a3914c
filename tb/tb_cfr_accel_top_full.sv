// tb_cfr_accel_top_full: end-to-end test of the accelerator at its default sizes
// (8192-word FIFOs, interpolation by 8): all four models, the DUC+CFR run
// filling the input FIFO with 4096 two-carrier frames (32768 output samples).
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
module tb_cfr_accel_top_full;
  import cfr_pkg::*;
  localparam int DEPTH  = 8192;
  localparam int LOG2L  = 3;
  localparam int NLOOP  = 20000;   // loopback words
  localparam int NCFR   = 10000;   // CFR samples
  localparam int NDUC   = 1000;   // DUC frames (2 carriers)
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

  initial begin
    int taps[15], xi[$], xq[$], np;
    int unsigned f[2];
    tb_ref_pkg::default_taps(taps);
    f[0] = 32'hF000_0000;
    f[1] = 32'h1000_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. loopback
    make_baseband(NLOOP, 32767, 32767);
    ei = wi; eq = wq; amb = {};
    run_model("loopback", MODEL_LOOPBACK, 0, 0);

    // 2. CFR only, threshold 0.5 (reset value)
    make_baseband(NCFR, 12000, 28000);
    tb_ref_pkg::ref_cfr(wi, wq, 16384, 32768, taps, ei, eq, np, amb);
    run_model("CFR", MODEL_CFR, 32, np);

    // 3. DUC only, two carriers
    make_baseband(2 * NDUC, 9000, 9000);
    tb_ref_pkg::ref_duc(wi, wq, 2, f, LOG2L, ei, eq);
    amb = {};
    run_model("DUC", MODEL_DUC, 6, 0);

    // 4. DUC+CFR, the main model, threshold 0.4
    reg_wr(6'h03, 32'd13107);
    make_baseband(2 * NDC, 9000, 9000);
    tb_ref_pkg::ref_duc(wi, wq, 2, f, LOG2L, xi, xq);
    tb_ref_pkg::ref_cfr(xi, xq, 13107, 32768, taps, ei, eq, np, amb);
    run_model("DUC+CFR", MODEL_DUC_CFR, 40, np);

    $display("mechanisms: models %0d, start gating %0d, peaks %0d, input FIFO full %0d, output FIFO full %0d",
             n_models, n_gated, n_peaks_total, n_in_full, n_out_full);
    check(n_models == 4, "every model ran");
    check(n_gated > 0, "START gating");
    check(n_peaks_total > 0, "peaks clipped");
    check(n_in_full > 0, "input FIFO full");
    check(n_out_full > 0, "output FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
