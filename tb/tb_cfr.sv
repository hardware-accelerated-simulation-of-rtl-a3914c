// tb_cfr: crest factor reduction of a test stream with injected peaks,
// compared with the floating-point reference model (local-maximum peaks,
// exact polar clipping, weighting, pulse shaping) within 32 LSB per
// component. Outputs near two neighbouring samples of equal magnitude (within
// 4 LSB), where rounding decides which is the maximum, are not compared.
// Run 1: weight 1.0 and isolated peaks: every peak must come out at the
//        threshold magnitude (within 8 LSB), the first output must appear
//        2*(CORDIC_ITER+1)+3 clocks after the first input and the stream
//        must flow at one sample per clock; random back-pressure later.
// Run 2: after `clr` (no reset), weight 0.5, dense overlapping peaks,
//        random valid and ready.
// The number of peak events must match the reference within 3.
module tb_cfr;
  import cfr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 3000;

  logic        clk = 0, rst_n = 0, clr = 0;
  logic [15:0] threshold = 16'd16000, weight = 16'h8000;
  logic [MAX_TAPS-1:0][COEF_W-1:0] taps = DEFAULT_TAPS;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0, peak_evt;
  iq_t         in_data = '0, out_data;
  int checks = 0, failures = 0;
  int xi[$], xq[$], yi[$], yq[$], ref_peaks;
  bit is_peak[$], amb[$];
  int n_amb = 0;
  int sent = 0, got = 0, cyc = 0, first_in, first_out, burst_end, peaks = 0;
  bit run2 = 0, running = 0;

  cfr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n && running) begin
    cyc++;
    if (peak_evt) peaks++;
    if (in_valid && in_ready) begin
      if (first_in < 0) first_in = cyc;
      sent++;
    end
    if (out_valid && out_ready) begin
      if (first_out < 0) first_out = cyc;
      if (amb[got]) n_amb++;
      else check(tb_ref_pkg::rabs(real'(out_data.i - yi[got])) <= 32.0 &&
            tb_ref_pkg::rabs(real'(out_data.q - yq[got])) <= 32.0,
            $sformatf("out %0d: (%0d,%0d) vs (%0d,%0d)", got, out_data.i, out_data.q, yi[got], yq[got]));
      if (!run2 && got >= 8 && is_peak[got-8])
        check($sqrt(real'(out_data.i) ** 2 + real'(out_data.q) ** 2) <= real'(threshold) + 8.0,
              "isolated peak clipped to the threshold");
      got++;
      if (got == 1000) burst_end = cyc;
    end
  end

  always @(negedge clk) if (rst_n && running) begin
    if (!run2) begin
      in_valid  = (sent < 1000) || ((sent < N) && ($urandom_range(0, 3) != 0));
      out_ready = (got < 1000) || ($urandom_range(0, 3) != 0);
    end else begin
      in_valid  = (sent < N) && ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
    end
    if (sent < N) in_data = '{i: smp_t'(xi[sent]), q: smp_t'(xq[sent])};
    else          in_data = '0;
  end

  task automatic make_stream(input int spacing_min, input int spacing_max);
    int next_peak;
    xi = {}; xq = {}; is_peak = {};
    next_peak = 10;
    for (int n = 0; n < N; n++) begin
      real m, a;
      bit p;
      p = (n == next_peak);
      if (p) begin
        m = real'($urandom_range(20000, 32000));
        next_peak += $urandom_range(spacing_min, spacing_max);
      end else begin
        m = real'($urandom_range(0, 9000));
      end
      a = real'($urandom) / 4294967296.0 * 2.0 * PI;
      xi.push_back($rtoi(m * $cos(a)));
      xq.push_back($rtoi(m * $sin(a)));
      is_peak.push_back(p);
    end
  endtask

  task automatic run(input string name);
    int t[15];
    for (int k = 0; k < 15; k++) t[k] = int'($signed(taps[k]));
    tb_ref_pkg::ref_cfr(xi, xq, int'(threshold), int'(weight), t, yi, yq, ref_peaks, amb);
    sent = 0; got = 0; cyc = 0; peaks = 0; n_amb = 0; first_in = -1; first_out = -1;
    if (!run2) begin
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
    end else begin
      // second run starts from a clear instead of a reset
      @(negedge clk); clr = 1; in_valid = 0; out_ready = 1;
      repeat (2) @(negedge clk);
      clr = 0;
    end
    running = 1;
    wait (got == N);
    running = 0;
    $display("%s: %0d peaks (reference %0d), %0d outputs not compared (tie between neighbours)",
             name, peaks, ref_peaks, n_amb);
    check(n_amb < N / 20, "few ties");
    check(peaks - ref_peaks <= 3 && ref_peaks - peaks <= 3, "peak count");
    check(ref_peaks > 50, "peaks present");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_stream(16, 30);
    run("run 1");
    check(first_out - first_in == 2 * (CORDIC_ITER + 1) + 3,
          $sformatf("latency %0d", first_out - first_in));
    check(burst_end - first_out == 999, "one sample per clock");
    run2 = 1;
    weight = 16'h4000;
    make_stream(1, 6);
    run("run 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
