// tb_clipper: random samples with their exact angle and a peak flag. For a
// peak the error must equal threshold*exp(j*angle) - sample within 3 LSB per
// component; otherwise it must be exactly zero. The sample and flag must pass
// unchanged, the latency must be CORDIC_ITER+1 clocks; random back-pressure.
module tb_clipper;
  import cfr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 3000;

  logic        clk = 0, rst_n = 0;
  logic [15:0] threshold = 16'd16000;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  iq_t         in_data = '0, out_data;
  ang_t        in_ang = '0;
  logic        in_peak = 0, out_peak;
  logic signed [17:0] out_err_i, out_err_q;
  int checks = 0, failures = 0;
  typedef struct { iq_t d; ang_t a; logic p; real ra; } item_t;
  item_t stim[$];
  int sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1, n_peaks = 0;

  clipper dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) begin
      if (first_in < 0) first_in = cyc;
      sent++;
    end
    if (out_valid && out_ready) begin
      item_t e;
      if (first_out < 0) first_out = cyc;
      e = stim[got];
      check(out_data == e.d && out_peak == e.p, "sample and flag pass");
      if (e.p) begin
        real xi, xq;
        xi = real'(threshold) * $cos(e.ra) - real'(e.d.i);
        xq = real'(threshold) * $sin(e.ra) - real'(e.d.q);
        check(tb_ref_pkg::rabs(real'(out_err_i) - xi) <= 3.0 && tb_ref_pkg::rabs(real'(out_err_q) - xq) <= 3.0,
              $sformatf("error (%0d,%0d) vs (%f,%f)", out_err_i, out_err_q, xi, xq));
        n_peaks++;
      end else begin
        check(out_err_i == 0 && out_err_q == 0, "no error without a peak");
      end
      got++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    in_valid  = (sent < 200) || ((sent < N) && ($urandom_range(0, 3) != 0));
    out_ready = (got < 200) || ($urandom_range(0, 3) != 0);
    if (sent < N) begin
      in_data = stim[sent].d;
      in_ang  = stim[sent].a;
      in_peak = stim[sent].p;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      item_t s;
      real m, ra;
      m    = real'($urandom_range(0, 32000));
      s.a  = ang_t'($urandom);
      ra   = real'(s.a) / 65536.0 * 2.0 * PI;
      s.ra = ra;
      s.d.i = smp_t'($rtoi(m * $cos(ra)));
      s.d.q = smp_t'($rtoi(m * $sin(ra)));
      s.p   = (m > real'(threshold)) || ($urandom_range(0, 9) == 0);
      stim.push_back(s);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    check(first_out - first_in == CORDIC_ITER + 1, $sformatf("latency %0d", first_out - first_in));
    check(n_peaks > 100, "peaks clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
