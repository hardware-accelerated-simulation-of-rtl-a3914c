// tb_peak_detector: random samples of random magnitude and angle. Checks the
// peak flag (above the threshold and a local maximum of the magnitude)
// against the true magnitudes (samples within 4 LSB of the threshold or of a
// neighbour are not judged), the one-sample stream delay, the angle against
// atan2 (within 4 binary-angle units plus the quantisation of small vectors),
// the unchanged sample, a latency of CORDIC_ITER+2 = 18 clocks and one sample
// per clock while the output is always taken; then random back-pressure.
module tb_peak_detector;
  import cfr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 3000;

  logic        clk = 0, rst_n = 0, clr = 0;
  logic [15:0] threshold = 16'd20000;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  iq_t         in_data = '0, out_data;
  ang_t        out_ang;
  logic        out_peak;
  int checks = 0, failures = 0;
  iq_t stim[$];
  int sent = 0, got = 0, cyc = 0, first_in = -1, first_out = -1, n_peaks = 0;
  int burst_end = -1;

  peak_detector dut (.*);

  always #5 clk = ~clk;

  function automatic real magn(input iq_t v);
    return $sqrt(real'(v.i) ** 2 + real'(v.q) ** 2);
  endfunction

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
      iq_t  e;
      real  mag, mp, mn, ra;
      int   ea, da;
      if (first_out < 0) first_out = cyc;
      // output k carries input k-1; output 0 is the zero sample
      e   = (got == 0) ? '0 : stim[got-1];
      mag = magn(e);
      mp  = (got >= 2) ? magn(stim[got-2]) : 0.0;
      mn  = magn(stim[got]);
      check(out_data == e, "sample passes unchanged, one sample late");
      if (tb_ref_pkg::rabs(mag - real'(threshold)) > 4.0 &&
          tb_ref_pkg::rabs(mag - mp) > 4.0 && tb_ref_pkg::rabs(mag - mn) > 4.0)
        check(out_peak == (mag > real'(threshold) && mag > mp && mag > mn),
              $sformatf("peak flag (mag %f)", mag));
      if (mag > 20.0) begin
        ra = $atan2(real'(e.q), real'(e.i)) / (2.0 * PI) * 65536.0;
        ea = int'(ra < 0.0 ? ra + 65536.0 : ra);
        da = (int'(out_ang) - ea) & 16'hFFFF;
        if (da > 32768) da = 65536 - da;
        check(real'(da) <= 4.0 + 2000.0 / mag, $sformatf("angle %0d vs %0d", out_ang, ea));
      end
      if (out_peak) n_peaks++;
      got++;
      if (got == 500) burst_end = cyc;
    end
  end

  always @(negedge clk) if (rst_n) begin
    in_valid  = (sent < 500) || ((sent < N) && ($urandom_range(0, 3) != 0));
    out_ready = (got < 500) || ($urandom_range(0, 3) != 0);
    if (sent < N) in_data = stim[sent];
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
      real m, a;
      iq_t s;
      m   = real'($urandom_range(0, 32000));
      a   = real'($urandom_range(0, 65535)) / 65536.0 * 2.0 * PI;
      s.i = smp_t'($rtoi(m * $cos(a)));
      s.q = smp_t'($rtoi(m * $sin(a)));
      stim.push_back(s);
    end
    stim[0] = '{i: -16'sd32768, q: -16'sd32768};   // corner: largest magnitude
    stim[1] = '{i: 16'sd0, q: 16'sd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    check(first_out - first_in == CORDIC_ITER + 2, $sformatf("latency %0d", first_out - first_in));
    check(burst_end - first_out == 499, "one sample per clock");
    check(n_peaks > 100 && n_peaks < N - 100, "peaks and non-peaks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
