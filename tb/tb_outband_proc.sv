// tb_outband_proc: random samples and clipping errors through the
// cancellation filter, first with the default raised-cosine taps, then with
// random taps. Every output must equal
//   sat(x[n-7] + floor(sum_k taps[k]*err[n-k] / 2**14))
// exactly, with one output per input and random back-pressure. Also checks
// that saturation occurs.
module tb_outband_proc;
  import cfr_pkg::*;
  localparam int N = 4000;

  logic        clk = 0, rst_n = 0, clr = 0;
  logic [MAX_TAPS-1:0][COEF_W-1:0] taps;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  iq_t         in_data = '0, out_data;
  logic signed [17:0] in_err_i = 0, in_err_q = 0;
  int checks = 0, failures = 0;
  int xi[N], xq[N], ei[N], eq[N];
  int tap_a[15], tap_b[15];
  int sent = 0, got = 0, n_sat = 0;

  outband_proc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int expect_out(input int n, input bit q);
    longint acc;
    int x, y;
    acc = 0;
    for (int k = 0; k < 15; k++)
      if (n - k >= 0)
        acc += longint'(q ? eq[n-k] : ei[n-k]) * ((n < N / 2) ? tap_a[k] : tap_b[k]);
    x = (n >= 7) ? (q ? xq[n-7] : xi[n-7]) : 0;
    y = x + int'(acc >>> 14);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return y;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent++;
    if (out_valid && out_ready) begin
      int yi, yq;
      yi = expect_out(got, 0);
      yq = expect_out(got, 1);
      check(int'(out_data.i) == yi && int'(out_data.q) == yq,
            $sformatf("out %0d: (%0d,%0d) vs (%0d,%0d)", got, out_data.i, out_data.q, yi, yq));
      if (yi == 32767 || yi == -32768) n_sat++;
      got++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    // taps change only when the pipeline is empty, at the half-way point
    if (sent == N / 2 && got == N / 2)
      for (int k = 0; k < 15; k++) taps[k] = 16'(tap_b[k]);
    in_valid  = (sent < N) && ($urandom_range(0, 3) != 0) && !(sent == N / 2 && got < N / 2);
    out_ready = ($urandom_range(0, 3) != 0);
    if (sent < N) begin
      in_data  = '{i: smp_t'(xi[sent]), q: smp_t'(xq[sent])};
      in_err_i = 18'(ei[sent]);
      in_err_q = 18'(eq[sent]);
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
    tb_ref_pkg::default_taps(tap_a);
    for (int k = 0; k < 15; k++) begin
      tap_b[k] = $urandom_range(0, 65535) - 32768;
      taps[k]  = 16'(tap_a[k]);
    end
    for (int n = 0; n < N; n++) begin
      xi[n] = $urandom_range(0, 65535) - 32768;
      xq[n] = $urandom_range(0, 65535) - 32768;
      // clipping errors: mostly zero, sometimes a burst
      if ($urandom_range(0, 4) == 0) begin
        ei[n] = $urandom_range(0, 40000) - 20000;
        eq[n] = $urandom_range(0, 40000) - 20000;
      end else begin
        ei[n] = 0;
        eq[n] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
