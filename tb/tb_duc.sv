// tb_duc: up-conversion of random baseband frames compared with the
// floating-point reference (linear interpolation, exact rotation by the
// oscillator angle, carrier sum) within 6 LSB per component.
// Run 1: two carriers at -1/16 and +1/16 of the output rate, input always
//        valid and output always ready: INTERP outputs per frame and, once
//        started, one output every clock.
// Run 2: after `clr`, one carrier at a random frequency, random valid/ready.
// Run 3: two carriers at random frequencies, random valid/ready.
module tb_duc;
  import cfr_pkg::*;
  localparam int LOG2L = 3;
  localparam int L     = 1 << LOG2L;
  localparam int NF    = 400;

  logic        clk = 0, rst_n = 0, clr = 0;
  logic [1:0]  num_carriers = 2;
  logic [MAX_CARRIERS-1:0][31:0] freq;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  iq_t         in_data = '0, out_data;
  int checks = 0, failures = 0;
  int bi[$], bq[$], oi[$], oq[$];
  int sent = 0, got = 0, cyc = 0, first_out, last_out, nwords;
  bit rnd = 0, running = 0;

  duc #(.LOG2_INTERP(LOG2L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (running) begin
    cyc++;
    if (in_valid && in_ready) sent++;
    if (out_valid && out_ready) begin
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      if (got < oi.size())
        check(tb_ref_pkg::rabs(real'(out_data.i - oi[got])) <= 6.0 &&
              tb_ref_pkg::rabs(real'(out_data.q - oq[got])) <= 6.0,
              $sformatf("out %0d: (%0d,%0d) vs (%0d,%0d)", got, out_data.i, out_data.q, oi[got], oq[got]));
      got++;
    end
  end

  always @(negedge clk) if (running) begin
    in_valid  = (sent < nwords) && (!rnd || $urandom_range(0, 3) != 0);
    out_ready = !rnd || ($urandom_range(0, 3) != 0);
    if (sent < nwords) in_data = '{i: smp_t'(bi[sent]), q: smp_t'(bq[sent])};
  end

  task automatic run(input string name, input int nc, input bit random_flow);
    int unsigned f[2];
    bi = {}; bq = {};
    for (int n = 0; n < NF * nc; n++) begin
      bi.push_back($urandom_range(0, 24000) - 12000);
      bq.push_back($urandom_range(0, 24000) - 12000);
    end
    f[0] = freq[0];
    f[1] = freq[1];
    tb_ref_pkg::ref_duc(bi, bq, nc, f, LOG2L, oi, oq);
    num_carriers = 2'(nc);
    nwords = NF * nc;
    rnd = random_flow;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    sent = 0; got = 0; cyc = 0; first_out = -1;
    running = 1;
    wait (got == NF * L);
    repeat (60) @(posedge clk);
    running = 0;
    $display("%s: %0d outputs", name, got);
    check(got == NF * L, "INTERP outputs per frame");
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    freq[0] = 32'hF000_0000;
    freq[1] = 32'h1000_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run("two carriers", 2, 0);
    check(last_out - first_out == NF * L - 1, "one output per clock");
    freq[0] = $urandom;
    run("one carrier", 1, 1);
    freq[0] = $urandom;
    freq[1] = $urandom;
    run("two random carriers", 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
