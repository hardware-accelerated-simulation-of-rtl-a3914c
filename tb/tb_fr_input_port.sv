// tb_fr_input_port: the port reads a behavioural FIFO (one-clock read
// latency, like the shared FIFO) under random consumer back-pressure. Checks
// that every word arrives once and in order, that nothing is read while
// Start is zero, that `re` never asserts while `nd` is high, and that with a
// consumer that is always ready the port moves one word every two clocks.
module tb_fr_input_port;
  logic        clk = 0, rst_n = 0;
  logic [31:0] start = 0;
  logic        fifo_re, fifo_en, fifo_nd = 0;
  logic [31:0] fifo_dout = 0;
  logic        out_valid, out_ready = 0;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  logic [31:0] fifo_q[$], exp_q[$];
  int n_words = 0, n_got = 0, cyc = 0, stalls = 0;

  fr_input_port #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // behavioural FIFO read side
  always @(posedge clk) begin
    fifo_nd <= 0;
    if (fifo_re && fifo_en && fifo_q.size() > 0) begin
      fifo_dout <= fifo_q.pop_front();
      fifo_nd   <= 1;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      checks++;
      if (fifo_re && fifo_nd) begin failures++; $display("FAIL re during nd"); end
      if (out_valid && !out_ready) stalls++;
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_data == exp_q.pop_front(), "word order");
        n_got++;
      end
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
    int c0;
    for (int k = 0; k < 200; k++) begin
      logic [31:0] w;
      w = $urandom;
      fifo_q.push_back(w);
      exp_q.push_back(w);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Start low: nothing may be read
    @(negedge clk); out_ready = 1;
    repeat (20) @(negedge clk);
    check(fifo_q.size() == 200 && n_got == 0, "no read while Start is zero");
    // Start high, consumer always ready: rate one word per two clocks
    start = 32'd1;
    c0 = cyc;
    wait (n_got == 100);
    @(negedge clk);
    $display("100 words in %0d clocks", cyc - c0);
    check((cyc - c0) >= 199 && (cyc - c0) <= 204, "one word every two clocks");
    // random back-pressure for the rest
    while (n_got < 200) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
    end
    check(exp_q.size() == 0, "all words delivered");
    check(stalls > 0, "back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
