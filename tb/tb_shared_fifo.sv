// tb_shared_fifo: random writes and reads against a queue model. Checks the
// data order, the one-clock read latency with `nd`, the `en` gate, the fill
// count, `rfd` going low when full and writes to a full FIFO being dropped.
module tb_shared_fifo;
  localparam int unsigned DEPTH = 16;

  logic        clk = 0, rst_n = 0;
  logic        we = 0, re = 0, en = 0;
  logic [31:0] din = 0, dout;
  logic        rfd, nd, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int fulls = 0, drops = 0;
  logic [31:0] model_q[$];
  logic        exp_nd = 0;
  logic [31:0] exp_word;

  shared_fifo #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      #1;
      // choose inputs for this cycle; phases bias the FIFO full or empty
      we  = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 30));
      din = $urandom;
      re  = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 80));
      en  = ($urandom_range(0, 9) != 0);
      #1;
      check(rfd == (model_q.size() < DEPTH), "rfd");
      check(count == model_q.size(), "count");
      check(empty == (model_q.size() == 0), "empty");
      check(nd == exp_nd, "nd");
      if (nd && exp_nd) check(dout == exp_word, "dout");
      if (!rfd) fulls++;
      if (we && !rfd) drops++;
      @(posedge clk);
      // update the model with what happened at this edge
      exp_nd = 0;
      if (re && en && model_q.size() > 0) begin
        exp_word = model_q.pop_front();
        exp_nd   = 1;
      end
      if (we && model_q.size() + (exp_nd ? 1 : 0) < DEPTH) model_q.push_back(din);
    end
    check(fulls > 0, "FIFO became full");
    check(drops > 0, "write to full FIFO dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
