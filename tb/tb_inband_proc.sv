// tb_inband_proc: random errors and weights, random back-pressure. Each
// output error must equal floor(err * weight / 2**15) and the sample must
// travel unchanged and in order.
module tb_inband_proc;
  import cfr_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] weight = 16'h8000;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  iq_t         in_data = '0, out_data;
  logic signed [17:0] in_err_i = 0, in_err_q = 0, out_err_i, out_err_q;
  int checks = 0, failures = 0;
  typedef struct { iq_t d; int ei; int eq; } item_t;
  item_t stim[$], exp_q[$];
  int sent = 0, got = 0;
  localparam int N = 3000;

  inband_proc dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) sent++;
    if (out_valid && out_ready) begin
      item_t e;
      e = exp_q.pop_front();
      check(out_data == e.d, "sample");
      check(int'(out_err_i) == e.ei && int'(out_err_q) == e.eq, "weighted error");
      got++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    in_valid  = (sent < N) && ($urandom_range(0, 3) != 0);
    out_ready = ($urandom_range(0, 3) != 0);
    if (sent < N) begin
      in_data  = stim[sent].d;
      in_err_i = 18'(stim[sent].ei);
      in_err_q = 18'(stim[sent].eq);
    end
    if (sent == N / 2) weight = 16'h3000;
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
      item_t s, e;
      int w;
      s.d  = iq_t'($urandom);
      s.ei = $urandom_range(0, 131071) - 65536;
      s.eq = $urandom_range(0, 131071) - 65536;
      stim.push_back(s);
      w = (k < N / 2) ? 32'h8000 : 32'h3000;
      e.d  = s.d;
      e.ei = int'((longint'(s.ei) * w) >>> 15);
      e.eq = int'((longint'(s.eq) * w) >>> 15);
      exp_q.push_back(e);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == N);
    // weight 1.0 returns the error unchanged: already covered in the first half
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
