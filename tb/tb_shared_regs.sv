// tb_shared_regs: checks reset values, writes and read-back of every
// register, the fields of the configuration struct, read-only status
// registers and ignored writes to unused addresses.
module tb_shared_regs;
  import cfr_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        we = 0;
  logic [5:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] stat_peaks = 32'd1234, stat_out_samples = 32'd98765;
  cfg_t        cfg;
  int checks = 0, failures = 0;

  shared_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    we = 1; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic chk_rd(input logic [5:0] a, input logic [31:0] exp, input string what);
    addr = a;
    #1;
    check(rdata == exp, what);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t[15];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset values
    check(cfg.start == 0, "reset start");
    check(cfg.model == MODEL_DUC_CFR, "reset model");
    check(cfg.num_carriers == 2, "reset carriers");
    check(cfg.threshold == 16'h4000, "reset threshold");
    check(cfg.weight == 16'h8000, "reset weight");
    check(cfg.freq[0] == 32'hF000_0000 && cfg.freq[1] == 32'h1000_0000, "reset freq");
    tb_ref_pkg::default_taps(t);
    for (int k = 0; k < 15; k++) check(cfg.taps[k] == 16'(t[k]), $sformatf("reset tap %0d", k));
    // write and read back
    wr(6'h00, 32'h1);         check(cfg.start == 1, "start"); chk_rd(6'h00, 1, "start read");
    wr(6'h01, 32'h2);         check(cfg.model == MODEL_CFR, "model"); chk_rd(6'h01, 2, "model read");
    wr(6'h02, 32'h1);         check(cfg.num_carriers == 1, "carriers"); chk_rd(6'h02, 1, "carriers read");
    wr(6'h03, 32'h2345);      check(cfg.threshold == 16'h2345, "threshold"); chk_rd(6'h03, 32'h2345, "threshold read");
    wr(6'h04, 32'h6000);      check(cfg.weight == 16'h6000, "weight"); chk_rd(6'h04, 32'h6000, "weight read");
    wr(6'h08, 32'hDEAD_BEEF); check(cfg.freq[0] == 32'hDEAD_BEEF, "freq0"); chk_rd(6'h08, 32'hDEAD_BEEF, "freq0 read");
    wr(6'h09, 32'h0123_4567); check(cfg.freq[1] == 32'h0123_4567, "freq1"); chk_rd(6'h09, 32'h0123_4567, "freq1 read");
    for (int k = 0; k < 15; k++) begin
      logic [15:0] v;
      v = 16'($urandom);
      wr(6'h10 + 6'(k), {16'h0, v});
      check(cfg.taps[k] == v, $sformatf("tap %0d", k));
      chk_rd(6'h10 + 6'(k), 32'($signed(v)), $sformatf("tap %0d read", k));
    end
    // status registers are read only
    chk_rd(6'h05, 32'd1234, "peaks status");
    chk_rd(6'h06, 32'd98765, "output count status");
    wr(6'h05, 32'h0);
    chk_rd(6'h05, 32'd1234, "peaks not writable");
    // unused addresses
    wr(6'h3F, 32'hFFFF_FFFF);
    chk_rd(6'h3F, 0, "unused reads zero");
    check(cfg.start == 1 && cfg.threshold == 16'h2345, "unused write ignored");
    wr(6'h00, 32'h0);
    check(cfg.start == 0, "stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
