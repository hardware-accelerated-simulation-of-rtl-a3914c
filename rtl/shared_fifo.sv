// shared_fifo: a FIFO of I/Q sample words shared between the host and the
// free-running hardware model. The input FIFO is written by the host and read
// by the model; the output FIFO is written by the model and read by the host,
// so the model runs on its own clock and never waits on the host in
// lock-step.
//
// Write side: `we` with `din` stores a word when `rfd` (ready for data, i.e.
// not full) is high; a write to a full FIFO is dropped. Read side: `re`
// together with `en` reads the oldest word when the FIFO is not empty; the
// word appears on `dout` one clock later with `nd` (new data) high for that
// clock, as a block RAM read would. `count` is the fill level.
//
// Storage is one DEPTH x WIDTH array with a registered read. The depth of
// 8192 samples is the original work's; the port names re, en, nd and rfd follow
// its model diagram. Both sides run on one clock here; the host link that
// fills and drains the FIFO lies outside this design.
module shared_fifo #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write side
  input  logic                       we,
  input  logic [WIDTH-1:0]           din,
  output logic                       rfd,
  // read side
  input  logic                       re,
  input  logic                       en,
  output logic [WIDTH-1:0]           dout,
  output logic                       nd,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign rfd   = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr = we & rfd;
  assign do_rd = re & en & ~empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
    if (do_rd) dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      nd    <= 1'b0;
    end else begin
      nd <= do_rd;
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
