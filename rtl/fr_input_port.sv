// fr_input_port: read control of the input FIFO for free-running operation.
// The FIFO is read with
//     re = rfd & ~nd,      en = (start != 0),
// the rule of the original work's throughput-test model: read only when the
// consumer has room and no word of an earlier read is arriving this clock.
// At most one read is in flight, so a word arriving with `nd` always finds
// room, and the port delivers at most one word every two clocks.
//
// The word is held in a one-entry register and offered as a valid/ready
// stream. `rfd` is high when that register is empty or is being emptied in
// this clock. In the original work's loopback model `rfd` comes straight from the
// output FIFO; here it comes from whatever consumes the stream, so the same
// rule serves every model. The holding register is this design's addition.
module fr_input_port #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      start,      // Start register, converted to a bool
  // input FIFO read side
  output logic             fifo_re,
  output logic             fifo_en,
  input  logic [WIDTH-1:0] fifo_dout,
  input  logic             fifo_nd,
  // sample stream
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  logic rfd;

  assign fifo_en   = (start != '0);
  assign rfd       = ~out_valid | out_ready;
  assign fifo_re   = rfd & ~fifo_nd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (fifo_nd) begin
      out_valid <= 1'b1;
      out_data  <= fifo_dout;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // An arriving word must find the holding register free.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 fifo_nd |-> (!out_valid || out_ready));

endmodule
