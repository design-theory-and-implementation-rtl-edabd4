// io_port: one 8-bit parallel port (PORT0..PORT3).
//
// Each port hangs on its own bus segment behind a BSC. Writing the port
// endpoint loads the output latch, which drives pins_out; reading it sends the
// levels on pins_in onto the bus. The latch resets to FFh (all ones), as on an
// 8051-family port; pin electrical behaviour (open drain, pull-ups) is outside
// this model. The published design only names the ports; the rest is this design's
// choice. Loads at the clock edge that ends an evaluation phase.
module io_port
  import sbus_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ld,          // latch bus_in into the output latch
  input  word_t bus_in,
  input  word_t pins_in,
  output word_t pins_out,
  output word_t rdata        // value sent when the port is read
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pins_out <= '1;
    else if (ld) pins_out <= bus_in;
  end

  assign rdata = pins_in;

endmodule
