// clk_div: time base of the traffic-light controller.
//
// A free-running DIV_BITS-wide counter on the board clock. Its top bit is a
// square wave of f_clk / 2^DIV_BITS (clk_out); with the 50 MHz board clock and
// DIV_BITS = 23 that is 50e6 / 8388608 = 5.9604 Hz, a period of 0.1678 s.
// The division by 2^23 is the document's; bringing out a one-cycle tick as
// well as the square wave is this design's own choice: the controller runs on
// the board clock and advances its timer on tick, so the whole design stays in
// one clock domain.
//
// Interface: clk, rst_n (asynchronous, active low) in; clk_out and tick out.
// Timing: tick is high for one clk cycle every 2^DIV_BITS cycles, in the last
// cycle of each clk_out period (the cycle before clk_out rises). The first tick
// after reset comes 2^DIV_BITS cycles after rst_n is released.
module clk_div #(
  parameter int unsigned DIV_BITS = 23
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);

  logic [DIV_BITS-1:0] count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count_q <= '0;
    else        count_q <= count_q + 1'b1;
  end

  assign clk_out = count_q[DIV_BITS-1];
  assign tick    = &count_q;

endmodule
