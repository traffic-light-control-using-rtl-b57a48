// sync_2ff: two-flip-flop synchronizer for the board's push buttons.
//
// Each of the WIDTH asynchronous inputs passes through two flip-flops on clk
// before the controller sees it, so a button edge reaches the logic two to
// three clk cycles later. RESET_VALUE is the level held during reset (the
// "not pressed" level of each button). The document does not treat button
// synchronisation; it is this design's addition for safe sampling of the
// push buttons.
module sync_2ff #(
  parameter int unsigned          WIDTH       = 1,
  parameter logic [WIDTH-1:0]     RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= RESET_VALUE;
      q      <= RESET_VALUE;
    end else begin
      meta_q <= d;
      q      <= meta_q;
    end
  end

endmodule
