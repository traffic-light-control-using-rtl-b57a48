// traffic_light_top: the complete traffic-light controller for one FPGA.
//
// The board clock feeds clk_div, which divides it by 2^DIV_BITS (50 MHz / 2^23
// = 5.96 Hz) and gives the controller one tick per divided period. The
// function buttons clr, d, d1 (1 = pressed) and the four pedestrian buttons
// (active low) pass through two-flip-flop synchronizers into the state machine
// traffic, whose 20 lamp outputs drive the LEDs of the traffic-light board:
// red/yellow/green for the North, West, South and East vehicle heads and
// red/green for the four pedestrian heads. The clock divider plus state
// machine structure, the division ratio and the button functions follow the
// document; the synchronizers, the reset input and the single clock domain
// (tick enable rather than a divided clock) are this design's choices.
//
// Interface: clk_50, rst_n (asynchronous, active low), the buttons; lamps,
// the current state and mode, and the divided clock clk_slow (for an
// indicator LED). Timing: a button press is seen by the state machine 2-3 clk
// cycles later; lamps change one clk cycle after the tick that ends a state.
module traffic_light_top
  import tl_pkg::*;
#(
  parameter int unsigned DIV_BITS       = 23,
  parameter int unsigned TICKS_PER_UNIT = 1
) (
  input  logic   clk_50,
  input  logic   rst_n,
  input  logic   btn_clr,
  input  logic   btn_d,
  input  logic   btn_d1,
  input  logic   ped_n_n,
  input  logic   ped_w_n,
  input  logic   ped_s_n,
  input  logic   ped_e_n,
  output lamps_t lamps,
  output state_t state,
  output mode_t  mode,
  output logic   clk_slow
);

  logic       tick;
  logic [6:0] btn_sync;

  clk_div #(.DIV_BITS(DIV_BITS)) u_clk_div (
    .clk     (clk_50),
    .rst_n   (rst_n),
    .clk_out (clk_slow),
    .tick    (tick)
  );

  // Buttons d, d1, clr rest at 0; pedestrian buttons rest at 1.
  sync_2ff #(.WIDTH(7), .RESET_VALUE(7'b000_1111)) u_sync (
    .clk   (clk_50),
    .rst_n (rst_n),
    .d     ({btn_clr, btn_d, btn_d1, ped_n_n, ped_w_n, ped_s_n, ped_e_n}),
    .q     (btn_sync)
  );

  traffic #(.TICKS_PER_UNIT(TICKS_PER_UNIT)) u_traffic (
    .clk     (clk_50),
    .rst_n   (rst_n),
    .tick    (tick),
    .clr     (btn_sync[6]),
    .d       (btn_sync[5]),
    .d1      (btn_sync[4]),
    .ped_n_n (btn_sync[3]),
    .ped_w_n (btn_sync[2]),
    .ped_s_n (btn_sync[1]),
    .ped_e_n (btn_sync[0]),
    .lamps   (lamps),
    .state   (state),
    .mode    (mode)
  );

endmodule
