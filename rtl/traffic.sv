// traffic: the traffic-light state machine.
//
// Two crossing programs, a blink mode and a clear, selected by the function
// buttons clr, d and d1:
//   clr = 1         : stop, go back to the initial state s0 and hold it
//   d = 1, d1 = 0   : blink: every vehicle yellow flashes, all else dark
//   d = 1, d1 = 1   : type 2, four arms served clockwise, s8..s19, sn/sw/ss/se
//   otherwise (d=0) : type 1, two-way crossing, s0..s5, sns/sew
// Each state lasts its table delay (green 5, yellow 1, all red 1, pedestrian
// green 6) in delay units of TICKS_PER_UNIT ticks of the time base. When a
// yellow state ends and the pedestrian button of that road or arm is pressed,
// the machine enters the pedestrian state (all vehicle lamps red, that
// crossing green) and resumes afterwards with the next road or arm. Type 1
// takes its N-S request from the North or South button and its W-E request
// from the West or East button.
//
// The states, their lamps, delays and successors follow the document's state
// tables and state diagrams. This design's own choices: the pedestrian
// buttons are sampled at the moment the yellow state ends (no request latch);
// type 2's South and East pedestrian states are entered from the South and
// East yellow states, like North and West; a change of mode restarts the new
// program at its first state (s0 or s8); blink toggles once per delay unit;
// while clr is held the lamps of s0 are shown.
//
// Interface: clk, rst_n (asynchronous, active low), tick (one-cycle time-base
// pulse), clr, d, d1 (1 = pressed), ped_n_n .. ped_e_n (pedestrian buttons,
// active low as on the board), lamps (the 20 lamp drives), state and mode.
// Timing: all outputs are registered-state decodes. A state entered on a tick
// lasts exactly state_delay * TICKS_PER_UNIT ticks; after a mode change or
// clr the new state starts with a fresh timer on the next clk cycle, so its
// first delay unit may be up to one tick short.
module traffic
  import tl_pkg::*;
#(
  parameter int unsigned TICKS_PER_UNIT = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick,
  input  logic   clr,
  input  logic   d,
  input  logic   d1,
  input  logic   ped_n_n,
  input  logic   ped_w_n,
  input  logic   ped_s_n,
  input  logic   ped_e_n,
  output lamps_t lamps,
  output state_t state,
  output mode_t  mode
);

  localparam int unsigned MAX_TICKS = MAX_DELAY_UNITS * TICKS_PER_UNIT;
  localparam int unsigned CW        = $clog2(MAX_TICKS + 1);

  state_t          state_q, state_d;
  mode_t           mode_q, mode_d;
  logic [CW-1:0]   elapsed_q, elapsed_d;
  logic            blink_q, blink_d;
  logic [CW-1:0]   limit;
  logic            expire;

  // Pedestrian requests (1 = pressed).
  logic req_n, req_w, req_s, req_e, req_ns, req_we;
  assign req_n  = !ped_n_n;
  assign req_w  = !ped_w_n;
  assign req_s  = !ped_s_n;
  assign req_e  = !ped_e_n;
  assign req_ns = req_n || req_s;
  assign req_we = req_w || req_e;

  assign mode_d = decode_mode(clr, d, d1);

  // Last tick count of the current state (blink counts one delay unit).
  always_comb begin
    if (mode_q == MODE_BLINK) limit = CW'(TICKS_PER_UNIT - 1);
    else                      limit = CW'(state_delay(state_q) * TICKS_PER_UNIT - 1);
  end

  assign expire = tick && (elapsed_q == limit);

  // Successor of a state whose delay has run out.
  function automatic state_t successor(state_t s);
    case (s)
      S0:  return S1;
      S1:  return req_ns ? SNS : S2;
      S2:  return S3;
      S3:  return S4;
      S4:  return req_we ? SEW : S5;
      S5:  return S0;
      SNS: return S3;
      SEW: return S0;
      S8:  return S9;
      S9:  return req_n ? SN : S10;
      S10: return S11;
      S11: return S12;
      S12: return req_w ? SW : S13;
      S13: return S14;
      S14: return S15;
      S15: return req_s ? SS : S16;
      S16: return S17;
      S17: return S18;
      S18: return req_e ? SE : S19;
      S19: return S8;
      SN:  return S10;
      SW:  return S13;
      SS:  return S16;
      SE:  return S19;
      default: return S0;
    endcase
  endfunction

  always_comb begin
    state_d   = state_q;
    elapsed_d = elapsed_q;
    blink_d   = blink_q;
    unique case (mode_d)
      MODE_CLEAR: begin
        state_d   = S0;
        elapsed_d = '0;
        blink_d   = 1'b0;
      end
      MODE_BLINK: begin
        state_d = S0;
        if (mode_q != MODE_BLINK) begin
          elapsed_d = '0;
          blink_d   = 1'b1;
        end else if (expire) begin
          elapsed_d = '0;
          blink_d   = !blink_q;
        end else if (tick) begin
          elapsed_d = elapsed_q + 1'b1;
        end
      end
      MODE_TYPE1, MODE_TYPE2: begin
        blink_d = 1'b0;
        if (mode_d != mode_q ||
            (mode_d == MODE_TYPE1 && !is_type1(state_q)) ||
            (mode_d == MODE_TYPE2 && !is_type2(state_q))) begin
          state_d   = (mode_d == MODE_TYPE1) ? S0 : S8;
          elapsed_d = '0;
        end else if (expire) begin
          state_d   = successor(state_q);
          elapsed_d = '0;
        end else if (tick) begin
          elapsed_d = elapsed_q + 1'b1;
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S0;
      mode_q    <= MODE_CLEAR;
      elapsed_q <= '0;
      blink_q   <= 1'b0;
    end else begin
      state_q   <= state_d;
      mode_q    <= mode_d;
      elapsed_q <= elapsed_d;
      blink_q   <= blink_d;
    end
  end

  assign lamps = (mode_q == MODE_BLINK) ? blink_lamps(blink_q) : state_lamps(state_q);
  assign state = state_q;
  assign mode  = mode_q;

  // The timer never passes the delay of the state it times.
  a_elapsed_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    elapsed_q <= limit);
  // A running program only ever holds one of its own states.
  a_state_matches_mode: assert property (@(posedge clk) disable iff (!rst_n)
    (mode_q == MODE_TYPE1 && mode_d == MODE_TYPE1) |-> is_type1(state_q));

endmodule
