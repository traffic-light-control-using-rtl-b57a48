// tl_pkg: types, constants and small functions shared by the traffic-light
// controller, its top level and the testbenches.
//
// The controller has two crossing programs. Type 1 serves a two-way crossing
// (a North-South road and a West-East road, each with a pedestrian crossing)
// through states s0..s5 plus the pedestrian states sns and sew. Type 2 serves
// a four-arm crossing in which the arms get green one after another (North,
// West, South, East) through states s8..s19, with one pedestrian state per
// arm (sn, sw, ss, se). The state names and the per-state delays are those of
// the published state tables; the 5-bit state encoding, the lamp struct and
// the arm order in the lamp vector are this design's own choices.
package tl_pkg;

  // Arms of the crossing, in the order type 2 serves them.
  typedef enum logic [1:0] {
    ARM_N = 2'd0,
    ARM_W = 2'd1,
    ARM_S = 2'd2,
    ARM_E = 2'd3
  } arm_t;

  localparam int unsigned NUM_ARMS = 4;

  // Operating mode decoded from the three function buttons clr, d, d1.
  typedef enum logic [1:0] {
    MODE_CLEAR = 2'd0,  // clr = 1: stop and hold the initial state s0
    MODE_TYPE1 = 2'd1,  // d = 0 : two-way crossing with pedestrian buttons
    MODE_BLINK = 2'd2,  // d = 1, d1 = 0: all vehicle yellows blink
    MODE_TYPE2 = 2'd3   // d = 1, d1 = 1: four-arm crossing, clockwise
  } mode_t;

  typedef enum logic [4:0] {
    S0   = 5'd0,   // type 1: N-S green
    S1   = 5'd1,   // type 1: N-S yellow
    S2   = 5'd2,   // type 1: all red
    S3   = 5'd3,   // type 1: W-E green
    S4   = 5'd4,   // type 1: W-E yellow
    S5   = 5'd5,   // type 1: all red
    SEW  = 5'd6,   // type 1: W-E pedestrians green
    SNS  = 5'd7,   // type 1: N-S pedestrians green
    S8   = 5'd8,   // type 2: N green
    S9   = 5'd9,   // type 2: N yellow
    S10  = 5'd10,  // type 2: all red
    S11  = 5'd11,  // type 2: W green
    S12  = 5'd12,  // type 2: W yellow
    S13  = 5'd13,  // type 2: all red
    S14  = 5'd14,  // type 2: S green
    S15  = 5'd15,  // type 2: S yellow
    S16  = 5'd16,  // type 2: all red
    S17  = 5'd17,  // type 2: E green
    S18  = 5'd18,  // type 2: E yellow
    S19  = 5'd19,  // type 2: all red
    SN   = 5'd20,  // type 2: N pedestrians green
    SW   = 5'd21,  // type 2: W pedestrians green
    SS   = 5'd22,  // type 2: S pedestrians green
    SE   = 5'd23   // type 2: E pedestrians green
  } state_t;

  // One vehicle signal head and one pedestrian signal head; 1 = lamp lit.
  typedef struct packed {
    logic red;
    logic yellow;
    logic green;
  } car_lamp_t;

  typedef struct packed {
    logic red;
    logic green;
  } ped_lamp_t;

  // The 20 lamps of the board: 4 x (red, yellow, green) + 4 x (red, green).
  // Index [a] is arm a of arm_t.
  typedef struct packed {
    car_lamp_t [NUM_ARMS-1:0] car;
    ped_lamp_t [NUM_ARMS-1:0] ped;
  } lamps_t;

  localparam car_lamp_t CAR_RED    = '{red: 1'b1, yellow: 1'b0, green: 1'b0};
  localparam car_lamp_t CAR_YELLOW = '{red: 1'b0, yellow: 1'b1, green: 1'b0};
  localparam car_lamp_t CAR_GREEN  = '{red: 1'b0, yellow: 1'b0, green: 1'b1};
  localparam car_lamp_t CAR_OFF    = '{red: 1'b0, yellow: 1'b0, green: 1'b0};
  localparam ped_lamp_t PED_RED    = '{red: 1'b1, green: 1'b0};
  localparam ped_lamp_t PED_GREEN  = '{red: 1'b0, green: 1'b1};
  localparam ped_lamp_t PED_OFF    = '{red: 1'b0, green: 1'b0};

  // Longest state delay, in delay units.
  localparam int unsigned MAX_DELAY_UNITS = 6;

  // Delay of each state in delay units (the "seconds" of the state tables):
  // green 5, yellow 1, all red 1, pedestrian green 6.
  function automatic int unsigned state_delay(state_t s);
    case (s)
      S0, S3, S8, S11, S14, S17:                    return 5;
      SNS, SEW, SN, SW, SS, SE:                     return 6;
      default:                                      return 1;
    endcase
  endfunction

  function automatic logic is_type1(state_t s);
    return s inside {S0, S1, S2, S3, S4, S5, SEW, SNS};
  endfunction

  function automatic logic is_type2(state_t s);
    return s inside {S8, S9, S10, S11, S12, S13, S14, S15, S16, S17, S18, S19,
                     SN, SW, SS, SE};
  endfunction

  // Mode from the function buttons (1 = pressed). clr has priority; d = 0
  // selects type 1 whatever d1 is.
  function automatic mode_t decode_mode(logic clr, logic d, logic d1);
    if (clr)      return MODE_CLEAR;
    else if (!d)  return MODE_TYPE1;
    else if (!d1) return MODE_BLINK;
    else          return MODE_TYPE2;
  endfunction

  // Lamps shown in a state. Type 1 drives the North and South heads together
  // from the N-S column of its table, and West and East from the W-E column.
  function automatic lamps_t state_lamps(state_t s);
    lamps_t l;
    for (int a = 0; a < NUM_ARMS; a++) begin
      l.car[a] = CAR_RED;
      l.ped[a] = PED_RED;
    end
    case (s)
      S0:  begin l.car[ARM_N] = CAR_GREEN;  l.car[ARM_S] = CAR_GREEN;  end
      S1:  begin l.car[ARM_N] = CAR_YELLOW; l.car[ARM_S] = CAR_YELLOW; end
      S3:  begin l.car[ARM_W] = CAR_GREEN;  l.car[ARM_E] = CAR_GREEN;  end
      S4:  begin l.car[ARM_W] = CAR_YELLOW; l.car[ARM_E] = CAR_YELLOW; end
      SNS: begin l.ped[ARM_N] = PED_GREEN;  l.ped[ARM_S] = PED_GREEN;  end
      SEW: begin l.ped[ARM_W] = PED_GREEN;  l.ped[ARM_E] = PED_GREEN;  end
      S8:  l.car[ARM_N] = CAR_GREEN;
      S9:  l.car[ARM_N] = CAR_YELLOW;
      S11: l.car[ARM_W] = CAR_GREEN;
      S12: l.car[ARM_W] = CAR_YELLOW;
      S14: l.car[ARM_S] = CAR_GREEN;
      S15: l.car[ARM_S] = CAR_YELLOW;
      S17: l.car[ARM_E] = CAR_GREEN;
      S18: l.car[ARM_E] = CAR_YELLOW;
      SN:  l.ped[ARM_N] = PED_GREEN;
      SW:  l.ped[ARM_W] = PED_GREEN;
      SS:  l.ped[ARM_S] = PED_GREEN;
      SE:  l.ped[ARM_E] = PED_GREEN;
      default: ;  // S2, S5, S10, S13, S16, S19: all red
    endcase
    return l;
  endfunction

  // Lamps in blink mode: every vehicle yellow follows the blink phase,
  // all other lamps dark.
  function automatic lamps_t blink_lamps(logic phase);
    lamps_t l;
    for (int a = 0; a < NUM_ARMS; a++) begin
      l.car[a] = phase ? CAR_YELLOW : CAR_OFF;
      l.ped[a] = PED_OFF;
    end
    return l;
  endfunction

endpackage
