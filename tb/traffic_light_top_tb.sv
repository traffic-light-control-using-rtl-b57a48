// traffic_light_top_tb: end-to-end test of the whole controller.
//
// The divider is shortened to DIV_BITS = 4 (one tick every 16 clk cycles) so
// that every mode and every pedestrian phase runs within a few thousand
// cycles. Buttons are driven at the top's pins and pass through the
// synchronizers. A monitor watches every state change: the new state must be
// the one the reference successor table gives for the buttons held, its lamps
// must match the state tables, and a state that ran with an unchanged mode
// must have lasted exactly its delay times 16 clk cycles. The test counts
// each mechanism (both type 1 pedestrian phases, the four type 2 pedestrian
// phases, blink, clear, and every mode switch) and fails for one that never
// happened.
module traffic_light_top_tb;
  import tl_pkg::*;
  import tl_tb_pkg::*;

  localparam int unsigned DIV_BITS = 4;
  localparam int unsigned TICK_CYC = 1 << DIV_BITS;

  logic   clk_50 = 1'b0;
  logic   rst_n = 1'b0;
  logic   btn_clr = 1'b0, btn_d = 1'b0, btn_d1 = 1'b0;
  logic   ped_n_n = 1'b1, ped_w_n = 1'b1, ped_s_n = 1'b1, ped_e_n = 1'b1;
  lamps_t lamps;
  state_t state;
  mode_t  mode;
  logic   clk_slow;

  int checks = 0;
  int failures = 0;

  always #10 clk_50 = ~clk_50;

  traffic_light_top #(.DIV_BITS(DIV_BITS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // Reference successor of a state whose delay ran out, given the pedestrian
  // buttons pressed (1 = pressed; N, W, S, E).
  function automatic state_t ref_next(state_t s, logic [3:0] req);
    logic n = req[3], w = req[2], so = req[1], e = req[0];
    case (s)
      S0: return S1;   S1: return (n || so) ? SNS : S2;  S2: return S3;
      S3: return S4;   S4: return (w || e) ? SEW : S5;   S5: return S0;
      SNS: return S3;  SEW: return S0;
      S8: return S9;   S9: return n ? SN : S10;    S10: return S11;
      S11: return S12; S12: return w ? SW : S13;   S13: return S14;
      S14: return S15; S15: return so ? SS : S16;  S16: return S17;
      S17: return S18; S18: return e ? SE : S19;   S19: return S8;
      SN: return S10;  SW: return S13;  SS: return S16;  SE: return S19;
      default: return S0;
    endcase
  endfunction

  // Mechanism counters.
  int n_sns = 0, n_sew = 0, n_sn = 0, n_sw = 0, n_ss = 0, n_se = 0;
  int n_blink_toggle = 0, n_clear = 0, n_to_type2 = 0, n_to_type1 = 0, n_timed = 0;
  int n_type1_loop = 0, n_type2_loop = 0;

  // Monitor.
  state_t prev_state = S0;
  mode_t  prev_mode = MODE_CLEAR;
  bit     seg_clean = 1'b0;  // current state entered by its own timer, mode stable
  int unsigned seg_cyc = 0;
  logic   prev_yellow = 1'b0;
  logic [3:0] prev_req = 4'b0000;  // buttons as held before this edge

  always @(negedge clk_50) begin
    if (rst_n) begin
      seg_cyc++;
      if (mode != prev_mode) begin
        if (mode == MODE_TYPE2) n_to_type2++;
        if (mode == MODE_TYPE1 && prev_mode inside {MODE_TYPE2, MODE_BLINK}) n_to_type1++;
        if (mode == MODE_CLEAR) n_clear++;
        seg_clean = 1'b0;
      end
      if (mode == MODE_BLINK && prev_mode == MODE_BLINK) begin
        check(ped_str(lamps) == "----" &&
              car_str(lamps) == (lamps.car[0].yellow ? "YYYY" : "----"), "blink lamps");
        if (lamps.car[0].yellow != prev_yellow) begin
          if (n_blink_toggle > 0)
            check(seg_cyc == TICK_CYC, $sformatf("blink half period %0d cycles", seg_cyc));
          n_blink_toggle++;
          seg_cyc = 0;
        end
      end else if (mode inside {MODE_TYPE1, MODE_TYPE2} && mode == prev_mode &&
                   state != prev_state) begin
        check(state == ref_next(prev_state, prev_req),
              $sformatf("%s -> %s, expected %s", prev_state.name(), state.name(),
                        ref_next(prev_state, prev_req).name()));
        check(car_str(lamps) == exp_car(state) && ped_str(lamps) == exp_ped(state),
              $sformatf("lamps in %s: %s %s", state.name(), car_str(lamps), ped_str(lamps)));
        if (seg_clean) begin
          check(seg_cyc == exp_units(prev_state) * TICK_CYC,
                $sformatf("%s lasted %0d cycles", prev_state.name(), seg_cyc));
          n_timed++;
        end
        case (state)
          SNS: n_sns++;  SEW: n_sew++;
          SN: n_sn++;    SW: n_sw++;    SS: n_ss++;   SE: n_se++;
          S0: n_type1_loop++;
          S8: n_type2_loop++;
          default: ;
        endcase
        seg_clean = 1'b1;
        seg_cyc = 0;
      end else if (state != prev_state) begin
        seg_clean = 1'b0;
        seg_cyc = 0;
      end
      if (mode == MODE_CLEAR)
        check(state == S0 && car_str(lamps) == "GRGR" && ped_str(lamps) == "RRRR",
              "clear holds s0");
      prev_state  = state;
      prev_mode   = mode;
      prev_yellow = lamps.car[0].yellow;
      prev_req    = ~{ped_n_n, ped_w_n, ped_s_n, ped_e_n};
    end
  end

  task automatic wait_state(state_t s);
    int n = 0;
    while (state != s && n < 5000) begin
      @(negedge clk_50);
      n++;
    end
    check(state == s, $sformatf("reached %s (in %s)", s.name(), state.name()));
  endtask

  initial begin
    repeat (400000) @(posedge clk_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk_50);
    rst_n = 1'b1;

    // Type 1 (no button pressed): two full rounds.
    wait_state(S1);
    wait_state(S0);
    wait_state(S1);
    wait_state(S0);
    // North pedestrian button -> sns after the N-S yellow.
    ped_n_n = 1'b0;
    wait_state(SNS);
    ped_n_n = 1'b1;
    // West pedestrian button -> sew after the W-E yellow.
    wait_state(S3);
    ped_w_n = 1'b0;
    wait_state(SEW);
    ped_w_n = 1'b1;
    wait_state(S0);

    // Type 2: d = d1 = 1.
    btn_d = 1'b1; btn_d1 = 1'b1;
    wait_state(S8);
    wait_state(S19);
    wait_state(S8);
    ped_n_n = 1'b0; wait_state(SN);  ped_n_n = 1'b1;
    ped_w_n = 1'b0; wait_state(SW);  ped_w_n = 1'b1;
    ped_s_n = 1'b0; wait_state(SS);  ped_s_n = 1'b1;
    ped_e_n = 1'b0; wait_state(SE);  ped_e_n = 1'b1;
    wait_state(S8);
    wait_state(S11);

    // Blink: d = 1, d1 = 0.
    btn_d1 = 1'b0;
    repeat (12 * TICK_CYC) @(negedge clk_50);

    // Back to type 1.
    btn_d = 1'b0;
    wait_state(S3);

    // Clear: hold, then release and run on.
    btn_clr = 1'b1;
    repeat (10 * TICK_CYC) @(negedge clk_50);
    btn_clr = 1'b0;
    wait_state(S1);
    wait_state(S0);

    // Straight from type 2 to type 1 (d released while d1 still pressed).
    btn_d = 1'b1; btn_d1 = 1'b1;
    wait_state(S11);
    btn_d = 1'b0;
    wait_state(S1);
    btn_d1 = 1'b0;
    wait_state(S0);

    check(n_sns > 0, "type 1 N-S pedestrian phase happened");
    check(n_sew > 0, "type 1 W-E pedestrian phase happened");
    check(n_sn > 0 && n_sw > 0 && n_ss > 0 && n_se > 0, "all type 2 pedestrian phases happened");
    check(n_blink_toggle >= 6, "blink happened");
    check(n_clear > 0, "clear happened");
    check(n_to_type2 >= 2 && n_to_type1 >= 2, "mode switches happened");
    check(n_type1_loop >= 3 && n_type2_loop >= 2, "full program rounds happened");
    check(n_timed > 40, "state durations were timed");
    $display("mechanisms: sns=%0d sew=%0d sn=%0d sw=%0d ss=%0d se=%0d blink_toggles=%0d clear=%0d to_type2=%0d to_type1=%0d timed=%0d",
             n_sns, n_sew, n_sn, n_sw, n_ss, n_se, n_blink_toggle, n_clear, n_to_type2,
             n_to_type1, n_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
