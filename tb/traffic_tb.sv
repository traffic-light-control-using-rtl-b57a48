// traffic_tb: self-checking test of the traffic-light state machine alone.
//
// The time base is a tick every TICK_PERIOD clk cycles and each delay unit is
// TPU = 2 ticks, so a 5-unit green must last exactly 10 ticks. The test walks
// type 1 with and without pedestrian requests, type 2 with a request on each
// arm, blink mode and clear, and at every state checks the state sequence,
// the 20 lamps against the tables in tl_tb_pkg and the number of ticks the
// state lasted. A watchdog ends the run with a failure if it hangs.
module traffic_tb;
  import tl_pkg::*;
  import tl_tb_pkg::*;

  localparam int unsigned TPU         = 2;
  localparam int unsigned TICK_PERIOD = 3;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   tick;
  logic   clr = 1'b0, d = 1'b0, d1 = 1'b0;
  logic   ped_n_n = 1'b1, ped_w_n = 1'b1, ped_s_n = 1'b1, ped_e_n = 1'b1;
  lamps_t lamps;
  state_t state;
  mode_t  mode;

  int checks = 0;
  int failures = 0;
  int unsigned tick_div = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) tick_div <= (tick_div == TICK_PERIOD - 1) ? 0 : tick_div + 1;
  assign tick = (tick_div == TICK_PERIOD - 1);

  traffic #(.TICKS_PER_UNIT(TPU)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  // Wait (up to a limit) for the machine to be in state s.
  task automatic wait_state(state_t s);
    int n = 0;
    while (state != s && n < 1000) begin
      @(negedge clk);
      n++;
    end
    check(state == s, $sformatf("reached state %s (in %s)", s.name(), state.name()));
  endtask

  // Follow a sequence of states; check lamps and, except for the first state
  // when first_full = 0, the number of ticks each state lasts.
  task automatic follow(state_t seq[$], bit first_full);
    foreach (seq[i]) begin
      int unsigned ticks = 0;
      int n = 0;
      check(state == seq[i], $sformatf("state %s expected, got %s", seq[i].name(), state.name()));
      check(car_str(lamps) == exp_car(seq[i]) && ped_str(lamps) == exp_ped(seq[i]),
            $sformatf("lamps in %s: car %s ped %s", seq[i].name(), car_str(lamps), ped_str(lamps)));
      while (state == seq[i] && n < 1000) begin
        if (tick) ticks++;
        @(negedge clk);
        n++;
      end
      if (i > 0 || first_full)
        check(ticks == exp_units(seq[i]) * TPU,
              $sformatf("%s lasted %0d ticks, expected %0d", seq[i].name(), ticks,
                        exp_units(seq[i]) * TPU));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Type 1, no pedestrians: s0 .. s5 and round to s0 again.
    follow('{S0, S1, S2, S3, S4, S5, S0}, 1'b0);

    // Type 1, North-South pedestrian button held: s1 -> sns -> s3.
    ped_n_n = 1'b0;
    follow('{S1, SNS, S3, S4, S5, S0}, 1'b1);
    ped_n_n = 1'b1;

    // Type 1, East button gives the West-East request: s4 -> sew -> s0.
    ped_e_n = 1'b0;
    follow('{S1, S2, S3, S4, SEW, S0}, 1'b1);
    ped_e_n = 1'b1;
    // South button also serves North-South.
    ped_s_n = 1'b0;
    follow('{S1, SNS}, 1'b1);
    ped_s_n = 1'b1;
    follow('{S3}, 1'b1);

    // Type 2 (d = d1 = 1): starts at s8, four arms clockwise.
    d = 1'b1; d1 = 1'b1;
    @(negedge clk);
    @(negedge clk);
    follow('{S8, S9, S10, S11, S12, S13, S14, S15, S16, S17, S18, S19, S8}, 1'b0);
    check(mode == MODE_TYPE2, "mode type 2");

    // Each pedestrian request in turn.
    ped_n_n = 1'b0;
    follow('{S9, SN, S10, S11}, 1'b1);
    ped_n_n = 1'b1;
    ped_w_n = 1'b0;
    follow('{S12, SW, S13, S14}, 1'b1);
    ped_w_n = 1'b1;
    ped_s_n = 1'b0;
    follow('{S15, SS, S16, S17}, 1'b1);
    ped_s_n = 1'b1;
    ped_e_n = 1'b0;
    follow('{S18, SE, S19, S8}, 1'b1);
    ped_e_n = 1'b1;

    // Blink (d = 1, d1 = 0): all yellows flash, one delay unit on, one off.
    d1 = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(mode == MODE_BLINK, "mode blink");
    begin
      automatic int unsigned ticks = 0;
      automatic int toggles = 0;
      automatic logic prev_y;
      prev_y = lamps.car[0].yellow;
      check(car_str(lamps) == "YYYY" && ped_str(lamps) == "----", "blink starts lit");
      while (toggles < 4) begin
        if (tick) ticks++;
        @(negedge clk);
        if (lamps.car[0].yellow != prev_y) begin
          toggles++;
          if (toggles > 1) check(ticks == TPU, $sformatf("blink half period %0d ticks", ticks));
          check(car_str(lamps) == (lamps.car[0].yellow ? "YYYY" : "----") &&
                ped_str(lamps) == "----",
                $sformatf("blink lamps car %s ped %s", car_str(lamps), ped_str(lamps)));
          prev_y = lamps.car[0].yellow;
          ticks = 0;
        end
      end
    end

    // Back to type 1 from blink: restarts at s0.
    d = 1'b0;
    @(negedge clk);
    @(negedge clk);
    follow('{S0, S1, S2, S3}, 1'b0);

    // clr: stop and hold s0 while pressed, then run from s0 with full delays.
    clr = 1'b1;
    repeat (2) @(negedge clk);
    check(state == S0 && mode == MODE_CLEAR, "clr returns to s0");
    repeat (20 * TICK_PERIOD) @(negedge clk);
    check(state == S0 && car_str(lamps) == "GRGR" && ped_str(lamps) == "RRRR",
          "clr holds s0");
    // clr has priority over d/d1.
    d = 1'b1; d1 = 1'b1;
    repeat (5 * TICK_PERIOD) @(negedge clk);
    check(state == S0 && mode == MODE_CLEAR, "clr overrides type 2");
    d = 1'b0; d1 = 1'b0;
    // Release clr just before a tick so the first state is timed in full.
    while (tick_div != 0) @(negedge clk);
    clr = 1'b0;
    @(negedge clk);
    follow('{S0, S1, S2, S3}, 1'b1);

    // Type 1 with d1 = 1 but d = 0 stays in type 1.
    d1 = 1'b1;
    repeat (50) @(negedge clk);
    check(mode == MODE_TYPE1 && state inside {S0, S1, S2, S3, S4, S5}, "d=0 d1=1 stays type 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
