// traffic_light_top_type2_full_tb: the four-arm program and blink at full size.
//
// The top runs with all its defaults (50 MHz clock, 2^23 divider, one delay
// unit per divided period). d and d1 are held from reset, so the controller
// runs type 2; the North pedestrian button is held too, so the round is s8,
// s9, sn, s10, s11 .. s19 and back to s8. Every state after the first must
// last exactly its delay times 2^23 cycles and show the lamps of the state
// tables. Then d1 is released: blink must start at once, lit, and toggle
// every 2^23 cycles with all four yellows together.
module traffic_light_top_type2_full_tb;
  import tl_pkg::*;
  import tl_tb_pkg::*;

  localparam int unsigned TICK_CYC = 1 << 23;

  logic   clk_50 = 1'b0;
  logic   rst_n = 1'b0;
  logic   btn_clr = 1'b0, btn_d = 1'b1, btn_d1 = 1'b1;
  logic   ped_n_n = 1'b0, ped_w_n = 1'b1, ped_s_n = 1'b1, ped_e_n = 1'b1;
  lamps_t lamps;
  state_t state;
  mode_t  mode;
  logic   clk_slow;

  int checks = 0;
  int failures = 0;

  always #10 clk_50 = ~clk_50;

  traffic_light_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  initial begin
    repeat (45 * TICK_CYC) @(posedge clk_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic state_t seq[$] = '{S8, S9, SN, S10, S11, S12, S13, S14, S15, S16, S17,
                                 S18, S19, S8};
    repeat (3) @(negedge clk_50);
    rst_n = 1'b1;
    repeat (5) @(negedge clk_50);
    check(mode == MODE_TYPE2, "type 2 selected by d = d1 = 1");
    foreach (seq[i]) begin
      automatic longint unsigned cyc = 0;
      check(state == seq[i], $sformatf("state %s expected, got %s", seq[i].name(), state.name()));
      check(car_str(lamps) == exp_car(seq[i]) && ped_str(lamps) == exp_ped(seq[i]),
            $sformatf("lamps in %s: %s %s", seq[i].name(), car_str(lamps), ped_str(lamps)));
      if (i == seq.size() - 1) break;
      while (state == seq[i]) begin
        @(negedge clk_50);
        cyc++;
      end
      if (i > 0)
        check(cyc == exp_units(seq[i]) * TICK_CYC,
              $sformatf("%s lasted %0d cycles, expected %0d", seq[i].name(), cyc,
                        exp_units(seq[i]) * TICK_CYC));
      $display("%s lasted %0d cycles (%0.3f s at 50 MHz)", seq[i].name(), cyc, cyc / 50.0e6);
      if (seq[i] == SN) ped_n_n = 1'b1;
    end

    // Blink.
    btn_d1 = 1'b0;
    repeat (4) @(negedge clk_50);
    check(mode == MODE_BLINK, "blink selected by d = 1, d1 = 0");
    check(car_str(lamps) == "YYYY" && ped_str(lamps) == "----", "blink starts lit");
    for (int t = 0; t < 2; t++) begin
      automatic longint unsigned cyc = 0;
      automatic logic y = lamps.car[ARM_N].yellow;
      while (lamps.car[ARM_N].yellow == y) begin
        @(negedge clk_50);
        cyc++;
      end
      check(car_str(lamps) == (y ? "----" : "YYYY") && ped_str(lamps) == "----",
            $sformatf("blink lamps %s %s", car_str(lamps), ped_str(lamps)));
      if (t > 0) check(cyc == TICK_CYC, $sformatf("blink half period %0d cycles", cyc));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
