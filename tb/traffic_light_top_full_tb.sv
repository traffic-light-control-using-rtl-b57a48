// traffic_light_top_full_tb: one complete type 1 round at full size.
//
// The top runs with all its defaults: a 50 MHz clock divided by 2^23, one
// delay unit per divided period (0.1678 s). The North pedestrian button is
// held from the start, so the round is s0, s1, sns, s3, s4, s5 and back to s0;
// after that the button is released and the next round must take s2 instead
// of sns. Every state after the first must last exactly its delay times 2^23
// clk cycles and show the lamps of the state tables.
module traffic_light_top_full_tb;
  import tl_pkg::*;
  import tl_tb_pkg::*;

  localparam int unsigned TICK_CYC = 1 << 23;

  logic   clk_50 = 1'b0;
  logic   rst_n = 1'b0;
  logic   btn_clr = 1'b0, btn_d = 1'b0, btn_d1 = 1'b0;
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
    repeat (40 * TICK_CYC) @(posedge clk_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic state_t seq[$] = '{S0, S1, SNS, S3, S4, S5, S0, S1, S2};
    repeat (3) @(negedge clk_50);
    rst_n = 1'b1;
    repeat (5) @(negedge clk_50);
    foreach (seq[i]) begin
      automatic longint unsigned cyc = 0;
      check(state == seq[i], $sformatf("state %s expected, got %s", seq[i].name(), state.name()));
      check(car_str(lamps) == exp_car(seq[i]) && ped_str(lamps) == exp_ped(seq[i]),
            $sformatf("lamps in %s: %s %s", seq[i].name(), car_str(lamps), ped_str(lamps)));
      if (i == 8) break;
      while (state == seq[i]) begin
        @(negedge clk_50);
        cyc++;
      end
      if (i > 0)
        check(cyc == exp_units(seq[i]) * TICK_CYC,
              $sformatf("%s lasted %0d cycles, expected %0d", seq[i].name(), cyc,
                        exp_units(seq[i]) * TICK_CYC));
      $display("%s lasted %0d cycles (%0.3f s at 50 MHz)", seq[i].name(), cyc, cyc / 50.0e6);
      if (seq[i] == SNS) ped_n_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
