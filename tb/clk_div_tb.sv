// clk_div_tb: self-checking test of the clock divider.
//
// Two dividers run side by side: one with 4 bits, whose every period is
// checked over its first 256 periods (tick once per 16 cycles, in the cycle before
// clk_out rises, and clk_out high for exactly 8 of every 16 cycles), and one
// at the default 23 bits, 50 MHz / 2^23 = 5.96 Hz, whose first two ticks must
// come exactly 2^23 cycles apart, counted from reset.
module clk_div_tb;

  localparam int unsigned SMALL = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clk_out_s, tick_s, clk_out_f, tick_f;

  int checks = 0;
  int failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  clk_div #(.DIV_BITS(SMALL)) dut_small (.clk, .rst_n, .clk_out(clk_out_s), .tick(tick_s));
  clk_div                     dut_full  (.clk, .rst_n, .clk_out(clk_out_f), .tick(tick_f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (time %0t)", what, $time);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Small divider: cycle-exact model.
  longint unsigned cyc = 0;
  always @(negedge clk) begin
    if (rst_n && cyc < 4096) begin
      // cyc cycles have passed since reset was released.
      check(tick_s == ((cyc % 16) == 15), $sformatf("small tick at cycle %0d", cyc));
      check(clk_out_s == ((cyc % 16) >= 8), $sformatf("small clk_out at cycle %0d", cyc));
      cyc++;
    end
  end

  initial begin
    longint unsigned n = 0;
    longint unsigned first = 0;
    int ticks_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (ticks_seen < 2) begin
      if (tick_f) begin
        ticks_seen++;
        if (ticks_seen == 1) begin
          check(n == (1 << 23) - 1, $sformatf("first full-size tick at cycle %0d", n));
          check(clk_out_f == 1'b1, "clk_out high before wrap");
          first = n;
        end else begin
          check(n - first == (1 << 23), $sformatf("full-size tick period %0d", n - first));
        end
      end
      @(negedge clk);
      n++;
    end
    check(clk_out_f == 1'b0, "clk_out low after wrap");
    check(checks > 1000, "small divider checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
