// tb_clk_div: checks the sample-rate divider at its default setting: div_out
// toggles every 50 cycles, tick pulses once per 100 cycles on each rising edge
// of div_out, and the first tick comes from the 50th clock edge after reset
// is released (cyc counts from the second such edge).
module tb_clk_div;
  logic clk = 1'b0, rst = 1'b1;
  logic div_out, tick;
  int   checks = 0, failures = 0;
  int   cyc = 0, last_tick = -1, last_toggle = -1, ticks = 0;
  logic prev_div;

  clk_div dut (.clk, .rst, .div_out, .tick);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    prev_div = div_out;
    repeat (2000) begin
      @(posedge clk); #1;
      cyc++;
      if (div_out != prev_div) begin
        if (last_toggle >= 0) check(cyc - last_toggle == 50, "div_out half period is 50 cycles");
        last_toggle = cyc;
      end
      check(tick == (div_out && !prev_div), "tick marks the rising edge of div_out");
      if (tick) begin
        ticks++;
        if (last_tick < 0) check(cyc == 49, "first tick on the 50th edge after reset release");
        else               check(cyc - last_tick == 100, "tick period is 100 cycles");
        last_tick = cyc;
      end
      prev_div = div_out;
    end
    check(ticks == 20, "20 ticks in 2000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
