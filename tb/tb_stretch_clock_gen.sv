// tb_stretch_clock_gen: checks the stretchable clock generator.
// - free-running period equals 2 * (N_INV * T_INV + T_C), for the default
//   555 MHz ring and for a slower 133 MHz ring;
// - a stretch request raised during the high phase stops the clock in the
//   low phase of the same cycle, with no further rising edge;
// - after stretch falls the next rising edge follows T_NOR + T_C later.
`timescale 1ps / 1ps
module tb_stretch_clock_gen;
  import gals_pkg::*;
  logic rst, stretch_a, stretch_b, clk_a, clk_b;
  int checks = 0, failures = 0;
  int rises_a = 0;

  stretch_clock_gen dut_a (.rst(rst), .stretch(stretch_a), .clk(clk_a));
  stretch_clock_gen #(.N_INV(15), .T_INV_PS(240)) dut_b (.rst(rst), .stretch(stretch_b), .clk(clk_b));

  always @(posedge clk_a) rises_a++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic measure(ref logic clk, input int expect_ps, input string name);
    realtime t1, t2;
    @(posedge clk) t1 = $realtime;
    @(posedge clk) t2 = $realtime;
    check((t2 - t1) == real'(expect_ps),
          $sformatf("%s period %0.0f ps, expected %0d", name, t2 - t1, expect_ps));
    @(negedge clk) t2 = $realtime;
    check((t2 - t1) == real'(expect_ps / 2) + real'(expect_ps),
          $sformatf("%s high phase wrong", name));
  endtask

  initial begin
    int per_a, per_b, n;
    realtime t_rel, t_rise;
    per_a = 2 * (CLK_N_INV * T_INV_PS + T_C_PS);
    per_b = 2 * (15 * 240 + T_C_PS);
    rst = 1'b0; stretch_a = 1'b0; stretch_b = 1'b0;
    #10 rst = 1'b1;
    #10000;
    check(clk_a == 1'b0 && clk_b == 1'b0, "clock not low in reset");
    rst = 1'b0;
    for (int i = 0; i < 4; i++) measure(clk_a, per_a, "555 MHz ring");
    for (int i = 0; i < 4; i++) measure(clk_b, per_b, "133 MHz ring");
    // stretch raised 300 ps after a rising edge: clock stops low
    @(posedge clk_a);
    #300 stretch_a = 1'b1;
    n = rises_a;
    @(negedge clk_a);
    #(5 * per_a);
    check(rises_a == n, "clock kept running while stretched");
    check(clk_a == 1'b0, "clock not stopped low");
    // release: next rising edge after NOR + C delay
    t_rel = $realtime;
    stretch_a = 1'b0;
    @(posedge clk_a) t_rise = $realtime;
    check((t_rise - t_rel) == real'(T_NOR_PS + T_C_PS),
          $sformatf("restart after %0.0f ps, expected %0d", t_rise - t_rel, T_NOR_PS + T_C_PS));
    // and runs at its period again
    measure(clk_a, per_a, "555 MHz ring after stretch");
    // stretch raised in the low phase also holds the clock
    @(negedge clk_a);
    #100 stretch_a = 1'b1;
    n = rises_a;
    #(3 * per_a);
    check(rises_a == n, "stretch in low phase did not hold the clock");
    stretch_a = 1'b0;
    #(per_a);
    check(rises_a > n, "clock did not restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
