// Testbench for counter2: with fc2 enables every cycle and also at random,
// the number of enables between two output pulses must be preset + 1, for
// presets that stay within one 8-bit slice and presets that cross slices.
// A preset change must take effect only at the next reload, and fy_div2 must
// toggle on each pulse.
`timescale 1ns/1ps
module tb_counter2;
  localparam int C2_W = 32;
  logic clk = 0, rst_n = 0, ce2 = 0, tc, fy_div2;
  logic [C2_W-1:0] preset = 0, count;
  int checks = 0, failures = 0;
  bit random_ce = 0;

  counter2 #(.C2_W(C2_W)) dut (.clk, .rst_n, .ce2, .preset, .tc, .fy_div2, .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) ce2 = random_ce ? ($urandom_range(0, 2) == 0) : 1'b1;

  // ticks counted between pulses, checked at each pulse
  int ticks = 0, loaded = -1, pulses = 0;
  bit last_div2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (ce2) ticks++;
    if (tc) begin
      if (loaded >= 0)
        check(ticks == loaded + 1, $sformatf("period %0d ticks, preset %0d", ticks, loaded));
      check(fy_div2 == last_div2, "fy_div2 changed between pulses");
      last_div2 = ~fy_div2;
      pulses++;
      ticks = 0;
      loaded = int'(preset);
    end
  end

  task automatic run(int p, int n);
    preset = C2_W'(p);
    repeat (n) @(posedge clk iff tc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 5); run(1, 5); run(9, 5); run(255, 4); run(256, 4); run(300, 4); run(65536, 2);
    random_ce = 1;
    for (int i = 0; i < 30; i++) run($urandom_range(0, 2000), 3);
    random_ce = 0;
    run(70000, 2);
    check(pulses > 100, "too few pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
