// Testbench for c2_adder: the preset must be C2 + ovf - 1 (never below 0,
// saturating at all ones), so that Counter 2 runs C2 + ovf ticks per period.
`timescale 1ns/1ps
module tb_c2_adder;
  localparam int C2_W = 32;
  logic [C2_W-1:0] c2_int, preset;
  logic ovf;
  int checks = 0, failures = 0;

  c2_adder dut (.c2_int, .ovf, .preset);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic try_one(longint unsigned v, bit o);
    longint unsigned e;
    c2_int = C2_W'(v); ovf = o;
    #1;
    e = v + o;
    e = (e == 0) ? 0 : e - 1;
    if (e > 64'hFFFF_FFFF) e = 64'hFFFF_FFFF;
    check(preset == C2_W'(e), $sformatf("c2=%0d ovf=%0b preset=%0d expected %0d", v, o, preset, e));
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try_one(0, 0); try_one(0, 1); try_one(1, 0); try_one(1, 1);
    try_one(20713, 0); try_one(90, 1); try_one(32'hFFFF_FFFF, 0); try_one(32'hFFFF_FFFF, 1);
    for (int i = 0; i < 500; i++) try_one($urandom, $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
