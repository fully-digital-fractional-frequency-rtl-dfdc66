// Testbench for adaptive_ctrl: presents register values below, inside and
// above the thresholds and checks that exp steps down, holds or steps up
// within 0..EXP_MAX, that each change raises `discard` until the next
// capture, and that nothing changes while disabled or discarding.
`timescale 1ns/1ps
module tb_adaptive_ctrl;
  localparam int C1_W = 16, EXP_MAX = 8;
  localparam int LOW = 2**(C1_W/2), HIGH = 2**(C1_W-1);
  logic clk = 0, rst_n = 0, en = 1, c1_upd = 0, c1_ovf = 0, capture = 0, discard;
  logic [C1_W-1:0] c1 = 0;
  logic [3:0] exp;
  int checks = 0, failures = 0;
  int ref_exp = 0;
  bit ref_disc = 0;

  adaptive_ctrl #(.C1_W(C1_W), .EXP_MAX(EXP_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one measurement: capture pulse, then (unless discarding) the register update
  task automatic measure(int v, bit o);
    bit taken = !ref_disc;
    @(negedge clk); capture = 1; @(negedge clk); capture = 0;
    if (ref_disc) ref_disc = 0;
    if (taken) begin
      c1 = C1_W'(v); c1_ovf = o; c1_upd = 1;
      @(negedge clk); c1_upd = 0;
      if (en && (o || v > HIGH) && ref_exp < EXP_MAX) begin ref_exp++; ref_disc = 1; end
      else if (en && !o && v < LOW && ref_exp > 0) begin ref_exp--; ref_disc = 1; end
    end
    @(negedge clk);
    check(exp == 4'(ref_exp), $sformatf("exp=%0d expected %0d (C1=%0d ovf=%0b)", exp, ref_exp, v, o));
    check(discard == ref_disc, $sformatf("discard=%0b expected %0b", discard, ref_disc));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(10, 0);                       // already fastest: hold
    for (int i = 0; i < 24; i++) measure(HIGH + 5, 0);   // climb to EXP_MAX and stop
    check(exp == 4'(EXP_MAX), "exp did not reach EXP_MAX");
    for (int i = 0; i < 6; i++) measure(1000, 0);        // inside: hold
    for (int i = 0; i < 6; i++) measure(0, 1);           // overflow at max: hold
    for (int i = 0; i < 24; i++) measure(LOW - 1, 0);    // fall to 0
    check(exp == 0, "exp did not return to 0");
    measure(0, 1); measure(0, 1);                        // overflow steps up
    en = 0;
    for (int i = 0; i < 4; i++) measure(HIGH + 100, 0);  // disabled: hold
    en = 1;
    for (int i = 0; i < 100; i++) begin
      int r;
      r = $urandom_range(0, 3);
      measure(r == 0 ? $urandom_range(0, LOW - 1) : r == 1 ? $urandom_range(HIGH + 1, 2**C1_W - 1) : $urandom_range(LOW, HIGH),
              $urandom_range(0, 9) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
