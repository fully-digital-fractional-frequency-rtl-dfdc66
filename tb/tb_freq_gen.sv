// Testbench for freq_gen: for a set of divide ratios and power-of-two
// exponents, measures the spacing of the enable pulses and compares it with
// max(div,1) * 2^exp master-clock cycles.
`timescale 1ns/1ps
module tb_freq_gen;
  localparam int GEN_W = 8, EXP_MAX = 8;
  logic clk = 0, rst_n = 0, ce;
  logic [GEN_W-1:0] div;
  logic [3:0] exp;
  int checks = 0, failures = 0;

  freq_gen dut (.clk, .rst_n, .div, .exp, .ce);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int d, int e);
    int period, t;
    div = GEN_W'(d); exp = 4'(e);
    period = ((d == 0) ? 1 : d) << e;
    // settle: wait for two pulses with the new setting
    do @(posedge clk); while (!ce);
    do @(posedge clk); while (!ce);
    for (int p = 0; p < 4; p++) begin
      t = 0;
      do begin @(posedge clk); t++; end while (!ce);
      check(t == period, $sformatf("div=%0d exp=%0d spacing %0d expected %0d", d, e, t, period));
    end
  endtask

  initial begin
    div = 1; exp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(1, 0); measure(0, 0); measure(2, 0); measure(3, 1); measure(7, 3);
    measure(1, 8); measure(255, 0); measure(5, 8);
    for (int i = 0; i < 6; i++) measure($urandom_range(1, 40), $urandom_range(0, 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
