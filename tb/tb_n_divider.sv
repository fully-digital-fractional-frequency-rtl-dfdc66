// Testbench for n_divider: for several N the output must rise once every N
// VCO cycles and stay high for floor(N/2) of them (N = 1 and N = 0 keep the
// output high).
`timescale 1ns/1ps
module tb_n_divider;
  localparam int N_W = 16;
  logic fo_clk = 0, rst_n = 0, fout;
  logic [N_W-1:0] n = 1;
  int checks = 0, failures = 0;

  n_divider #(.N_W(N_W)) dut (.fo_clk, .rst_n, .n, .fout);

  always #2 fo_clk = ~fo_clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500000) @(posedge fo_clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int nv);
    int nn = (nv == 0) ? 1 : nv;
    int period, high;
    n = N_W'(nv);
    repeat (3 * nn + 3) @(negedge fo_clk);
    if (nn == 1) begin
      for (int i = 0; i < 10; i++) begin @(negedge fo_clk); check(fout, "N=1 output not high"); end
      return;
    end
    // align to a rising edge of fout
    do @(negedge fo_clk); while (fout);
    do @(negedge fo_clk); while (!fout);
    for (int p = 0; p < 3; p++) begin
      period = 0; high = 0;
      do begin if (fout) high++; period++; @(negedge fo_clk); end while (fout);
      do begin period++; @(negedge fo_clk); end while (!fout);
      check(period == nn, $sformatf("N=%0d period %0d", nn, period));
      check(high == nn / 2, $sformatf("N=%0d high for %0d", nn, high));
    end
  endtask

  initial begin
    repeat (3) @(posedge fo_clk);
    rst_n = 1;
    measure(2); measure(3); measure(10); measure(1); measure(0); measure(7); measure(100);
    for (int i = 0; i < 8; i++) measure($urandom_range(2, 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
