// Testbench for frac_accumulator: random fractions and step instants are
// compared with a reference accumulator modulo 2^FRAC_W; ovf must be the
// carry of the current step and must be low while correction is disabled.
// It also checks that over 2^FRAC_W steps of a constant fraction f exactly f
// overflows occur (the mean-period property the correction relies on).
`timescale 1ns/1ps
module tb_frac_accumulator;
  localparam int FRAC_W = 8;
  logic clk = 0, rst_n = 0, en = 0, step = 0, ovf;
  logic [FRAC_W-1:0] frac = 0, acc;
  int checks = 0, failures = 0;
  int ref_acc = 0;

  frac_accumulator #(.FRAC_W(FRAC_W)) dut (.clk, .rst_n, .en, .step, .frac, .ovf, .acc);

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

  // drive one cycle and check against the reference before the edge
  task automatic cycle(bit e, bit s, int f);
    int sum;
    @(negedge clk);
    en = e; step = s; frac = FRAC_W'(f);
    #1;
    sum = ref_acc + f;
    check(acc == FRAC_W'(ref_acc), $sformatf("acc=%0d expected %0d", acc, ref_acc));
    check(ovf == (e && sum >= 2**FRAC_W), $sformatf("ovf=%0b acc=%0d frac=%0d en=%0b", ovf, ref_acc, f, e));
    if (!e) ref_acc = 0;
    else if (s) ref_acc = sum % (2**FRAC_W);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++)
      cycle($urandom_range(0, 19) != 0, $urandom_range(0, 1), $urandom_range(0, 2**FRAC_W - 1));
    // constant fraction: exactly f carries in 2^FRAC_W steps
    for (int t = 0; t < 4; t++) begin
      int f, n;
      f = (t == 0) ? 93 : $urandom_range(1, 255);
      n = 0;
      cycle(0, 0, f);
      for (int i = 0; i < 2**FRAC_W; i++) begin
        cycle(1, 1, f);
        if (ovf) n++;
      end
      check(n == f, $sformatf("fraction %0d gave %0d carries", f, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
