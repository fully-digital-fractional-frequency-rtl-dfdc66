// Testbench for synth_register: feeds measured values C1 with random control
// words and checks C2 = m1*C1/k1 +/- fine, split into integer part and
// FRAC_W-bit fraction, with clipping, against a 64-bit reference. Also checks
// that the first capture after reset and captures marked `discard` are
// dropped, that c1_q follows accepted captures and that the conversion ends
// within C1_W+M_W+FRAC_W+4 cycles.
`timescale 1ns/1ps
module tb_synth_register;
  localparam int C1_W = 24, C2_W = 32, M_W = 9, FINE_W = 23, FRAC_W = 16;
  localparam int LAT = C1_W + M_W + FRAC_W + 4;
  logic clk = 0, rst_n = 0;
  logic [C1_W-1:0] c1_in = 0, c1_q;
  logic c1_valid = 0, c1_ovf = 0, discard = 0, c1_upd, c1_q_ovf, c2_ok, c2_sat;
  logic [M_W-1:0] m1 = 1, k1 = 1;
  logic fine_sub = 0;
  logic [FINE_W-1:0] fine_val = 0;
  logic [C2_W-1:0] c2_int;
  logic [FRAC_W-1:0] c2_frac;
  int checks = 0, failures = 0;

  synth_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(int unsigned v, bit disc);
    @(negedge clk);
    c1_in = C1_W'(v); c1_valid = 1; discard = disc;
    @(negedge clk);
    c1_valid = 0; discard = 0;
  endtask

  // convert and compare
  task automatic convert(int unsigned v, int m, int k, bit sub, int unsigned fine);
    longint unsigned q, ip;
    longint s;
    logic [C2_W-1:0] e_int; logic e_sat; int t;
    m1 = M_W'(m); k1 = M_W'(k); fine_sub = sub; fine_val = FINE_W'(fine);
    capture(v, 0);
    check(c1_upd && c1_q == C1_W'(v), "c1_q not updated on accepted capture");
    t = 0;
    while (!dut.div_done && t < LAT) begin @(negedge clk); t++; end
    @(negedge clk);
    check(t < LAT, $sformatf("conversion took %0d cycles", t));
    q  = ((longint'(v) * m) << FRAC_W) / ((k == 0) ? 1 : k);
    if (k == 0) q = {FRAC_W+C1_W+M_W{1'b1}};
    ip = q >> FRAC_W;
    s  = sub ? longint'(ip) - fine : longint'(ip) + fine;
    e_sat = (s < 0) || (s > 64'hFFFF_FFFF);
    e_int = (s < 0) ? '0 : (s > 64'hFFFF_FFFF) ? '1 : C2_W'(s);
    check(c2_ok, "c2_ok low after a conversion");
    check(c2_int == e_int, $sformatf("C1=%0d m1=%0d k1=%0d fine=%s%0d: c2_int=%0d expected %0d", v, m, k, sub ? "-" : "+", fine, c2_int, e_int));
    check(c2_frac == FRAC_W'(q), $sformatf("C1=%0d m1=%0d k1=%0d: c2_frac=%0h expected %0h", v, m, k, c2_frac, FRAC_W'(q)));
    check(c2_sat == e_sat, $sformatf("c2_sat=%0b expected %0b", c2_sat, e_sat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first capture after reset is dropped
    capture(12345, 0);
    repeat (LAT) @(negedge clk);
    check(!c2_ok && c1_q == 0, "first capture after reset was not dropped");
    convert(20713, 1, 1, 0, 0);          // follower
    convert(1000, 1, 11, 0, 0);          // x11
    convert(1000, 10, 57, 0, 0);         // x5.7
    convert(777, 256, 1, 0, 0);          // divide output by 2^8
    convert(16777215, 256, 1, 0, 0);     // largest product
    convert(5000, 1, 256, 0, 0);         // multiply output by 2^8
    convert(3108, 1, 1, 1, 18);          // subtract a constant difference
    convert(100, 1, 1, 1, 5000);         // clip at zero
    convert(16777215, 256, 1, 0, 8388607); // clip at the top
    convert(100, 1, 0, 0, 0);            // divisor 0
    // discarded capture leaves the register alone
    capture(4242, 1);
    repeat (LAT) @(negedge clk);
    check(c1_q != 4242, "discarded capture was taken");
    for (int i = 0; i < 60; i++)
      convert($urandom_range(1, 2**C1_W - 1), $urandom_range(1, 256), $urandom_range(1, 256),
              $urandom_range(0, 1), $urandom_range(0, 3) == 0 ? $urandom_range(0, 2**FINE_W - 1) : $urandom_range(0, 50));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
