// Closed-loop test of fdfs_top in the feedback path of a fractional PLL.
// The analog parts are behavioural models inside this testbench: a VCO whose
// frequency is f_center + KV * e, and a phase detector/loop filter that keeps
// e = (reference edges) - (synthesizer output pulses), an integrating
// proportional loop. The synthesizer sees f_o / N (pll_mode = 1, N = 8) and
// scales it by k1/m1 = 10/57, so in lock
//   f_o = N * (m1/k1) * f_ref = 8 * 5.7 * 100 kHz = 4.56 MHz,
// a non-integer multiple of the reference. The test checks that the phase
// error stays bounded (the loop is locked, so f_y equals f_ref on average) and
// that the mean VCO frequency is within 1/C1 of the target: the synthesizer
// measures f_o/N to one count of fc1, here C1 = 58 (x45.6) and 111 (x24), so
// that is the resolution of the lock. It then repeats with m1 = 3, k1 = 1 (f_o = 2.4 MHz) to show the ratio
// switch. Master clock 33.3 MHz, fc1 = fc2.
`timescale 1ns/1fs
module tb_fdfs_pll;
  logic clk = 0, rst_n = 0, fx_in = 0, fo_clk = 0, pll_mode = 1;
  logic [15:0] n_div = 8;
  logic [7:0] gen1_div = 1, gen2_div = 1;
  logic [8:0] m1 = 57, k1 = 10;
  logic fine_sub = 0;
  logic [22:0] fine_val = 0;
  logic corr_en = 1, adapt_en = 0;
  logic fy, fy_div2, c1_ovf, c2_sat;
  logic [23:0] c1_q;
  logic [31:0] c2_int;
  logic [15:0] c2_frac;
  logic [3:0] gen_exp;
  int checks = 0, failures = 0;

  fdfs_top dut (.*);

  localparam real F_CLK = 33.3e6, F_REF = 100.0e3, F_CENTER = 4.0e6, KV = 40.0e3;
  always #(0.5e9 / F_CLK) clk = ~clk;

  // reference input of the phase detector
  logic f_ref = 0;
  always #(0.5e9 / F_REF) f_ref = ~f_ref;

  // phase detector + loop filter model: cumulative edge difference
  int e = 0;
  always @(posedge f_ref) e = e + 1;
  always @(posedge clk) if (fy) e = e - 1;

  // VCO model
  real f_o = F_CENTER;
  always @(e) begin
    f_o = F_CENTER + KV * e;
    if (f_o < 0.5e6) f_o = 0.5e6;
    if (f_o > 20.0e6) f_o = 20.0e6;
  end
  always #(0.5e9 / f_o) fo_clk = ~fo_clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #30.0e6;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mean VCO frequency over a window, from its edge count
  task automatic lock_check(real target, string what);
    int n = 0, e_min, e_max;
    realtime t0;
    #4.0e6;                                   // settle 4 ms
    e_min = e; e_max = e;
    t0 = $realtime;
    fork
      begin #2.0e6; end
      forever @(posedge fo_clk) begin
        n++;
        if (e < e_min) e_min = e;
        if (e > e_max) e_max = e;
      end
    join_any
    disable fork;
    begin
      real f_meas, tol;
      tol = target / (F_CLK * 8.0);      // 1/C1
      f_meas = n / (($realtime - t0) * 1.0e-9);
      check(f_meas > target * (1.0 - tol) && f_meas < target * (1.0 + tol),
            $sformatf("%s: VCO %0.0f Hz, lock target %0.0f Hz", what, f_meas, target));
      check(e_max - e_min <= 4, $sformatf("%s: phase error wandered %0d..%0d", what, e_min, e_max));
      $display("INFO %s: f_o = %0.0f Hz (target %0.0f), error counter %0d..%0d", what, f_meas, target, e_min, e_max);
    end
  endtask

  initial begin
    #100 rst_n = 1;
    lock_check(8.0 * 5.7 * F_REF, "x45.6");
    m1 = 3; k1 = 1;
    lock_check(8.0 * 3.0 * F_REF, "x24");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
