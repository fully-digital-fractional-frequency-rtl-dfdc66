// Full-size testbench: fdfs_top with its default parameters (24-bit Counter 1,
// 32-bit Counter 2) run through the measured operating points of the
// synthesizer.
//  1. Follower, fc1 = fc2 = 31.111 MHz, m1 = k1 = 1, input 1.502 kHz to
//     3.275 MHz. C1 must be floor or ceil of fc/f_x and within 1 of the
//     count reported for the hardware prototype at the same frequencies
//     (20713 ... 311); C2 must be the same count (no Load/Clear loss, so the
//     difference C1 - C2 is 0 up to the +/-1 count quantisation);
//     the mean output frequency must equal f_x within 1.5/C1.
//  2. 33.3 MHz clock: follower at 6.2 MHz, then x11 and x5.7 (m1 = 10, k1 = 57) with error correction:
//     the output time over a whole number of input periods must match the
//     ideal within two clock periods.
//  3. 33.3 MHz clock, 2 Hz input: the 24-bit Counter 1 must hold the
//     16.65 million counts of one period without overrun.
`timescale 1ns/1fs
module tb_fdfs_full;
  logic clk = 0, rst_n = 0, fx_in = 0, fo_clk = 0, pll_mode = 0;
  logic [15:0] n_div = 1;
  logic [7:0] gen1_div = 1, gen2_div = 1;
  logic [8:0] m1 = 1, k1 = 1;
  logic fine_sub = 0;
  logic [22:0] fine_val = 0;
  logic corr_en = 0, adapt_en = 0;
  logic fy, fy_div2, c1_ovf, c2_sat;
  logic [23:0] c1_q;
  logic [31:0] c2_int;
  logic [15:0] c2_frac;
  logic [3:0] gen_exp;
  int checks = 0, failures = 0;

  fdfs_top dut (.*);

  real f_clk = 31.111e6;
  real f_x = 1000.0;
  always #(0.5e9 / f_clk) clk = ~clk;
  always #(0.5e9 / f_x) fx_in = ~fx_in;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5.0e9;   // 5 s of simulated time
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // after a frequency change: let 2.5 input periods pass, then wait for n
  // conversions of whole periods at the new frequency
  task automatic settle(int n);
    #(2.5e9 / f_x);
    repeat (n) @(posedge clk iff dut.u_reg.div_done);
    @(negedge clk);
  endtask

  // mean output period over k pulses, in ns
  task automatic mean_period(int k, output real per);
    realtime t0;
    @(posedge fy); t0 = $realtime;
    repeat (k) @(posedge fy);
    per = ($realtime - t0) / k;
  endtask

  task automatic follower(real fx, int hw_c1);
    real ideal, per, err;
    int k;
    f_x = fx;
    settle(2);
    ideal = f_clk / fx;
    check(c1_q == 24'($floor(ideal)) || c1_q == 24'($ceil(ideal)),
          $sformatf("f_x=%0.1f Hz: C1=%0d, fc/f_x=%0.2f", fx, c1_q, ideal));
    if (hw_c1 > 0)
      check(int'(c1_q) >= hw_c1 - 1 && int'(c1_q) <= hw_c1 + 1,
            $sformatf("f_x=%0.1f Hz: C1=%0d, prototype count %0d", fx, c1_q, hw_c1));
    check(c2_int == 32'($floor(ideal)) || c2_int == 32'($ceil(ideal)),
          $sformatf("f_x=%0.1f Hz: C2=%0d, fc/f_x=%0.2f", fx, c2_int, ideal));
    k = (ideal > 2000.0) ? 4 : 400;
    mean_period(k, per);
    err = (1.0e9 / per) / fx - 1.0;
    if (err < 0) err = -err;
    check(err <= 1.5 / ideal, $sformatf("f_x=%0.1f Hz: f_y=%0.1f Hz", fx, 1.0e9 / per));
    $display("INFO f_x=%0.1f Hz  C1=%0d  C2=%0d  f_y=%0.1f Hz", fx, c1_q, c2_int, 1.0e9 / per);
  endtask

  task automatic ratio(real fx, int mm, int kk, real factor);
    real per, ideal;
    int k;
    f_x = fx; m1 = 9'(mm); k1 = 9'(kk);
    settle(2);
    k = int'(factor * 20.0 + 0.5);     // 20 input periods worth of output
    mean_period(k, per);
    ideal = 1.0e9 / (fx * factor);
    check((per - ideal) * k <= 2.0e9 / f_clk && (ideal - per) * k <= 2.0e9 / f_clk,
          $sformatf("x%0.1f: mean period %0.3f ns, ideal %0.3f ns", factor, per, ideal));
    $display("INFO x%0.1f: C2=%0d + %0d/65536, f_y=%0.2f Hz (ideal %0.2f)", factor, c2_int, c2_frac, 1.0e9 / per, fx * factor);
  endtask

  initial begin
    #100 rst_n = 1;
    // operating points of the 16-bit prototype (600 ns and 60 ns one-shots)
    follower(1502.0, 20713);   follower(2010.0, 15478);   follower(4008.0, 7762);
    follower(6004.0, 5181);    follower(10008.0, 3108);   follower(20004.0, 1555);
    follower(40000.0, 777);    follower(100000.0, 311);
    follower(400.0e3, 0);      follower(1082.1e3, 0);     follower(2020.0e3, 0);
    follower(3275.0e3, 0);
    // FPGA clock, fractional ratios with error correction
    f_clk = 33.3e6;
    follower(6.2e6, 0);
    corr_en = 1;
    ratio(10.0e3, 1, 11, 11.0);
    ratio(10.0e3, 10, 57, 5.7);
    ratio(6.2e6 / 11.0, 1, 11, 11.0);
    corr_en = 0; m1 = 1; k1 = 1;
    // lowest input frequency of the 24-bit Counter 1
    f_x = 2.0;
    settle(1);
    check(!c1_ovf && c1_q >= 24'd16649999 && c1_q <= 24'd16650001, $sformatf("2 Hz: C1=%0d ovf=%0b", c1_q, c1_ovf));
    $display("INFO 2 Hz: C1=%0d ovf=%0b", c1_q, c1_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
