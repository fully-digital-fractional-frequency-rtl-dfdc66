// End-to-end testbench for fdfs_top at reduced counter widths (C1_W = 12,
// C2_W = 20), so that overrun and adaptive rescaling happen in a short run.
// The input f_x is a square wave whose period is a whole number of master
// clock cycles; both generators divide by 1, so C1 equals that period (times
// 2^-exp). The output is judged by the spacing of its pulses:
//   follower (m1 = k1 = 1)             every period equals the input period
//   x11 without correction             every period is floor(P/11)
//   x11 and x5.7 with correction       periods differ by at most one tick and
//                                      their sum matches the ideal to 1 tick
//   fine tuning +/-                    period P +/- fine
//   clipping, overrun, adaptive up/down, input change, PLL prescaler mode.
// Each mechanism is counted and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_fdfs_top;
  localparam int C1_W = 12, C2_W = 20, M_W = 9, FINE_W = 23, FRAC_W = 16, GEN_W = 8, EXP_MAX = 8, N_W = 16;
  logic clk = 0, rst_n = 0, fx_in = 0, fo_clk = 0, pll_mode = 0;
  logic [N_W-1:0] n_div = 1;
  logic [GEN_W-1:0] gen1_div = 1, gen2_div = 1;
  logic [M_W-1:0] m1 = 1, k1 = 1;
  logic fine_sub = 0;
  logic [FINE_W-1:0] fine_val = 0;
  logic corr_en = 0, adapt_en = 0;
  logic fy, fy_div2, c1_ovf, c2_sat;
  logic [C1_W-1:0] c1_q;
  logic [C2_W-1:0] c2_int;
  logic [FRAC_W-1:0] c2_frac;
  logic [3:0] gen_exp;
  int checks = 0, failures = 0;

  fdfs_top #(.C1_W(C1_W), .C2_W(C2_W)) dut (.*);

  always #5 clk = ~clk;            // 100 MHz master clock
  always #3.5 fo_clk = ~fo_clk;    // "VCO" for the prescaler, asynchronous to clk

  // input square wave, period fx_period clock cycles (0: held low)
  int fx_period = 0;
  initial forever begin
    if (fx_period < 2) begin fx_in = 0; @(posedge clk); end
    else begin
      int p;
      p = fx_period;
      fx_in = 1; repeat (p / 2) @(posedge clk);
      fx_in = 0; repeat (p - p / 2) @(posedge clk);
    end
  end

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

  // ---- mechanism counters ----
  int n_corr = 0, n_up = 0, n_down = 0, n_discard = 0, n_ovf = 0, n_sat = 0,
      n_pll = 0, n_fine_add = 0, n_fine_sub = 0, n_pending = 0, n_div_pulses = 0;
  logic [3:0] last_exp = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_acc.ovf && dut.fy) n_corr++;
    if (gen_exp > last_exp) n_up++;
    if (gen_exp < last_exp) n_down++;
    last_exp = gen_exp;
    if (dut.c1_valid && dut.discard) n_discard++;
    if (dut.c1_valid && dut.c1_ovf_raw) n_ovf++;
    if (dut.u_reg.div_done && dut.u_reg.clip) n_sat++;
    if (pll_mode && dut.rise) n_pll++;
    if (dut.u_reg.div_done && fine_val != 0 && !fine_sub) n_fine_add++;
    if (dut.u_reg.div_done && fine_val != 0 && fine_sub) n_fine_sub++;
    if (dut.u_reg.c1_upd && dut.u_reg.div_busy) n_pending++;
    if (fy_div2 != $past(fy_div2)) n_div_pulses++;
  end

  // spacing of the next k output pulses, in clock cycles
  task automatic periods(int k, output int p[$]);
    int t;
    p.delete();
    @(posedge clk iff fy);
    repeat (k) begin
      t = 0;
      do begin @(posedge clk); t++; end while (!fy);
      p.push_back(t);
    end
  endtask

  task automatic settle(int n_in);
    // n_in input periods plus the conversion time
    repeat (n_in * ((fx_period > 0) ? fx_period : 20) + 100) @(posedge clk);
  endtask

  task automatic expect_exact(int per, int k, string what);
    int p[$];
    periods(k, p);
    foreach (p[i]) check(p[i] == per, $sformatf("%s: period %0d expected %0d", what, p[i], per));
  endtask

  // k periods whose sum must be within 1 of k*ideal, each within 1 of ideal
  task automatic expect_mean(real ideal, int k, string what);
    int p[$]; int sum = 0;
    periods(k, p);
    foreach (p[i]) begin
      sum += p[i];
      check(p[i] >= $floor(ideal) && p[i] <= $floor(ideal) + 1, $sformatf("%s: period %0d, ideal %f", what, p[i], ideal));
    end
    check((real'(sum) - ideal * k) <= 1.0 && (ideal * k - real'(sum)) <= 1.0, $sformatf("%s: %0d periods took %0d, ideal %f", what, k, sum, ideal * k));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // follower: f_y = f_x
    fx_period = 1000; settle(3);
    check(c1_q == 1000 && c2_int == 1000 && !c1_ovf, $sformatf("follower C1=%0d C2=%0d", c1_q, c2_int));
    expect_exact(1000, 4, "follower");

    // response to an input change
    fx_period = 600; settle(3);
    expect_exact(600, 4, "input change");

    // x11 without correction: truncated C2, output too fast
    fx_period = 1000; k1 = 11; settle(3);
    check(c2_int == 90 && c2_frac == 16'(((1000 << 16) / 11) % 65536), $sformatf("x11 C2=%0d.%0h", c2_int, c2_frac));
    expect_exact(90, 22, "x11 uncorrected");
    // x11 with correction: 88 periods in 8 input periods
    corr_en = 1;
    expect_mean(1000.0 / 11.0, 88, "x11 corrected");
    // x5.7: C2 = 10*C1/57
    m1 = 10; k1 = 57; settle(2);
    expect_mean(10000.0 / 57.0, 57, "x5.7 corrected");
    corr_en = 0; m1 = 1; k1 = 1;

    // fine tuning
    fine_val = 5; settle(2);
    expect_exact(1005, 3, "fine +5");
    fine_sub = 1; settle(2);
    expect_exact(995, 3, "fine -5");
    // clipping at zero: shortest period
    fine_val = 2000; settle(2);
    check(c2_sat && c2_int == 0, "C2 not clipped at zero");
    expect_exact(1, 5, "clipped C2");
    fine_val = 0; fine_sub = 0;

    // overrun without adaptive control
    fx_period = 5000; settle(3);
    check(c1_ovf && c1_q == 4095, $sformatf("overrun: C1=%0d ovf=%0b", c1_q, c1_ovf));

    // adaptive control: slows both generators until C1 <= 2048
    adapt_en = 1; settle(8);
    check(gen_exp == 2 && c1_q == 1250 && !c1_ovf, $sformatf("adaptive up: exp=%0d C1=%0d", gen_exp, c1_q));
    expect_exact(5000, 3, "adaptive, output frequency kept");
    // fast input: C1 below 64 at exp 2 -> back to exp 0
    fx_period = 100; settle(70);
    check(gen_exp == 0 && c1_q == 100, $sformatf("adaptive down: exp=%0d C1=%0d", gen_exp, c1_q));
    expect_exact(100, 5, "adaptive down");
    adapt_en = 0;

    // ratio of the generators: fc1 = clk/2, fc2 = clk/1 -> f_y = 2 f_x
    gen1_div = 2; fx_period = 1000; settle(3);
    check(c1_q == 500, $sformatf("gen1/2: C1=%0d", c1_q));
    expect_exact(500, 3, "fc2/fc1 = 2");
    gen1_div = 1;

    // PLL feedback path: input is f_o / 20 = 140 ns = 14 clocks
    fx_period = 0; pll_mode = 1; n_div = 20; settle(0); repeat (2000) @(posedge clk);
    expect_mean(14.0, 20, "PLL prescaler N=20");
    // with k1 = 2 the synthesizer doubles f_o/N
    k1 = 2; repeat (500) @(posedge clk);
    expect_exact(7, 10, "PLL prescaler N=20, k1=2");
    pll_mode = 0; k1 = 1;

    // mechanisms
    check(n_corr > 0,     "error correction never lengthened a period");
    check(n_up > 0,       "adaptive control never slowed the generators");
    check(n_down > 0,     "adaptive control never sped up the generators");
    check(n_discard > 0,  "no capture was discarded after a rescale");
    check(n_ovf > 0,      "Counter 1 never overran");
    check(n_sat > 0,      "C2 never clipped");
    check(n_pll > 0,      "PLL prescaler path never used");
    check(n_fine_add > 0 && n_fine_sub > 0, "fine tuning add/subtract not both used");
    check(n_pending > 0,  "no capture arrived during a conversion");
    check(n_div_pulses > 0, "f_y/2 output never toggled");
    $display("INFO corr=%0d up=%0d down=%0d discard=%0d ovf=%0d sat=%0d pll=%0d fine+=%0d fine-=%0d pending=%0d",
             n_corr, n_up, n_down, n_discard, n_ovf, n_sat, n_pll, n_fine_add, n_fine_sub, n_pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
