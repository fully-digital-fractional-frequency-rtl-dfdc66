// Testbench for the 16-bit configuration of fdfs_top (C1_W = C2_W = 16), the
// width of the programmable-logic prototype, at a 31.111 MHz clock with
// fc1 = fc2 and k1 = 1. Its lowest input frequency is
// 31.111e6 / (2^16 - 1) = 474.7 Hz: at 476 Hz and 1502 Hz the output must
// follow the input without overrun, at 470 Hz Counter 1 must overrun and
// saturate at 65535.
`timescale 1ns/1fs
module tb_fdfs_lattice16;
  logic clk = 0, rst_n = 0, fx_in = 0, fo_clk = 0, pll_mode = 0;
  logic [15:0] n_div = 1;
  logic [7:0] gen1_div = 1, gen2_div = 1;
  logic [8:0] m1 = 1, k1 = 1;
  logic fine_sub = 0;
  logic [22:0] fine_val = 0;
  logic corr_en = 0, adapt_en = 0;
  logic fy, fy_div2, c1_ovf, c2_sat;
  logic [15:0] c1_q;
  logic [15:0] c2_int;
  logic [15:0] c2_frac;
  logic [3:0] gen_exp;
  int checks = 0, failures = 0;

  fdfs_top #(.C1_W(16), .C2_W(16)) dut (.*);

  real f_clk = 31.111e6;
  real f_x = 476.0;
  always #(0.5e9 / f_clk) clk = ~clk;
  always #(0.5e9 / f_x) fx_in = ~fx_in;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #0.1e9;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic point(real fx, bit ovf_expected);
    real ideal, per;
    realtime t0;
    f_x = fx;
    #(2.5e9 / fx);
    repeat (2) @(posedge clk iff dut.u_reg.div_done);
    @(negedge clk);
    ideal = f_clk / fx;
    check(c1_ovf == ovf_expected, $sformatf("f_x=%0.1f Hz: c1_ovf=%0b", fx, c1_ovf));
    if (ovf_expected) begin
      check(c1_q == 16'hFFFF, $sformatf("f_x=%0.1f Hz: C1=%0d not saturated", fx, c1_q));
    end else begin
      check(c1_q == 16'($floor(ideal)) || c1_q == 16'($ceil(ideal)), $sformatf("f_x=%0.1f Hz: C1=%0d ideal %0.1f", fx, c1_q, ideal));
      @(posedge fy); t0 = $realtime;
      repeat (3) @(posedge fy);
      per = ($realtime - t0) / 3.0;
      check(((1.0e9 / per) - fx) / fx < 2.0 / ideal && (fx - (1.0e9 / per)) / fx < 2.0 / ideal,
            $sformatf("f_x=%0.1f Hz: f_y=%0.2f Hz", fx, 1.0e9 / per));
    end
    $display("INFO f_x=%0.1f Hz C1=%0d ovf=%0b", fx, c1_q, c1_ovf);
  endtask

  initial begin
    #100 rst_n = 1;
    point(476.0, 0);
    point(470.0, 1);
    point(1502.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
