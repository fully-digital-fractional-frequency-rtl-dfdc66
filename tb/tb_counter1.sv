// Testbench for counter1: random fc1 enables and random capture instants.
// A reference count of the enables in each capture interval (including the
// capture cycle) must appear on c1 with c1_valid one cycle after the capture.
// A second phase with a short period limit checks saturation and the
// overflow flag.
`timescale 1ns/1ps
module tb_counter1;
  localparam int C1_W = 10;
  logic clk = 0, rst_n = 0, ce1 = 0, capture = 0;
  logic [C1_W-1:0] c1;
  logic c1_valid, c1_ovf;
  int checks = 0, failures = 0;
  int ref_cnt, exp_c1;
  bit exp_valid = 0, exp_ovf;

  counter1 #(.C1_W(C1_W)) dut (.clk, .rst_n, .ce1, .capture, .c1, .c1_valid, .c1_ovf);

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

  // reference model: updated at each clock edge from the (stable) inputs
  always @(posedge clk) if (rst_n) begin
    int inc;
    inc = ce1 ? 1 : 0;
    exp_valid = capture;
    if (capture) begin
      exp_ovf = (ref_cnt + inc) > (2**C1_W - 1);
      exp_c1  = exp_ovf ? 2**C1_W - 1 : ref_cnt + inc;
      ref_cnt = 0;
    end else begin
      ref_cnt = ref_cnt + inc;
    end
  end

  // outputs compared half a cycle later
  always @(negedge clk) if (rst_n) begin
    if (exp_valid) begin
      check(c1_valid, "c1_valid missing");
      check(c1 == C1_W'(exp_c1), $sformatf("c1=%0d expected %0d", c1, exp_c1));
      check(c1_ovf == exp_ovf, $sformatf("c1_ovf=%0b expected %0b", c1_ovf, exp_ovf));
    end else begin
      check(!c1_valid, "spurious c1_valid");
    end
  end

  initial begin
    ref_cnt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: periods well inside the counter range
    for (int p = 0; p < 200; p++) begin
      int len;
      len = $urandom_range(1, 300);
      for (int c = 0; c < len; c++) begin
        @(negedge clk); #1;
        ce1 = ($urandom_range(0, 2) != 0);
        capture = (c == len - 1);
      end
    end
    // phase 2: periods that overrun the counter
    for (int p = 0; p < 6; p++) begin
      int len;
      len = (p % 2) ? 2000 : $urandom_range(1000, 1030);
      for (int c = 0; c < len; c++) begin
        @(negedge clk); #1;
        ce1 = 1;
        capture = (c == len - 1);
      end
    end
    @(negedge clk) capture = 0; ce1 = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
