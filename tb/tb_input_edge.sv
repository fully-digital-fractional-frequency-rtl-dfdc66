// Testbench for input_edge: drives a random input that holds each level for
// 2..9 clock cycles and checks, cycle by cycle, that a one-cycle pulse follows
// every rising edge after exactly the synchroniser delay, and nothing else.
`timescale 1ns/1ps
module tb_input_edge;
  logic clk = 0, rst_n = 0, sig = 0, rise;
  int checks = 0, failures = 0, edges = 0, pulses = 0;
  bit hist[$];

  input_edge dut (.clk, .rst_n, .sig, .rise);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample what the flops see at each edge
  always @(posedge clk) if (rst_n) hist.push_back(sig);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int hold;
      hold = 2 + $urandom_range(0, 7);
      for (int c = 0; c < hold; c++) begin
        @(negedge clk);
        if (hist.size() >= 3) begin
          // after edge k the output is sig(k-1) & ~sig(k-2)
          bit exp_rise;
          exp_rise = hist[hist.size()-2] & ~hist[hist.size()-3];
          check(rise == exp_rise, $sformatf("rise=%0b expected %0b at sample %0d", rise, exp_rise, hist.size()));
          if (rise) pulses++;
        end
      end
      sig = ~sig;
      if (sig) edges++;
    end
    repeat (5) begin
      @(negedge clk);
      if (rise) pulses++;
    end
    check(pulses == edges, $sformatf("pulses %0d edges %0d", pulses, edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
