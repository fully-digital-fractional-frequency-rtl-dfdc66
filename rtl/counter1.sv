// Counter 1 (UP): measures the period of the input frequency in fc1 ticks.
//
// The counter advances on every fc1 enable `ce1`. On `capture` (a rising edge
// of f_x) it presents the number of ticks since the previous capture on `c1`
// with a one-cycle `c1_valid`, and restarts from zero in the same cycle; a tick
// arriving in the capture cycle is counted in the period that ends. So
// C1 = fc1 / f_x. The counter length must cover fc1max / fxmin; if a period
// is longer the counter stops at all ones and `c1_ovf` is reported with the
// capture instead of wrapping (saturation is this design's choice).
module counter1 #(
  parameter int unsigned C1_W = fdfs_pkg::C1_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce1,
  input  logic            capture,
  output logic [C1_W-1:0] c1,
  output logic            c1_valid,
  output logic            c1_ovf
);
  logic [C1_W-1:0] cnt, cnt_inc;
  logic            ovf, full;

  assign full    = &cnt;
  assign cnt_inc = (ce1 && !full) ? cnt + C1_W'(1) : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      ovf      <= 1'b0;
      c1       <= '0;
      c1_valid <= 1'b0;
      c1_ovf   <= 1'b0;
    end else begin
      c1_valid <= capture;
      if (capture) begin
        c1     <= cnt_inc;
        c1_ovf <= ovf | (ce1 & full);
        cnt    <= '0;
        ovf    <= 1'b0;
      end else begin
        cnt <= cnt_inc;
        if (ce1 && full) ovf <= 1'b1;
      end
    end
  end
endmodule
