// Feedback divider by N of the fractional PLL.
//
// Clocked by the VCO output f_o, it produces `fout` = f_o/N: high for the
// first floor(N/2) cycles of every N and low for the rest, so there is one
// rising edge per N cycles. For N = 1 the output is held high; the top then
// takes f_o itself. The synthesizer, placed after it in the
// feedback path, then scales f_o/N by its fractional ratio before the phase
// detector. N = 0 is treated as 1. A new N takes effect at the end of the
// current cycle of N. Reset is asynchronous and active low.
module n_divider #(
  parameter int unsigned N_W = fdfs_pkg::N_W
) (
  input  logic           fo_clk,
  input  logic           rst_n,
  input  logic [N_W-1:0] n,
  output logic           fout
);
  logic [N_W-1:0] cnt, nn, half;

  always_comb begin
    nn   = (n == '0) ? N_W'(1) : n;
    half = nn >> 1;
  end

  always_ff @(posedge fo_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fout <= 1'b0;
    end else begin
      if (cnt >= nn - N_W'(1)) cnt <= '0;
      else                     cnt <= cnt + N_W'(1);
      // output for the next cycle: high while next count < half
      if (nn == N_W'(1))       fout <= 1'b1;
      else if (cnt >= nn - N_W'(1)) fout <= 1'b1;
      else                     fout <= (cnt + N_W'(1)) < half;
    end
  end
endmodule
