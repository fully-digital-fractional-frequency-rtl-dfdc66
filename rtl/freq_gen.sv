// Count-frequency generator (Generator 1 / Generator 2).
//
// Produces the count frequency fc as a one-cycle clock enable `ce` derived
// from the master clock: fc = f_clk / (div * 2^exp). `div` sets the ratio of
// the two generators (fc1/fc2 enters the output frequency directly); `exp` is
// driven by the adaptive control, which multiplies or divides both generators
// by the same power of two so that fc1/fc2 stays constant. div = 0 is treated
// as 1. A change of div or exp takes effect at the next enable. Deriving the
// generators from one clock is this design's choice; the prototype ran both
// counters from a single crystal oscillator.
module freq_gen #(
  parameter int unsigned GEN_W   = fdfs_pkg::GEN_W,
  parameter int unsigned EXP_MAX = fdfs_pkg::EXP_MAX,
  localparam int unsigned EXP_W  = $clog2(EXP_MAX + 1),
  localparam int unsigned P_W    = GEN_W + EXP_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [GEN_W-1:0] div,
  input  logic [EXP_W-1:0] exp,
  output logic             ce
);
  logic [P_W-1:0] period, cnt;
  logic [GEN_W-1:0] d;

  always_comb begin
    d = (div == '0) ? GEN_W'(1) : div;
    period = P_W'(d) << ((exp > EXP_W'(EXP_MAX)) ? EXP_W'(EXP_MAX) : exp);
  end

  assign ce = (cnt >= period - P_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (ce) cnt <= '0;
    else         cnt <= cnt + P_W'(1);
  end
endmodule
