// Adaptive control of the two generators.
//
// Few counts in Counter 1 make the output coarse; too many overrun it. This
// block reads each C1 the register accepts (`c1_upd`). If C1 is below
// C_LOW it multiplies both generator frequencies by two (exp - 1); if C1 is
// above C_HIGH or Counter 1 overran it divides both by two (exp + 1). Both
// generators share `exp`, so fc1/fc2 and hence the output frequency are kept.
// After a change the period being measured mixes two count rates, so
// `discard` stays high until the next capture of Counter 1 (`capture`),
// which the register then drops. With `en` low, exp holds. One step of 2 per
// measurement, the thresholds and exp = 0 at reset are this design's choices.
module adaptive_ctrl #(
  parameter int unsigned C1_W    = fdfs_pkg::C1_W,
  parameter int unsigned EXP_MAX = fdfs_pkg::EXP_MAX,
  parameter logic [C1_W-1:0] C_LOW  = C1_W'(1) << (C1_W / 2),
  parameter logic [C1_W-1:0] C_HIGH = C1_W'(1) << (C1_W - 1),
  localparam int unsigned EXP_W = $clog2(EXP_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [C1_W-1:0]  c1,
  input  logic             c1_upd,     // register accepted a new C1
  input  logic             c1_ovf,     // ... and it overran Counter 1
  input  logic             capture,    // Counter 1 delivered a count
  output logic [EXP_W-1:0] exp,
  output logic             discard
);
  logic up, down;

  assign up   = (c1_ovf || c1 > C_HIGH) && exp < EXP_W'(EXP_MAX);
  assign down = !c1_ovf && c1 < C_LOW && exp > '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp     <= '0;
      discard <= 1'b0;
    end else if (discard) begin
      if (capture) discard <= 1'b0;
    end else if (c1_upd && en) begin
      if (up) begin
        exp     <= exp + EXP_W'(1);
        discard <= 1'b1;
      end else if (down) begin
        exp     <= exp - EXP_W'(1);
        discard <= 1'b1;
      end
    end
  end
endmodule
