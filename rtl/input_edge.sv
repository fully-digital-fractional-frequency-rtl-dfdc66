// Input edge detector: the synchronous replacement of the Load/Clear one-shots.
//
// The asynchronous input frequency f_x passes through a SYNC_STAGES-flop
// synchroniser into the master-clock domain; each rising edge then gives a
// one-cycle pulse `rise`. That pulse tells Counter 1 to hand its count to the
// register (Load) and to restart (Clear) in the same cycle, so unlike two
// external monostables no counts are lost between periods. The pulse follows
// the input edge by SYNC_STAGES+1 clock cycles; the delay is constant, so the
// measured periods are not affected. The input must stay high and low for at
// least two clock cycles. The synchroniser is this design's choice.
module input_edge #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sig,
  output logic rise
);
  logic [SYNC_STAGES:0] sh;  // sh[SYNC_STAGES] is the previous synchronised value

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[SYNC_STAGES-1:0], sig};
  end

  assign rise = sh[SYNC_STAGES-1] & ~sh[SYNC_STAGES];
endmodule
