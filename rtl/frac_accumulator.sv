// Fractional error-correction accumulator.
//
// Truncating C2 to an integer makes every output period slightly short, so
// the output frequency is too high. As in a fractional-N divider, this
// accumulator adds the fractional part R of C2 once per output period (`step`,
// the Counter 2 reload). Its carry `ovf` is combinational for the current
// step: the adder then makes this period one fc2 tick longer. Over 2^FRAC_W
// periods exactly `frac` of them are lengthened, so the mean period equals C2
// including its fraction. The accumulator runs in the fc2 domain (it is
// clocked by the master clock and advanced only on Counter 2 reloads). With
// `en` low it is cleared and `ovf` stays low. A first-order accumulator is
// this design's choice.
module frac_accumulator #(
  parameter int unsigned FRAC_W = fdfs_pkg::FRAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              step,
  input  logic [FRAC_W-1:0] frac,
  output logic              ovf,
  output logic [FRAC_W-1:0] acc
);
  logic [FRAC_W:0] sum;

  assign sum = {1'b0, acc} + {1'b0, frac};
  assign ovf = en & sum[FRAC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (!en)     acc <= '0;
    else if (step)    acc <= sum[FRAC_W-1:0];
  end
endmodule
