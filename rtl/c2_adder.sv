// Correction adder between the register and Counter 2.
//
// Forms the value preset into Counter 2 from the integer part of C2 and the
// accumulator overflow. Counter 2 runs from its preset down to zero and
// reloads on the following tick, so a preset P gives a period of P+1 ticks;
// the adder therefore outputs C2 + ovf - 1 to make the period exactly
// C2 + ovf fc2 ticks. C2 = 0 (with no overflow) gives preset 0, the shortest
// period of one tick; the sum saturates at all ones. The -1 offset is this
// design's choice.
module c2_adder #(
  parameter int unsigned C2_W = fdfs_pkg::C2_W
) (
  input  logic [C2_W-1:0] c2_int,
  input  logic            ovf,
  output logic [C2_W-1:0] preset
);
  always_comb begin
    if (ovf)                 preset = c2_int;             // C2 + 1 - 1
    else if (c2_int == '0)   preset = '0;
    else                     preset = c2_int - C2_W'(1);
  end
endmodule
