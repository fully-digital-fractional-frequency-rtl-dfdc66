// Synthesizer register with its control function C2 = g(C1).
//
// The register takes each accepted C1 from Counter 1 and converts it into the
// preset C2 of Counter 2 under the control word:
//   C2 = m1 * C1 / k1  (+ or -) fine_val
// With k1 = 1, m1 = 1 the output follows the input (f_y = f_x for fc1 = fc2);
// k1 > 1 multiplies the output frequency by k1 and m1 > 1 divides it by m1,
// up to 2^8 each. The quotient is computed with FRAC_W fractional bits by a
// sequential divider (C1_W+M_W+FRAC_W cycles): its integer part goes to
// Counter 2 through the correction adder and its fractional part R to the
// correction accumulator. The fine offset is added to the integer part and
// the result is clipped to 0..2^C2_W-1 (`c2_sat`).
//
// A capture is ignored when it is the first after reset (partial period) or
// when `discard` is high (the generators were rescaled during that period).
// Captures arriving while the divider works are kept, latest first, and
// converted next. `c1_q`/`c1_upd` expose the held C1 to the adaptive control.
// `c2_ok` rises with the first converted value; until then Counter 2 waits.
// The divider, the fractional width and the dropping of captures are this
// design's choices; the control function C2 = g(C1) with a multiplier, a
// divisor and a fine offset is that of the published synthesizer.
module synth_register
#(
  parameter int unsigned C1_W   = fdfs_pkg::C1_W,
  parameter int unsigned C2_W   = fdfs_pkg::C2_W,
  parameter int unsigned M_W    = fdfs_pkg::M_W,
  parameter int unsigned FINE_W = fdfs_pkg::FINE_W,
  parameter int unsigned FRAC_W = fdfs_pkg::FRAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [C1_W-1:0]   c1_in,
  input  logic              c1_valid,
  input  logic              c1_ovf,
  input  logic              discard,
  input  logic [M_W-1:0]    m1,
  input  logic [M_W-1:0]    k1,
  input  logic              fine_sub,
  input  logic [FINE_W-1:0] fine_val,
  output logic [C1_W-1:0]   c1_q,
  output logic              c1_upd,
  output logic              c1_q_ovf,
  output logic [C2_W-1:0]   c2_int,
  output logic [FRAC_W-1:0] c2_frac,
  output logic              c2_ok,
  output logic              c2_sat
);
  localparam int unsigned DW = C1_W + M_W + FRAC_W;
  localparam int unsigned IW = C1_W + M_W;                 // integer part of quotient
  localparam int unsigned SW = ((IW > FINE_W) ? IW : FINE_W) + 2;  // signed sum width

  logic          primed, pend, accept;
  logic [C1_W-1:0] pend_c1;
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] dividend, quot;
  logic signed [SW-1:0] sum;
  logic [C2_W-1:0] int_clip;
  logic          clip;

  assign accept = c1_valid & primed & ~discard;

  // Start a conversion of the newest accepted C1 whenever the divider is free.
  assign div_start = pend & ~div_busy & ~div_done;
  assign dividend  = {(IW)'(pend_c1) * (IW)'(m1), {FRAC_W{1'b0}}};

  seq_divider #(.DW(DW), .VW(M_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend, .divisor(k1),
    .busy(div_busy), .done(div_done), .quotient(quot)
  );

  // Fine tuning and clipping of the integer part
  always_comb begin
    logic signed [SW-1:0] fine_s;
    fine_s = $signed({{(SW-FINE_W){1'b0}}, fine_val});
    sum = $signed({{(SW-IW){1'b0}}, quot[DW-1:FRAC_W]}) + (fine_sub ? -fine_s : fine_s);
    clip = 1'b0;
    if (sum < 0) begin
      int_clip = '0;
      clip     = 1'b1;
    end else if (sum > $signed({{(SW-C2_W){1'b0}}, {C2_W{1'b1}}})) begin
      int_clip = '1;
      clip     = 1'b1;
    end else begin
      int_clip = C2_W'(sum);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed <= 1'b0; pend <= 1'b0; pend_c1 <= '0;
      c1_q <= '0; c1_upd <= 1'b0; c1_q_ovf <= 1'b0;
      c2_int <= '0; c2_frac <= '0; c2_ok <= 1'b0; c2_sat <= 1'b0;
    end else begin
      c1_upd <= accept;
      if (c1_valid) primed <= 1'b1;
      if (div_start) pend <= 1'b0;
      if (accept) begin
        c1_q     <= c1_in;
        c1_q_ovf <= c1_ovf;
        pend_c1  <= c1_in;
        pend     <= 1'b1;
      end
      if (div_done) begin
        c2_int  <= int_clip;
        c2_frac <= quot[FRAC_W-1:0];
        c2_sat  <= clip;
        c2_ok   <= 1'b1;
      end
    end
  end
endmodule
