// Fully digital fractional frequency synthesizer, top level.
//
// The synthesizer measures the period of the input f_x and rebuilds a period
// scaled by a programmable ratio:
//   Counter 1 counts fc1 ticks during one input period:   C1 = fc1 / f_x
//   the register turns it into                             C2 = m1*C1/k1 +/- fine
//   Counter 2 emits one pulse every C2 fc2 ticks:          f_y = fc2 / C2
// so f_y = (k1/m1) * (fc2/fc1) * f_x, a fractional multiple of f_x that
// follows the input from one period to the next. C2 keeps FRAC_W fractional
// bits; with `corr_en` a first-order accumulator lengthens the right share of
// output periods by one tick so the mean output frequency carries that
// fraction too. With `adapt_en` the adaptive control rescales both count
// generators by powers of two to keep C1 between its thresholds. With
// `pll_mode` the input is taken from a divide-by-N of an external VCO clock
// `fo_clk`, as in the feedback path of a fractional PLL: the PLL then locks
// at f_o = N*(m1/k1)*(fc1/fc2)*f_ref, with f_ref compared against `fy`.
//
// Everything but the N divider runs on `clk` (the crystal oscillator); fc1
// and fc2 are clock enables f_clk/(gen_div*2^gen_exp). `fx_in` and the N
// divider output are asynchronous and are synchronised (two flops). Control
// inputs are sampled when a measurement is converted (C1 -> C2), so a new
// ratio appears at the output about one input period plus
// C1_W+M_W+FRAC_W clock cycles later. `fy` is a one-cycle pulse per output
// period, `fy_div2` its half-frequency square wave.
//
// The block structure, the counter widths (24 and 32 bits), the 2^8 scaling
// range and the 23-bit fine tuning follow the published FPGA version of this synthesizer. The
// synchronous capture in place of one-shots, the generic divider for g(C1),
// the fractional width and the adaptive thresholds are this design's choices.
module fdfs_top
#(
  parameter int unsigned C1_W    = fdfs_pkg::C1_W,
  parameter int unsigned C2_W    = fdfs_pkg::C2_W,
  parameter int unsigned M_W     = fdfs_pkg::M_W,
  parameter int unsigned FINE_W  = fdfs_pkg::FINE_W,
  parameter int unsigned FRAC_W  = fdfs_pkg::FRAC_W,
  parameter int unsigned GEN_W   = fdfs_pkg::GEN_W,
  parameter int unsigned EXP_MAX = fdfs_pkg::EXP_MAX,
  parameter int unsigned N_W     = fdfs_pkg::N_W,
  localparam int unsigned EXP_W  = $clog2(EXP_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fx_in,
  input  logic              fo_clk,
  input  logic              pll_mode,
  input  logic [N_W-1:0]    n_div,
  input  logic [GEN_W-1:0]  gen1_div,
  input  logic [GEN_W-1:0]  gen2_div,
  input  logic [M_W-1:0]    m1,
  input  logic [M_W-1:0]    k1,
  input  logic              fine_sub,
  input  logic [FINE_W-1:0] fine_val,
  input  logic              corr_en,
  input  logic              adapt_en,
  output logic              fy,
  output logic              fy_div2,
  output logic [C1_W-1:0]   c1_q,
  output logic [C2_W-1:0]   c2_int,
  output logic [FRAC_W-1:0] c2_frac,
  output logic [EXP_W-1:0]  gen_exp,
  output logic              c1_ovf,
  output logic              c2_sat
);
  logic            fo_div, fx_src, rise;
  logic            ce1, ce2;
  logic [C1_W-1:0] c1;
  logic            c1_valid, c1_ovf_raw, c1_upd, discard;
  logic            c2_ok, corr_ovf;
  logic [C2_W-1:0] preset;

  // PLL feedback prescaler (f_o / N)
  n_divider #(.N_W(N_W)) u_ndiv (
    .fo_clk, .rst_n, .n(n_div), .fout(fo_div)
  );

  // N = 1 (or 0) passes f_o straight on
  assign fx_src = !pll_mode ? fx_in : (n_div > N_W'(1)) ? fo_div : fo_clk;

  // Load / Clear from the input edge
  input_edge u_edge (.clk, .rst_n, .sig(fx_src), .rise);

  // Generator 1 and Generator 2
  freq_gen #(.GEN_W(GEN_W), .EXP_MAX(EXP_MAX)) u_gen1 (
    .clk, .rst_n, .div(gen1_div), .exp(gen_exp), .ce(ce1)
  );
  freq_gen #(.GEN_W(GEN_W), .EXP_MAX(EXP_MAX)) u_gen2 (
    .clk, .rst_n, .div(gen2_div), .exp(gen_exp), .ce(ce2)
  );

  counter1 #(.C1_W(C1_W)) u_cnt1 (
    .clk, .rst_n, .ce1, .capture(rise),
    .c1, .c1_valid, .c1_ovf(c1_ovf_raw)
  );

  synth_register #(
    .C1_W(C1_W), .C2_W(C2_W), .M_W(M_W), .FINE_W(FINE_W), .FRAC_W(FRAC_W)
  ) u_reg (
    .clk, .rst_n,
    .c1_in(c1), .c1_valid, .c1_ovf(c1_ovf_raw), .discard,
    .m1, .k1, .fine_sub, .fine_val,
    .c1_q, .c1_upd, .c1_q_ovf(c1_ovf),
    .c2_int, .c2_frac, .c2_ok, .c2_sat
  );

  adaptive_ctrl #(.C1_W(C1_W), .EXP_MAX(EXP_MAX)) u_adapt (
    .clk, .rst_n, .en(adapt_en),
    .c1(c1_q), .c1_upd, .c1_ovf, .capture(c1_valid),
    .exp(gen_exp), .discard
  );

  frac_accumulator #(.FRAC_W(FRAC_W)) u_acc (
    .clk, .rst_n, .en(corr_en), .step(fy), .frac(c2_frac),
    .ovf(corr_ovf), .acc()
  );

  c2_adder #(.C2_W(C2_W)) u_add (
    .c2_int, .ovf(corr_ovf), .preset
  );

  // Counter 2 waits until the register holds a measured C2
  counter2 #(.C2_W(C2_W)) u_cnt2 (
    .clk, .rst_n, .ce2(ce2 & c2_ok), .preset,
    .tc(fy), .fy_div2, .count()
  );
endmodule
