// Counter 2 (DOWN): generates the output frequency f_y.
//
// C2_W/SLICE_W down-counter slices are cascaded through their carries; the
// first slice's carry input is the fc2 enable `ce2` (the prototype tied it
// high and clocked the counter at fc2). When all slices are zero and a tick
// arrives, the last carry out `tc` goes high: it is the output pulse f_y and,
// fed back, loads `preset` into all slices on that tick. A preset P thus
// gives one output pulse every P+1 fc2 ticks. `preset` is sampled only at the
// reload, so a new C2 takes effect at the next output period. `fy_div2`
// toggles on every pulse (the external divide-by-two stage of the prototype),
// giving a square wave of f_y/2. `tc` is one master-clock cycle wide.
module counter2 #(
  parameter int unsigned C2_W    = fdfs_pkg::C2_W,
  parameter int unsigned SLICE_W = fdfs_pkg::SLICE_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce2,
  input  logic [C2_W-1:0] preset,
  output logic            tc,
  output logic            fy_div2,
  output logic [C2_W-1:0] count
);
  localparam int unsigned NS = (C2_W + SLICE_W - 1) / SLICE_W;
  localparam int unsigned PW = NS * SLICE_W;

  logic [NS:0]   carry;
  logic [PW-1:0] d, q;

  assign carry[0] = ce2;
  assign d        = PW'(preset);
  assign tc       = carry[NS];
  assign count    = C2_W'(q);

  for (genvar i = 0; i < NS; i++) begin : g_slice
    down_slice #(.W(SLICE_W)) u_slice (
      .clk, .rst_n,
      .cin  (carry[i]),
      .load (tc),
      .d    (d[i*SLICE_W +: SLICE_W]),
      .cout (carry[i+1]),
      .q    (q[i*SLICE_W +: SLICE_W])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fy_div2 <= 1'b0;
    else if (tc) fy_div2 <= ~fy_div2;
  end
endmodule
