// One 8-bit slice of the cascaded down counter (Counter 2).
//
// The slice decrements when its carry input is high and passes a carry to
// the next slice when it is at zero and its own carry input is high, like the
// cascaded 8-bit down counters of the prototype. `load` presets the slice and
// has priority over counting.
module down_slice #(
  parameter int unsigned W = fdfs_pkg::SLICE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cin,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic         cout,
  output logic [W-1:0] q
);
  assign cout = cin & (q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (cin)  q <= q - W'(1);
  end
endmodule
