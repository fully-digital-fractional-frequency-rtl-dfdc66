// Sequential restoring divider used by the synthesizer register.
//
// On `start` it latches `dividend` and `divisor` and produces one quotient bit
// per clock, most significant first; after DW cycles `done` pulses for one
// cycle with `quotient` valid (it holds until the next start). `busy` is high while it works. A divisor of zero gives a quotient of
// all ones. A start while busy restarts the division with the new operands.
module seq_divider #(
  parameter int unsigned DW = 49,  // dividend / quotient width
  parameter int unsigned VW = 9    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient
);
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0] q, n;
  logic [VW-1:0] r;
  logic [VW:0]   r_shift;
  logic [VW-1:0] d;
  logic [CW-1:0] cnt;
  logic          dz;

  assign r_shift = {r, n[DW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; n <= '0; r <= '0; d <= '0; cnt <= '0; dz <= 1'b0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n    <= dividend;
        d    <= divisor;
        dz   <= (divisor == '0);
        q    <= '0;
        r    <= '0;
        cnt  <= CW'(DW);
        busy <= 1'b1;
      end else if (busy) begin
        n <= {n[DW-2:0], 1'b0};
        if (r_shift >= {1'b0, d}) begin
          r <= VW'(r_shift - {1'b0, d});
          q <= {q[DW-2:0], 1'b1};
        end else begin
          r <= VW'(r_shift);
          q <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = dz ? '1 : q;
endmodule
