// hw_divider: iterative unsigned divider, the "hardware divide" that the
// filter and gate engines call for their reciprocals. Restoring division, one
// quotient bit per cycle, most significant first: after `start` with
// `dividend` (NW bits) and `divisor` (DW bits) it is busy for NW cycles, then
// raises `done` for one cycle with quotient = dividend / divisor and the
// remainder, NW+1 cycles after the cycle that carried `start`. Inputs are
// sampled at `start`; `start` while busy is ignored.
// Division by zero gives an all-ones quotient. For a Q16.16 reciprocal the
// caller passes 2^32 as dividend. The algorithm and its timing are this
// design's choice; only the existence of a divide unit is given.
module hw_divider #(
  parameter int unsigned NW = 48,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] q;
  logic [DW-1:0] r;
  logic [DW-1:0] d;
  logic [CW-1:0] cnt;
  logic [DW:0]   r_shift;
  logic [DW:0]   r_sub;

  assign r_shift = {r, q[NW-1]};
  assign r_sub   = r_shift - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      r    <= '0;
      d    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= dividend;
          r    <= '0;
          d    <= divisor;
          cnt  <= CW'(NW);
          busy <= 1'b1;
        end
      end else begin
        // Shift the next dividend bit into the remainder; subtract if it fits.
        if (!r_sub[DW]) begin
          r <= r_sub[DW-1:0];
          q <= {q[NW-2:0], 1'b1};
        end else begin
          r <= r_shift[DW-1:0];
          q <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = r;

endmodule
