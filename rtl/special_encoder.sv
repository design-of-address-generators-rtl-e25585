// special_encoder: output encoder of the multiple LUT cascade architecture.
//
// Cascade i (1-based) returns a local address v_i in 0..2^R-1 for the registered
// vectors of its group. The global address is v_i + (i-1)(2^R-1) for the cascade whose
// v_i is non-zero, and 0 when all are zero. Because every registered vector belongs to
// exactly one group, at most one v_i is non-zero for a given input; should several be
// non-zero anyway (contents loaded inconsistently) the lowest-numbered cascade wins,
// which is this design's choice. The encoder is purely combinational: its delay adds
// to the clock-to-output time of the last cells.
//
// Interface: v[G][R] (v[0] is cascade 1), vout[OUT_W].
module special_encoder #(
  parameter int unsigned G     = 2,
  parameter int unsigned R     = 5,
  parameter int unsigned OUT_W = $clog2(G * (2 ** R - 1) + 1)
) (
  input  logic [G-1:0][R-1:0] v,
  output logic [OUT_W-1:0]    vout
);

  localparam int unsigned GROUP_SIZE = 2 ** R - 1;

  always_comb begin
    vout = '0;
    for (int i = G - 1; i >= 0; i--) begin
      if (v[i] != '0) vout = OUT_W'(v[i]) + OUT_W'(i * GROUP_SIZE);
    end
  end

endmodule
