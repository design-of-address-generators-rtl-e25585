// or_encoder: output stage of the multiple LUT cascade OR architecture.
//
// In the OR architecture the last cell of cascade i already stores the global address
// v_i + (i-1)(2^R-1), and at most one cascade returns a non-zero word for any input,
// so the encoder reduces to one OR gate per output bit. The first cascade has only R
// output bits; they are zero-extended here by the caller.
//
// Interface: z[G][OUT_W] (z[0] is cascade 1), vout[OUT_W]. Purely combinational.
module or_encoder #(
  parameter int unsigned G     = 2,
  parameter int unsigned OUT_W = 6
) (
  input  logic [G-1:0][OUT_W-1:0] z,
  output logic [OUT_W-1:0]        vout
);

  always_comb begin
    vout = '0;
    for (int i = 0; i < G; i++) vout |= z[i];
  end

endmodule
