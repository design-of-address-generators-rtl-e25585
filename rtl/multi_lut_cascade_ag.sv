// multi_lut_cascade_ag: address generator built from multiple LUT cascades.
//
// The generator returns, for an N-bit input vector, the address 1..K of the registered
// vector it equals, or 0 when it matches none. The K registered vectors are split into
// G = ceil(K/(2^R-1)) groups; each group is realized by its own LUT cascade of
// S = 1 + ceil((N-P)/(P-R)) RAM cells with P address lines and R rails, all cascades
// reading the same inputs. An encoder merges the G local addresses into the global one.
// Two output architectures are available:
//   OR_ARCH = 0  multiple LUT cascade: last cells return local addresses (R bits) and a
//                special encoder adds the group offset (i-1)(2^R-1);
//   OR_ARCH = 1  multiple LUT cascade OR: the last cell of every cascade but the first
//                holds the offset address itself (OUT_W bits) and the encoder is an OR.
// The defaults are the r5p11 generator: 48 inputs, 62 registered vectors, 2 cascades of
// 8 cells, each cell a 2^11 x 5 RAM, 6 output bits.
//
// The RAM contents (one address generation function per group, found by functional
// decomposition) are computed off-chip and written through the cell write ports: while
// we[i] is high, every cell j of cascade i writes d[i][j] at address {c[i][j], x_j}.
// Cells other than the last, and the last cells of the plain architecture, use the low
// R bits of d. A complete load of a cascade takes 2^P write clocks, one per word of the
// largest cell; a single group can be reloaded while the others keep their contents.
//
// Timing: fully pipelined, one lookup per clock; addr and out_valid follow in_valid by
// S clocks. out_valid is low for lookups applied while any we bit is high. The per-group
// write enables, the valid tags and the reset (it clears only the valid pipeline) are
// this design's own choices. An assertion flags a lookup for which more than one
// cascade reports a match, which only inconsistent RAM contents can cause.
module multi_lut_cascade_ag
  import addr_gen_pkg::*;
#(
  parameter int unsigned N       = 48,
  parameter int unsigned K       = 62,
  parameter int unsigned R       = 5,
  parameter int unsigned P       = 11,
  parameter bit          OR_ARCH = 1'b0,
  localparam int unsigned G      = num_groups(K, R),
  localparam int unsigned S      = num_levels(N, P, R),
  localparam int unsigned OUT_W  = out_width(K, R),
  localparam int unsigned D_W    = OR_ARCH ? OUT_W : R
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [G-1:0]                  we,
  input  logic [N-1:0]                  x,
  input  logic                          in_valid,
  input  logic [G-1:0][S-1:0][R-1:0]    c,
  input  logic [G-1:0][S-1:0][D_W-1:0]  d,
  output logic [OUT_W-1:0]              addr,
  output logic                          out_valid
);

  logic [G-1:0]            grp_valid;
  logic [G-1:0][OUT_W-1:0] grp_v;      // each cascade's result, zero-extended

  for (genvar i = 0; i < G; i++) begin : g_casc
    // The OR architecture widens the last cell of every cascade but the first.
    localparam int unsigned LAST_W = (OR_ARCH && i > 0) ? OUT_W : R;

    logic [S-1:0][LAST_W-1:0] d_c;
    logic [LAST_W-1:0]        v;

    always_comb begin
      for (int j = 0; j < S; j++) d_c[j] = d[i][j][LAST_W-1:0];
    end

    lut_cascade #(.N(N), .P(P), .R(R), .LAST_W(LAST_W)) u_cascade (
      .clk      (clk),
      .rst_n    (rst_n),
      .we       (we[i]),
      .x        (x),
      .in_valid (in_valid & ~(|we)),
      .c        (c[i]),
      .d        (d_c),
      .v        (v),
      .out_valid(grp_valid[i])
    );

    assign grp_v[i] = OUT_W'(v);
  end

  if (OR_ARCH) begin : g_or
    or_encoder #(.G(G), .OUT_W(OUT_W)) u_enc (
      .z   (grp_v),
      .vout(addr)
    );
  end else begin : g_special
    logic [G-1:0][R-1:0] v_loc;
    always_comb begin
      for (int i = 0; i < G; i++) v_loc[i] = grp_v[i][R-1:0];
    end
    special_encoder #(.G(G), .R(R), .OUT_W(OUT_W)) u_enc (
      .v   (v_loc),
      .vout(addr)
    );
  end

  assign out_valid = &grp_valid;

  // Every registered vector lives in exactly one group, so consistent contents never
  // let two cascades report a match for the same lookup.
  logic [G-1:0] grp_hit;
  always_comb begin
    for (int i = 0; i < G; i++) grp_hit[i] = (grp_v[i] != '0);
  end

  a_one_group_hits: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $onehot0(grp_hit))
    else $error("more than one cascade matched: RAM contents are inconsistent");

endmodule
