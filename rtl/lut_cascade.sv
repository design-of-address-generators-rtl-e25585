// lut_cascade: one LUT cascade realizing the address generation function of one group.
//
// S = 1 + ceil((N-P)/(P-R)) cells are chained. Cell 1 is addressed by the first P
// primary inputs; cell j>1 by the R rails of cell j-1 followed by its own P-R primary
// inputs; the last cell by the rails and the remaining inputs. The last cell returns
// the local address of the matching registered vector (1..2^R-1), or 0. In the OR
// architecture the last cell of every cascade but the first is LAST_W bits wide and
// stores addresses that already include the group offset.
//
// Each cell is a RAM with a registered output, so one level costs one clock. The
// cascade is pipelined: a new input vector can enter every clock, and the primary
// inputs of cell j are delayed j-1 clocks (skew registers) so that they meet the rails
// computed from the same vector. The result appears S clocks after x. The skew
// registers and the in_valid/out_valid tags are this design's choices; the published
// cascade gives one level per clock and one result per clock but does not show how the
// inputs are aligned.
//
// Writing (we high): every cell j is written at address {c[j], x_j} with d[j] (cell 1
// at address x_1, its c[0] is ignored). The x used for writing is the undelayed input.
// Cells other than the last use the low R bits of d[j]. A lookup that enters while we
// is high is not tagged valid.
//
// Interface: clk, rst_n (async, active low, clears the valid pipeline only), we,
// x[N-1:0] (x[N-1] is x_1), in_valid, c[S][R], d[S][LAST_W], v[LAST_W], out_valid.
module lut_cascade
  import addr_gen_pkg::*;
#(
  parameter int unsigned N      = 48,
  parameter int unsigned P      = 11,
  parameter int unsigned R      = 5,
  parameter int unsigned LAST_W = R,
  localparam int unsigned S     = num_levels(N, P, R)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [N-1:0]              x,
  input  logic                      in_valid,
  input  logic [S-1:0][R-1:0]       c,
  input  logic [S-1:0][LAST_W-1:0]  d,
  output logic [LAST_W-1:0]         v,
  output logic                      out_valid
);

  // Rails leaving each cell except the last.
  logic [R-1:0] rail [S];

  for (genvar j = 0; j < S; j++) begin : g_cell
    localparam int unsigned XW  = cell_x_width(N, P, R, j);
    localparam int unsigned OFF = cell_x_offset(P, R, j);
    localparam int unsigned AW  = cell_addr_width(N, P, R, j);
    localparam int unsigned DW  = (j == S - 1) ? LAST_W : R;

    logic [XW-1:0] x_now;   // this cell's inputs, as applied now
    logic [XW-1:0] x_dly;   // the same inputs, delayed to meet the rails
    logic [AW-1:0] rd_addr;
    logic [AW-1:0] wr_addr;
    logic [DW-1:0] q;

    assign x_now = x[N-1-OFF -: XW];

    if (j == 0) begin : g_first
      assign x_dly   = x_now;
      assign rd_addr = x_dly;
      assign wr_addr = x_now;
    end else begin : g_next
      logic [XW-1:0] skew [j];
      always_ff @(posedge clk) begin
        skew[0] <= x_now;
        for (int i = 1; i < j; i++) skew[i] <= skew[i-1];
      end
      assign x_dly   = skew[j-1];
      assign rd_addr = {rail[j-1], x_dly};
      assign wr_addr = {c[j], x_now};
    end

    lut_cell #(.ADDR_W(AW), .DATA_W(DW)) u_cell (
      .clk    (clk),
      .we     (we),
      .rd_addr(rd_addr),
      .wr_addr(wr_addr),
      .wdata  (d[j][DW-1:0]),
      .q      (q)
    );

    if (j == S - 1) begin : g_out
      assign v       = q;
      assign rail[j] = '0;
    end else begin : g_rail
      assign rail[j] = q;
    end
  end

  // Valid tag travels with the data: one stage per level.
  logic [S-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= S'({vld, in_valid & ~we});
  end
  assign out_valid = vld[S-1];

endmodule
