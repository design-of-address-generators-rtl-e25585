// lut_cell: one cell of an LUT cascade, a single-port synchronous RAM with an address mux.
//
// In lookup mode (we low) the RAM address is rd_addr, formed by the cascade from the
// previous cell's rails and this cell's primary inputs; the word read appears on q one
// clock later, as from a registered block RAM port. In write mode (we high) the address
// is wr_addr, formed from the write-select inputs c_j and the primary inputs, and wdata
// (d_j) is written there. The RAM is read-first: during a write q shows the old word.
// The mux in front of the RAM and the single-port use of the memory follow the cell of
// the published cascade; read-first behaviour and the absence of a reset on the memory
// are this design's choices (the contents are loaded by the host before lookups).
//
// Interface: clk, we, rd_addr[ADDR_W], wr_addr[ADDR_W], wdata[DATA_W], q[DATA_W].
// Timing: one clock from address to q.
module lut_cell #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned DATA_W = 5
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2 ** ADDR_W];
  logic [ADDR_W-1:0] addr;

  assign addr = we ? wr_addr : rd_addr;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    q <= mem[addr];
  end

endmodule
