// cell_buffer: the shared cell memory.
//
// 2**AW locations, each holding one 53-octet cell and a tag: the address of
// the next cell of the same list. All virtual connections share it; the
// lists are threaded through the tags. One write port stores {cell, tag} at
// wr_addr; one read port returns {cell, tag} of rd_addr one clock after
// rd_en (synchronous read, as an SRAM). Contents are not reset.
// The cell-plus-next-address layout is the document's; the one-clock
// read and the separate read and write ports are this design's choices.
module cell_buffer
  import abr_pkg::*;
#(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  cell_t         wr_cell,
  input  logic [AW-1:0] wr_tag,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output cell_t         rd_cell,
  output logic [AW-1:0] rd_tag
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [CELL_BITS+AW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= {wr_cell, wr_tag};
    if (rd_en) {rd_cell, rd_tag} <= mem[rd_addr];
  end
endmodule
