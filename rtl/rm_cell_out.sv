// rm_cell_out: the hardware half of the RM cell output block.
//
// Software prepares RM cells; this block holds them and sends them with a
// fresh CRC-10. Forward RM cells: the software keeps one forward RM cell per
// list in a template memory (tpl_we writes list tpl_list), updating it
// whenever a rate parameter carried in it changes. When rm_emission_ctrl says
// a forward RM cell is due on a list (frm_req), the list number is queued in
// the RM request FIFO. Backward RM cells: the software pushes complete
// backward RM cells into their own FIFO (brm_push) as soon as it has turned
// a received forward RM cell around.
// Towards the transmit controller the block offers one RM cell at a time
// (rm_valid, rm_cell, rm_is_bwd). A backward RM cell goes first, since it
// must be sent as fast as possible; otherwise the template of the oldest
// queued forward request. rm_take removes the offered cell. The last 10
// payload bits of the offered cell are replaced by the CRC-10 of the other
// 374 payload bits.
// Separate forward and backward queues and CRC-10 generation in hardware are
// the document's; the per-list template memory, queue depths and priority
// are this design's choices.
module rm_cell_out
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC    = 32,
  parameter int unsigned BRM_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tpl_we,
  input  logic [$clog2(NUM_VC)-1:0] tpl_list,
  input  cell_t                     tpl_cell,
  input  logic                      brm_push,
  input  cell_t                     brm_cell,
  input  logic                      frm_req,
  input  logic [$clog2(NUM_VC)-1:0] frm_list,
  output logic                      rm_valid,
  output cell_t                     rm_cell,
  output logic                      rm_is_bwd,
  output logic [$clog2(NUM_VC)-1:0] rm_list,
  input  logic                      rm_take,
  output logic                      frm_overflow,
  output logic                      brm_overflow
);
  localparam int unsigned LW = $clog2(NUM_VC);

  cell_t         tpl_q [NUM_VC];
  cell_t         brm_head, sel;
  logic          brm_ne, frq_ne;
  logic [LW-1:0] frq_head;
  logic [9:0]    crc;

  always_ff @(posedge clk) begin
    if (tpl_we) tpl_q[tpl_list] <= tpl_cell;
  end

  sync_fifo #(.W(LW), .DEPTH(NUM_VC)) u_frq (
    .clk, .rst_n, .push(frm_req), .din(frm_list),
    .pop(rm_take && !brm_ne), .dout(frq_head), .not_empty(frq_ne),
    .full(), .overflow(frm_overflow), .count()
  );

  sync_fifo #(.W(CELL_BITS), .DEPTH(BRM_DEPTH)) u_brm (
    .clk, .rst_n, .push(brm_push), .din(brm_cell),
    .pop(rm_take && brm_ne), .dout(brm_head), .not_empty(brm_ne),
    .full(), .overflow(brm_overflow), .count()
  );

  assign sel       = brm_ne ? brm_head : tpl_q[frq_head];
  assign rm_valid  = brm_ne || frq_ne;
  assign rm_is_bwd = brm_ne;
  assign rm_list   = frq_head;

  crc10 u_crc (.data(sel.payload[PAYLOAD_BITS-1:10]), .crc);

  always_comb begin
    rm_cell = sel;
    rm_cell.payload[9:0] = crc;
  end
endmodule
