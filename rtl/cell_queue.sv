// cell_queue: stores and releases cells per virtual connection in one shared
// cell buffer, as one linked list per connection.
//
// Store (one clock per cell): a cell from the service side waits in the
// one-cell FIFO while vc_lookup translates its VPI/VCI into a list number n.
// The write address memory gives the next write position W[n] of list n, a
// location already reserved for it. The cell is written there together with
// a tag: the address A at the head of the idle address FIFO. A is popped and
// becomes W[n], the new next write position.
// Release (two clocks): for a list n the read address memory gives R[n]. If
// R[n] == W[n] the list is empty and rel_empty is returned. Otherwise the
// buffer is read at R[n]; one clock later the cell is returned, R[n] is
// replaced by the tag (the address of the next cell) and the old R[n] is
// pushed back into the idle address FIFO.
// The CPU sets W[n] = R[n] = a distinct address per list and loads every
// other address into the idle address FIFO before cells flow.
// A cell whose VPI/VCI matches no list, or that arrives when no idle address
// is left, is dropped and counted in drop_cnt (the document does not say what
// happens then; dropping is this design's choice).
// The procedure follows the document step by step; the 2-clock release and
// the drop policy are this design's.
module cell_queue
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC = 32,
  parameter int unsigned AW     = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // CPU initialisation
  input  logic                      cpu_vctab_we,
  input  logic                      cpu_wraddr_we,
  input  logic                      cpu_rdaddr_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_idx,
  input  logic                      cpu_vc_valid,
  input  logic [VCKEY_W-1:0]        cpu_vc_key,
  input  logic [AW-1:0]             cpu_addr,
  input  logic                      cpu_iaf_push,
  // cells from the service side
  input  logic                      in_valid,
  output logic                      in_ready,
  input  cell_t                     in_cell,
  // release requests from the transmit controller
  input  logic                      rel_req,
  input  logic [$clog2(NUM_VC)-1:0] rel_list,
  output logic                      rel_done,
  output logic                      rel_empty,
  output cell_t                     rel_cell,
  // status
  output logic [15:0]               drop_cnt,
  output logic [AW:0]               idle_cnt,
  output logic                      stored,
  output logic                      dropped
);
  localparam int unsigned LW = $clog2(NUM_VC);

  cell_t          fifo_cell;
  logic           fifo_valid;
  logic           hit;
  logic [LW-1:0]  st_list;
  logic [AW-1:0]  wam_st, wam_rel, ram_rel, unused_rd2;
  logic           iaf_ne, iaf_pop;
  logic [AW-1:0]  iaf_head;
  logic           do_store, do_read;
  logic           rd_pend_q;
  logic [LW-1:0]  rd_list_q;
  logic [AW-1:0]  rd_addr_q;
  logic [AW-1:0]  rd_tag;

  one_cell_fifo u_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_cell,
    .out_valid(fifo_valid), .out_ready(1'b1), .out_cell(fifo_cell)
  );

  vc_lookup #(.NUM_VC(NUM_VC)) u_lookup (
    .clk, .rst_n,
    .cpu_we(cpu_vctab_we), .cpu_idx, .cpu_valid(cpu_vc_valid), .cpu_key(cpu_vc_key),
    .key(vc_key(fifo_cell.hdr)), .hit, .list_no(st_list)
  );

  assign do_store = fifo_valid && hit && iaf_ne;
  assign iaf_pop  = do_store;
  assign stored   = do_store;
  assign dropped  = fifo_valid && !do_store;

  list_addr_mem #(.NUM_VC(NUM_VC), .AW(AW)) u_wram (
    .clk,
    .cpu_we(cpu_wraddr_we), .cpu_idx, .cpu_data(cpu_addr),
    .rd_idx(st_list), .rd_data(wam_st),
    .rd2_idx(rel_list), .rd2_data(wam_rel),
    .wr_en(do_store), .wr_idx(st_list), .wr_data(iaf_head)
  );

  list_addr_mem #(.NUM_VC(NUM_VC), .AW(AW)) u_rdam (
    .clk,
    .cpu_we(cpu_rdaddr_we), .cpu_idx, .cpu_data(cpu_addr),
    .rd_idx(rel_list), .rd_data(ram_rel),
    .rd2_idx(rel_list), .rd2_data(unused_rd2),
    .wr_en(rd_pend_q), .wr_idx(rd_list_q), .wr_data(rd_tag)
  );

  idle_addr_fifo #(.AW(AW)) u_iaf (
    .clk, .rst_n,
    .cpu_push(cpu_iaf_push), .cpu_addr(cpu_addr),
    .rel_push(rd_pend_q), .rel_addr(rd_addr_q),
    .pop(iaf_pop), .not_empty(iaf_ne), .head(iaf_head), .count(idle_cnt)
  );

  assign do_read = rel_req && (ram_rel != wam_rel);

  cell_buffer #(.AW(AW)) u_buf (
    .clk,
    .wr_en(do_store), .wr_addr(wam_st), .wr_cell(fifo_cell), .wr_tag(iaf_head),
    .rd_en(do_read), .rd_addr(ram_rel), .rd_cell(rel_cell), .rd_tag(rd_tag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend_q <= 1'b0;
      rel_done  <= 1'b0;
      rel_empty <= 1'b0;
      drop_cnt  <= '0;
    end else begin
      rd_pend_q <= do_read;
      rel_done  <= rel_req;
      rel_empty <= rel_req && !do_read;
      if (fifo_valid && !do_store && drop_cnt != '1) drop_cnt <= drop_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_read) begin
      rd_list_q <= rel_list;
      rd_addr_q <= ram_rel;
    end
  end

  // A request may follow one clock after another only if that one found its
  // list empty: otherwise the read address of the list is still being updated.
  assert property (@(posedge clk) disable iff (!rst_n) rel_req |=> !(rel_req && rd_pend_q));
endmodule
