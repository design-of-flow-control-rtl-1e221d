// rm_cell_input: the RM cell input block on the receive path.
//
// Every received cell is checked: a cell with payload type PT = 3'b110 whose
// VPI/VCI belongs to an ABR list is an RM cell of this module; it is taken
// out of the stream and queued in the received-RM FIFO, where the CPU reads
// and analyses it. rm_pending (the interrupt) is high while that FIFO holds a
// cell. All other cells go on unchanged to the service side, one clock later.
// For data cells (PT[2] = 0) of ABR lists the EFCI bit (PT[1]) is tracked per
// list in efci_state; a change sets the list's bit in efci_changed, which the
// CPU clears by writing ones to efci_clr (the software is told of EFCI changes
// by polling or interrupt, as the document requires).
// A received RM cell that finds the FIFO full is dropped and counted.
// The PT test, the per-connection filtering and the interrupt are the
// document's; the FIFO depth, the EFCI bookkeeping registers and the drop
// policy are this design's choices.
module rm_cell_input
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC   = 32,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // connection table, written together with the transmit side's table
  input  logic                      cpu_vctab_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_idx,
  input  logic                      cpu_vc_valid,
  input  logic [VCKEY_W-1:0]        cpu_vc_key,
  // receive cell stream from the ATM side
  input  logic                      rx_valid,
  input  cell_t                     rx_cell,
  // cells on to the service side
  output logic                      svc_valid,
  output cell_t                     svc_cell,
  // received RM cells for the CPU
  input  logic                      rm_pop,
  output cell_t                     rm_head,
  output logic [$clog2(RX_DEPTH+1)-1:0] rm_count,
  output logic                      rm_pending,
  output logic [15:0]               rm_drop_cnt,
  // EFCI tracking
  output logic [NUM_VC-1:0]         efci_state,
  output logic [NUM_VC-1:0]         efci_changed,
  input  logic [NUM_VC-1:0]         efci_clr
);
  localparam int unsigned LW = $clog2(NUM_VC);

  logic          hit;
  logic [LW-1:0] list;
  logic          is_rm, is_data, ovf;

  vc_lookup #(.NUM_VC(NUM_VC)) u_lookup (
    .clk, .rst_n,
    .cpu_we(cpu_vctab_we), .cpu_idx, .cpu_valid(cpu_vc_valid), .cpu_key(cpu_vc_key),
    .key(vc_key(rx_cell.hdr)), .hit, .list_no(list)
  );

  assign is_rm   = rx_valid && hit && rx_cell.hdr.pt == PT_RM;
  assign is_data = rx_valid && hit && !rx_cell.hdr.pt[2];

  sync_fifo #(.W(CELL_BITS), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst_n, .push(is_rm), .din(rx_cell),
    .pop(rm_pop), .dout(rm_head), .not_empty(rm_pending),
    .full(), .overflow(ovf), .count(rm_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      svc_valid    <= 1'b0;
      efci_state   <= '0;
      efci_changed <= '0;
      rm_drop_cnt  <= '0;
    end else begin
      svc_valid <= rx_valid && !is_rm;
      if (ovf && rm_drop_cnt != '1) rm_drop_cnt <= rm_drop_cnt + 1'b1;
      efci_changed <= efci_changed & ~efci_clr;
      if (is_data && efci_state[list] != rx_cell.hdr.pt[1]) begin
        efci_state[list]   <= rx_cell.hdr.pt[1];
        efci_changed[list] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rx_valid) svc_cell <= rx_cell;
  end
endmodule
