// abr_flow_ctrl: the ABR flow control function module of an ATM end system.
//
// Transmit path (service side -> link): cells from the user application are
// queued per virtual connection in one shared cell buffer (cell_queue). Once
// per cell transmission time the emission scheduler sweeps its parameter
// memory and permits every connection whose allowed emission interval has
// elapsed; the transmit controller sends, per cell time, either a waiting RM
// cell or the head cell of a permitted connection. Every data cell sent is
// counted by the RM emission control, which requests a forward RM cell after
// Nrm cells, or after Mrm cells once Trm has elapsed; the RM cell output block
// holds the forward RM cells per connection and the backward RM cells and
// adds the CRC-10.
// Receive path (link -> service side): the RM cell input block takes the RM
// cells of ABR connections out of the stream for the CPU and tracks EFCI.
// Software on an external CPU calculates the allowed cell rate and all other
// parameters and reaches the module through the CPU bus (cpu_if).
// Interfaces: cells are 424-bit words (abr_pkg::cell_t) with one-clock valid
// strobes; the service transmit side has a ready. atm_tx_valid carries at
// most one cell per cell time of CELL_CLKS clocks; slot_start marks each
// cell time for the ATM interface. `events` carries one-clock strobes of the
// internal mechanisms for monitoring. The split into blocks and the software /
// hardware division are the document's; the bus, cell transport and
// arbitration details are this design's choices.
module abr_flow_ctrl
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC    = 32,
  parameter int unsigned AW        = 15,
  parameter int unsigned AEI_W     = 16,
  parameter int unsigned CELL_CLKS = 53,
  parameter int unsigned CNT_W     = 9,
  parameter int unsigned TRM_W     = 16,
  parameter int unsigned RX_DEPTH  = 16,
  parameter int unsigned BRM_DEPTH = 16,
  parameter int unsigned MAX_TRY   = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // service interface, transmit direction
  input  logic        svc_tx_valid,
  output logic        svc_tx_ready,
  input  cell_t       svc_tx_cell,
  // ATM interface, transmit direction
  output logic        slot_start,
  output logic        atm_tx_valid,
  output cell_t       atm_tx_cell,
  output logic        atm_tx_is_rm,
  // ATM interface, receive direction
  input  logic        atm_rx_valid,
  input  cell_t       atm_rx_cell,
  // service interface, receive direction
  output logic        svc_rx_valid,
  output cell_t       svc_rx_cell,
  // CPU bus
  input  logic        cpu_wr,
  input  logic        cpu_rd,
  input  logic [15:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        irq,
  // event strobes for monitoring
  output abr_events_t events
);
  localparam int unsigned LW = $clog2(NUM_VC);

  // CPU strobes
  logic               vctab_we, wraddr_we, rdaddr_we, iaf_push;
  logic [LW-1:0]      list_idx;
  logic               vc_valid;
  logic [VCKEY_W-1:0] vc_key_w;
  logic [AW-1:0]      addr_data;
  logic               sched_we, sched_field;
  logic [LW-1:0]      sched_entry, sched_list;
  logic [AEI_W-1:0]   sched_value;
  logic               rmpar_we;
  logic [LW-1:0]      rmpar_list;
  logic [1:0]         rmpar_field;
  logic [TRM_W-1:0]   rmpar_value;
  logic               tpl_we, brm_push, rxrm_pop;
  cell_t              stage_cell, rxrm_head;
  logic [$clog2(RX_DEPTH+1)-1:0] rxrm_count;
  logic               rxrm_pending;
  logic [15:0]        rxrm_drops, store_drops;
  logic [NUM_VC-1:0]  efci_state, efci_changed, efci_clr;
  logic [AW:0]        idle_count;

  // datapath
  logic               permit_valid, sched_busy;
  logic [LW-1:0]      permit_list;
  logic               rel_req, rel_done, rel_empty;
  logic [LW-1:0]      rel_list;
  cell_t              rel_cell;
  logic               rm_valid, rm_take, rm_is_bwd;
  cell_t              rm_cell;
  logic [LW-1:0]      rm_list;
  logic               data_sent;
  logic [LW-1:0]      data_list;
  logic               frm_valid, frm_by_nrm, frm_by_trm;
  logic [LW-1:0]      frm_list;
  logic               empty_skip, permit_ovf, frm_ovf, brm_ovf, stored, svc_drop;
  logic [$clog2(CELL_CLKS)-1:0] slot_phase;

  cell_slot_timer #(.CELL_CLKS(CELL_CLKS)) u_slot (
    .clk, .rst_n, .slot_start, .slot_phase
  );

  cpu_if #(.NUM_VC(NUM_VC), .AW(AW), .AEI_W(AEI_W), .TRM_W(TRM_W), .RX_DEPTH(RX_DEPTH)) u_cpu (
    .clk, .rst_n,
    .cpu_wr, .cpu_rd, .cpu_addr, .cpu_wdata, .cpu_rdata, .irq,
    .vctab_we, .wraddr_we, .rdaddr_we, .list_idx, .vc_valid, .vc_id(vc_key_w),
    .addr_data, .iaf_push,
    .sched_we, .sched_entry, .sched_field, .sched_list, .sched_value,
    .rmpar_we, .rmpar_list, .rmpar_field, .rmpar_value,
    .tpl_we, .brm_push, .stage_cell, .rxrm_pop, .rxrm_head, .rxrm_count,
    .rxrm_pending, .rxrm_drops,
    .efci_state, .efci_changed, .efci_clr,
    .store_drops, .idle_count,
    .ev_permit_ovf(permit_ovf), .ev_frm_ovf(frm_ovf), .ev_brm_ovf(brm_ovf)
  );

  // cell rate control block: store and release part
  cell_queue #(.NUM_VC(NUM_VC), .AW(AW)) u_queue (
    .clk, .rst_n,
    .cpu_vctab_we(vctab_we), .cpu_wraddr_we(wraddr_we), .cpu_rdaddr_we(rdaddr_we),
    .cpu_idx(list_idx), .cpu_vc_valid(vc_valid), .cpu_vc_key(vc_key_w),
    .cpu_addr(addr_data), .cpu_iaf_push(iaf_push),
    .in_valid(svc_tx_valid), .in_ready(svc_tx_ready), .in_cell(svc_tx_cell),
    .rel_req, .rel_list, .rel_done, .rel_empty, .rel_cell,
    .drop_cnt(store_drops), .idle_cnt(idle_count), .stored, .dropped(svc_drop)
  );

  // cell rate control block: emission instance decision part
  emission_scheduler #(.NUM_VC(NUM_VC), .AEI_W(AEI_W)) u_sched (
    .clk, .rst_n, .slot_start,
    .cpu_we(sched_we), .cpu_entry(sched_entry), .cpu_field(sched_field),
    .cpu_list(sched_list), .cpu_value(sched_value),
    .permit_valid, .permit_list, .busy(sched_busy)
  );

  cell_tx_ctrl #(.NUM_VC(NUM_VC), .MAX_TRY(MAX_TRY)) u_tx (
    .clk, .rst_n, .slot_start, .permit_valid, .permit_list,
    .rm_valid, .rm_cell, .rm_take,
    .rel_req, .rel_list, .rel_done, .rel_empty, .rel_cell,
    .tx_valid(atm_tx_valid), .tx_cell(atm_tx_cell), .tx_is_rm(atm_tx_is_rm),
    .data_sent, .data_list, .empty_skip, .permit_overflow(permit_ovf)
  );

  // RM cell output block
  rm_emission_ctrl #(.NUM_VC(NUM_VC), .CNT_W(CNT_W), .TRM_W(TRM_W)) u_rmctl (
    .clk, .rst_n, .slot_start, .data_valid(data_sent), .data_list,
    .cpu_we(rmpar_we), .cpu_list(rmpar_list), .cpu_field(rmpar_field), .cpu_value(rmpar_value),
    .frm_valid, .frm_list, .frm_by_nrm, .frm_by_trm
  );

  rm_cell_out #(.NUM_VC(NUM_VC), .BRM_DEPTH(BRM_DEPTH)) u_rmout (
    .clk, .rst_n,
    .tpl_we, .tpl_list(list_idx), .tpl_cell(stage_cell),
    .brm_push, .brm_cell(stage_cell),
    .frm_req(frm_valid), .frm_list,
    .rm_valid, .rm_cell, .rm_is_bwd, .rm_list, .rm_take,
    .frm_overflow(frm_ovf), .brm_overflow(brm_ovf)
  );

  // RM cell input block
  rm_cell_input #(.NUM_VC(NUM_VC), .RX_DEPTH(RX_DEPTH)) u_rmin (
    .clk, .rst_n,
    .cpu_vctab_we(vctab_we), .cpu_idx(list_idx), .cpu_vc_valid(vc_valid), .cpu_vc_key(vc_key_w),
    .rx_valid(atm_rx_valid), .rx_cell(atm_rx_cell),
    .svc_valid(svc_rx_valid), .svc_cell(svc_rx_cell),
    .rm_pop(rxrm_pop), .rm_head(rxrm_head), .rm_count(rxrm_count), .rm_pending(rxrm_pending),
    .rm_drop_cnt(rxrm_drops),
    .efci_state, .efci_changed, .efci_clr
  );

  assign events = '{
    stored:      stored,
    store_drop:  svc_drop,
    permit:      permit_valid,
    permit_drop: permit_ovf,
    data_sent:   data_sent,
    empty_skip:  empty_skip,
    frm_by_nrm:  frm_by_nrm,
    frm_by_trm:  frm_by_trm,
    rm_sent:     atm_tx_valid && atm_tx_is_rm
  };

  initial assert (NUM_VC + 2 <= CELL_CLKS)
    else $error("NUM_VC parameter entries cannot be swept within one cell time");
endmodule
