// cpu_if: the CPU interface of the flow control module.
//
// Software owns every parameter of the flow control: it initialises the
// connection table, the address memories and the idle address FIFO, writes
// the allowed emission interval of each connection, the RM parameters, the
// forward RM cell of each connection and the backward RM cells, and reads the
// received RM cells. This block decodes a simple 32-bit word-addressed bus
// into those write strobes and returns status on reads. Address bits [15:12]
// select a region (see abr_pkg::cpu_region_e), bits [11:0] an index.
// Cells are 424 bits, so they pass through a 14-word staging register:
// the CPU writes the words, then writes R_FRMTPL (list) or R_BRMPUSH to copy
// the staged cell. Received RM cells are read word by word from R_RXRM and
// popped by a write to R_RXRM.
// Bus timing: cpu_wr and cpu_rd are one-clock strobes; a write takes effect
// at the clock edge, read data is valid in cpu_rdata the clock after cpu_rd.
// irq is high while a received RM cell waits or an EFCI change is unread.
// The division of work between software and hardware is the document's; the
// bus, the register map and the staging register are this design's.
module cpu_if
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC   = 32,
  parameter int unsigned AW       = 15,
  parameter int unsigned AEI_W    = 16,
  parameter int unsigned TRM_W    = 16,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // CPU bus
  input  logic                      cpu_wr,
  input  logic                      cpu_rd,
  input  logic [15:0]               cpu_addr,
  input  logic [31:0]               cpu_wdata,
  output logic [31:0]               cpu_rdata,
  output logic                      irq,
  // connection table and address memories
  output logic                      vctab_we,
  output logic                      wraddr_we,
  output logic                      rdaddr_we,
  output logic [$clog2(NUM_VC)-1:0] list_idx,
  output logic                      vc_valid,
  output logic [VCKEY_W-1:0]        vc_id,
  output logic [AW-1:0]             addr_data,
  output logic                      iaf_push,
  // emission scheduler parameter memory
  output logic                      sched_we,
  output logic [$clog2(NUM_VC)-1:0] sched_entry,
  output logic                      sched_field,
  output logic [$clog2(NUM_VC)-1:0] sched_list,
  output logic [AEI_W-1:0]          sched_value,
  // RM parameter memory
  output logic                      rmpar_we,
  output logic [$clog2(NUM_VC)-1:0] rmpar_list,
  output logic [1:0]                rmpar_field,
  output logic [TRM_W-1:0]          rmpar_value,
  // RM cells
  output logic                      tpl_we,
  output logic                      brm_push,
  output cell_t                     stage_cell,
  output logic                      rxrm_pop,
  input  cell_t                     rxrm_head,
  input  logic [$clog2(RX_DEPTH+1)-1:0] rxrm_count,
  input  logic                      rxrm_pending,
  input  logic [15:0]               rxrm_drops,
  // EFCI
  input  logic [NUM_VC-1:0]         efci_state,
  input  logic [NUM_VC-1:0]         efci_changed,
  output logic [NUM_VC-1:0]         efci_clr,
  // other status
  input  logic [15:0]               store_drops,
  input  logic [AW:0]               idle_count,
  input  logic                      ev_permit_ovf,
  input  logic                      ev_frm_ovf,
  input  logic                      ev_brm_ovf
);
  localparam int unsigned LW = $clog2(NUM_VC);

  cpu_region_e region;
  logic [11:0] idx;
  logic [CELL_WORDS*32-1:0] stage_q;
  logic [15:0] permit_drops_q, frm_drops_q, brm_drops_q;
  logic [31:0] rd_mux;

  assign region = cpu_region_e'(cpu_addr[15:12]);
  assign idx    = cpu_addr[11:0];

  assign vctab_we    = cpu_wr && region == R_VCTAB;
  assign wraddr_we   = cpu_wr && region == R_WRADDR;
  assign rdaddr_we   = cpu_wr && region == R_RDADDR;
  assign iaf_push    = cpu_wr && region == R_IAF;
  assign list_idx    = LW'(idx);
  assign vc_valid    = cpu_wdata[24];
  assign vc_id       = cpu_wdata[VCKEY_W-1:0];
  assign addr_data   = AW'(cpu_wdata);

  assign sched_we    = cpu_wr && region == R_SCHED;
  assign sched_entry = LW'(idx >> 1);
  assign sched_field = idx[0];
  assign sched_list  = LW'(cpu_wdata[28:16]);
  assign sched_value = AEI_W'(cpu_wdata);

  assign rmpar_we    = cpu_wr && region == R_RMPAR;
  assign rmpar_list  = LW'(idx >> 2);
  assign rmpar_field = idx[1:0];
  assign rmpar_value = TRM_W'(cpu_wdata);

  assign tpl_we      = cpu_wr && region == R_FRMTPL;
  assign brm_push    = cpu_wr && region == R_BRMPUSH;
  assign stage_cell  = stage_q[CELL_WORDS*32-1 -: CELL_BITS];
  assign rxrm_pop    = cpu_wr && region == R_RXRM;
  assign efci_clr    = (cpu_wr && region == R_STATUS && idx == 12'd4) ?
                       NUM_VC'(cpu_wdata) : '0;

  assign irq = rxrm_pending || (efci_changed != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q        <= '0;
      permit_drops_q <= '0;
      frm_drops_q    <= '0;
      brm_drops_q    <= '0;
      cpu_rdata      <= '0;
    end else begin
      if (cpu_wr && region == R_STAGE && idx < 12'(CELL_WORDS))
        stage_q[(CELL_WORDS-1-int'(idx))*32 +: 32] <= cpu_wdata;
      if (ev_permit_ovf && permit_drops_q != '1) permit_drops_q <= permit_drops_q + 1'b1;
      if (ev_frm_ovf && frm_drops_q != '1) frm_drops_q <= frm_drops_q + 1'b1;
      if (ev_brm_ovf && brm_drops_q != '1) brm_drops_q <= brm_drops_q + 1'b1;
      if (cpu_rd) cpu_rdata <= rd_mux;
    end
  end

  always_comb begin
    rd_mux = '0;
    case (region)
      R_STATUS: case (idx)
        12'd0: rd_mux = {30'd0, efci_changed != '0, rxrm_pending};
        12'd1: rd_mux = 32'(rxrm_count);
        12'd2: rd_mux = 32'(store_drops);
        12'd3: rd_mux = 32'(efci_state);
        12'd4: rd_mux = 32'(efci_changed);
        12'd5: rd_mux = 32'(permit_drops_q);
        12'd6: rd_mux = 32'(rxrm_drops);
        12'd7: rd_mux = 32'(idle_count);
        12'd8: rd_mux = 32'(frm_drops_q);
        12'd9: rd_mux = 32'(brm_drops_q);
        default: rd_mux = '0;
      endcase
      R_STAGE: if (idx < 12'(CELL_WORDS))
                 rd_mux = stage_q[(CELL_WORDS-1-int'(idx))*32 +: 32];
      R_RXRM:  if (idx < 12'(CELL_WORDS)) rd_mux = cell_word(rxrm_head, int'(idx));
      default: rd_mux = '0;
    endcase
  end
endmodule
