// abr_pkg: types and constants shared by the ABR flow control module.
//
// An ATM cell is 53 octets: a 5-octet UNI header and a 48-octet payload.
// Cells move through this design as one 424-bit word, first octet in the
// most significant bits. The header layout (GFC, VPI, VCI, PT, CLP, HEC) and
// the RM payload type PT = 3'b110 follow the ATM standards; the one-word cell
// transport, the CPU bus map and the field widths are this design's choices.
package abr_pkg;

  localparam int CELL_BYTES = 53;
  localparam int CELL_BITS  = CELL_BYTES * 8;       // 424
  localparam int PAYLOAD_BITS = 48 * 8;             // 384
  localparam int VCKEY_W = 24;                      // VPI (8) + VCI (16), UNI format

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
    logic [7:0]  hec;
  } cell_hdr_t;

  typedef struct packed {
    cell_hdr_t               hdr;
    logic [PAYLOAD_BITS-1:0] payload;
  } cell_t;

  // One-clock event strobes brought out of the top for monitoring
  typedef struct packed {
    logic stored;       // a cell was written into the shared buffer
    logic store_drop;   // a cell was dropped (unknown connection or no idle address)
    logic permit;       // the scheduler permitted a list
    logic permit_drop;  // a permit found the permit FIFO full
    logic data_sent;    // a data cell was sent
    logic empty_skip;   // a permitted list had no cell
    logic frm_by_nrm;   // forward RM cell requested by the Nrm rule
    logic frm_by_trm;   // forward RM cell requested by the Mrm/Trm rule
    logic rm_sent;      // an RM cell was sent
  } abr_events_t;

  // Payload type values
  localparam logic [2:0] PT_RM = 3'b110;            // resource management cell

  // Key used to identify a virtual connection
  function automatic logic [VCKEY_W-1:0] vc_key(cell_hdr_t h);
    return {h.vpi, h.vci};
  endfunction

  // ---------------------------------------------------------------------
  // CPU bus map. Word addresses of 16 bits: [15:12] region, [11:0] index.
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    R_STATUS  = 4'h0,  // 0: irq status, 1: rx RM count, 2: store drops, 3: EFCI state,
                       // 4: EFCI changed (write 1 to clear), 5: permit drops, 6: rx RM drops,
                       // 7: idle addresses left; write to 0 clears irq bits written as 1
    R_VCTAB   = 4'h1,  // [list]  {valid[24], vpi[23:16], vci[15:0]}
    R_WRADDR  = 4'h2,  // [list]  write address memory
    R_RDADDR  = 4'h3,  // [list]  read address memory
    R_IAF     = 4'h4,  // push an address into the idle address FIFO
    R_SCHED   = 4'h5,  // [2*entry]   {list_no[28:16], AEI[15:0]}; [2*entry+1] TCD
    R_RMPAR   = 4'h6,  // [4*list+f]  f=0 Nrm, 1 Mrm, 2 Trm, 3 clear Ndt and Trc
    R_STAGE   = 4'h7,  // [0..13] 32-bit words of the cell staging register
    R_FRMTPL  = 4'h8,  // [list]  copy the staging register to the forward RM template
    R_BRMPUSH = 4'h9,  // push the staging register into the backward RM FIFO
    R_RXRM    = 4'hA   // read: [0..13] words of the oldest received RM cell; write: pop it
  } cpu_region_e;

  localparam int CELL_WORDS = 14;                   // 14 x 32 bits hold 424 bits

  // Word i of a cell, first octets in word 0; the last word is zero-padded.
  function automatic logic [31:0] cell_word(cell_t c, int unsigned i);
    logic [CELL_WORDS*32-1:0] w;
    w = {c, 24'h0};
    return w[(CELL_WORDS-1-i)*32 +: 32];
  endfunction

endpackage
