// cell_tx_ctrl: chooses the cell sent in each cell transmission time.
//
// The emission scheduler may permit several lists during one sweep; their
// list numbers wait in a permit FIFO. At every slot_start this controller
// makes one decision:
//   1. if the RM cell output block offers an RM cell, that cell is sent;
//   2. otherwise the oldest permit is popped and the cell queue is asked to
//      release the head cell of that list. If the list is empty, the permit
//      is spent and the next permit is tried, up to MAX_TRY lists per cell
//      time; the first cell found is sent.
// A sent cell appears for one clock on tx_valid/tx_cell. For a data cell
// data_sent/data_list tell the RM emission control which list sent an
// in-rate cell. A permit that finds the FIFO full is lost and counted.
// The document feeds both RM and data cells into the cell emission interval
// control but does not say how they share the link; the order above, the
// permit FIFO and the handling of empty lists are this design's choices.
// Timing: an RM cell is sent 1 clock after slot_start, a data cell 2 clocks
// after (plus 1 per empty list tried).
module cell_tx_ctrl
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC  = 32,
  parameter int unsigned MAX_TRY = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      slot_start,
  input  logic                      permit_valid,
  input  logic [$clog2(NUM_VC)-1:0] permit_list,
  // RM cell output block
  input  logic                      rm_valid,
  input  cell_t                     rm_cell,
  output logic                      rm_take,
  // cell queue release port
  output logic                      rel_req,
  output logic [$clog2(NUM_VC)-1:0] rel_list,
  input  logic                      rel_done,
  input  logic                      rel_empty,
  input  cell_t                     rel_cell,
  // link side
  output logic                      tx_valid,
  output cell_t                     tx_cell,
  output logic                      tx_is_rm,
  // to the RM emission control
  output logic                      data_sent,
  output logic [$clog2(NUM_VC)-1:0] data_list,
  // events
  output logic                      empty_skip,
  output logic                      permit_overflow
);
  localparam int unsigned LW = $clog2(NUM_VC);
  localparam int unsigned TW = $clog2(MAX_TRY + 1);

  typedef enum logic [1:0] {S_IDLE, S_WAIT} state_e;
  state_e        state_q;
  logic          pf_ne, pf_pop;
  logic [LW-1:0] pf_head;
  logic [LW-1:0] list_q;
  logic [TW-1:0] tries_q;

  sync_fifo #(.W(LW), .DEPTH(NUM_VC)) u_permit (
    .clk, .rst_n, .push(permit_valid), .din(permit_list),
    .pop(pf_pop), .dout(pf_head), .not_empty(pf_ne),
    .full(), .overflow(permit_overflow), .count()
  );

  always_comb begin
    pf_pop   = 1'b0;
    rel_req  = 1'b0;
    rel_list = pf_head;
    rm_take  = 1'b0;
    if (state_q == S_IDLE && slot_start) begin
      if (rm_valid) rm_take = 1'b1;
      else if (pf_ne) begin
        pf_pop  = 1'b1;
        rel_req = 1'b1;
      end
    end else if (state_q == S_WAIT && rel_done && rel_empty && pf_ne &&
                 tries_q != TW'(MAX_TRY)) begin
      pf_pop  = 1'b1;
      rel_req = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      list_q     <= '0;
      tries_q    <= '0;
      tx_valid   <= 1'b0;
      tx_is_rm   <= 1'b0;
      data_sent  <= 1'b0;
      data_list  <= '0;
      empty_skip <= 1'b0;
    end else begin
      tx_valid   <= 1'b0;
      tx_is_rm   <= 1'b0;
      data_sent  <= 1'b0;
      empty_skip <= 1'b0;
      if (rel_req) begin
        list_q  <= rel_list;
        tries_q <= (state_q == S_IDLE) ? TW'(1) : tries_q + 1'b1;
        state_q <= S_WAIT;
      end else if (state_q == S_WAIT && rel_done) begin
        state_q <= S_IDLE;
      end
      if (rm_take) begin
        tx_valid <= 1'b1;
        tx_is_rm <= 1'b1;
      end
      if (state_q == S_WAIT && rel_done) begin
        if (rel_empty) empty_skip <= 1'b1;
        else begin
          tx_valid  <= 1'b1;
          data_sent <= 1'b1;
          data_list <= list_q;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rm_take) tx_cell <= rm_cell;
    else if (state_q == S_WAIT && rel_done && !rel_empty) tx_cell <= rel_cell;
  end
endmodule
