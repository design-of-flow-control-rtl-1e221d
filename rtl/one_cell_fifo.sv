// one_cell_fifo: a one-cell buffer in front of the cell queue.
//
// An incoming cell is held here while its VPI/VCI is extracted and
// translated into a list number. It is a one-entry FIFO with valid/ready
// handshakes on both sides: in_ready is high while it is empty, out_valid
// while it is full. A cell is taken when in_valid && in_ready and leaves when
// out_valid && out_ready. The handshake is this design's choice; the
// one-cell buffer is the document's.
// Timing: a cell written in clock k is offered at the output from clock k+1.
// Since it is either empty or full, it accepts at most one cell per two
// clocks, far more than one per cell time.
module one_cell_fifo
  import abr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cell_t in_cell,
  output logic  out_valid,
  input  logic  out_ready,
  output cell_t out_cell
);
  logic full_q;

  assign in_ready  = !full_q;
  assign out_valid = full_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_q <= 1'b0;
    else if (in_valid && in_ready) full_q <= 1'b1;
    else if (out_valid && out_ready) full_q <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) out_cell <= in_cell;
  end

  // A cell is never lost: the producer waits while the buffer is full.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> $stable(out_cell));
endmodule
