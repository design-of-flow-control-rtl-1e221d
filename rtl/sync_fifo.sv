// sync_fifo: a single-clock FIFO with first-word fall-through.
//
// DEPTH entries of W bits. push writes din when not full; pop removes the
// head when not empty; both may happen in one clock. dout shows the head
// whenever not_empty is high. A push into a full FIFO that is not popped in the same clock is ignored and
// reported on overflow for one clock, so the owner can count the loss.
// Helper used for the permit, RM request, backward RM and received RM queues.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         not_empty,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wptr_q, rptr_q;
  logic [CW-1:0] count_q;
  logic          do_push, do_pop;

  assign not_empty = (count_q != '0);
  assign full      = (count_q == CW'(DEPTH));
  assign do_pop    = pop && not_empty;
  assign do_push   = push && (!full || do_pop);
  assign dout      = mem[rptr_q];
  assign count     = count_q;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr_q] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q   <= '0;
      rptr_q   <= '0;
      count_q  <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wptr_q <= nxt(wptr_q);
      if (do_pop)  rptr_q <= nxt(rptr_q);
      count_q  <= count_q + CW'(do_push) - CW'(do_pop);
      overflow <= push && !do_push;
    end
  end
endmodule
