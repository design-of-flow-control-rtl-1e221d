// idle_addr_fifo: the FIFO of free cell-buffer addresses.
//
// Every address of the shared cell buffer that holds no queued cell is kept
// here. The store side pops one address per stored cell (it becomes the next
// write position of the list); the release side pushes back the address of
// every cell read out. The CPU fills the FIFO at start-up through cpu_push.
// Depth is 2**AW, so the FIFO can hold every address of the buffer.
// Two pushes (CPU and release) and one pop may happen in the same clock;
// the CPU entry is placed first. A push into a full FIFO is dropped and
// flagged by the assertion; it cannot happen when the CPU loads each address
// once. The head is read combinationally (first-word fall-through).
// Role and CPU initialisation are the document's; the dual push is this
// design's choice.
module idle_addr_fifo #(
  parameter int unsigned AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cpu_push,
  input  logic [AW-1:0] cpu_addr,
  input  logic          rel_push,
  input  logic [AW-1:0] rel_addr,
  input  logic          pop,
  output logic          not_empty,
  output logic [AW-1:0] head,
  output logic [AW:0]   count
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [AW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr_q, rptr_q;
  logic [AW:0]   count_q;
  logic          do_pop;
  logic [1:0]    n_push;

  assign not_empty = (count_q != '0);
  assign head      = mem[rptr_q];
  assign count     = count_q;
  assign do_pop    = pop && not_empty;
  assign n_push    = 2'(cpu_push) + 2'(rel_push);

  always_ff @(posedge clk) begin
    if (cpu_push && rel_push) begin
      mem[wptr_q]        <= cpu_addr;
      mem[wptr_q + 1'b1] <= rel_addr;
    end else if (cpu_push) begin
      mem[wptr_q] <= cpu_addr;
    end else if (rel_push) begin
      mem[wptr_q] <= rel_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q  <= '0;
      rptr_q  <= '0;
      count_q <= '0;
    end else begin
      wptr_q  <= wptr_q + AW'(n_push);
      rptr_q  <= rptr_q + AW'(do_pop);
      count_q <= count_q + (AW+1)'(n_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   int'(count_q) + int'(n_push) - int'(do_pop) <= int'(DEPTH))
    else $error("idle address FIFO overflow");
endmodule
