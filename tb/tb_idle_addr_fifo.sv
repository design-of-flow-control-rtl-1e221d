// tb_idle_addr_fifo: fills the FIFO with every address from the CPU side,
// then mixes random pops and release pushes (also together with CPU pushes),
// comparing head and count with a queue model; ends completely full.
module tb_idle_addr_fifo;
  localparam int unsigned AW = 8;
  localparam int unsigned DEPTH = 1 << AW;
  logic clk = 0, rst_n = 0;
  logic cpu_push = 0, rel_push = 0, pop = 0, not_empty;
  logic [AW-1:0] cpu_addr = '0, rel_addr = '0, head;
  logic [AW:0] count;
  logic [AW-1:0] q [$];
  logic [AW-1:0] out [$];
  int checks = 0, failures = 0;

  idle_addr_fifo #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    // CPU loads all but 16 addresses
    for (int i = 0; i < DEPTH - 16; i++) begin
      @(negedge clk); cpu_push = 1; cpu_addr = AW'(i); q.push_back(AW'(i));
    end
    @(negedge clk); cpu_push = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks += 2;
      if (int'(count) != q.size()) begin failures++; $display("count %0d exp %0d", count, q.size()); end
      if (q.size() > 0 && head != q[0]) begin failures++; $display("head %0d exp %0d", head, q[0]); end
      if (not_empty != (q.size() > 0)) failures++;
      pop = ($urandom % 2) == 0 && q.size() > 0;
      rel_push = ($urandom % 2) == 0 && out.size() > 0 && q.size() < DEPTH - 1;
      cpu_push = 0;
      if (pop) out.push_back(q.pop_front());
      if (rel_push) begin rel_addr = out.pop_front(); end
      if (t % 97 == 0 && out.size() > 1 && rel_push) begin
        cpu_push = 1; cpu_addr = out.pop_front(); q.push_back(cpu_addr);
      end
      if (rel_push) q.push_back(rel_addr);
    end
    @(negedge clk); pop = 0; cpu_push = 0; rel_push = 0;
    // return everything, plus the 16 never loaded
    while (out.size() > 0) begin
      rel_push = 1; rel_addr = out.pop_front(); q.push_back(rel_addr); @(negedge clk);
    end
    for (int i = DEPTH - 16; i < DEPTH; i++) begin
      rel_push = 1; rel_addr = AW'(i); q.push_back(rel_addr); @(negedge clk);
    end
    rel_push = 0; @(negedge clk);
    checks++;
    if (int'(count) != DEPTH) begin failures++; $display("final count %0d", count); end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (head != q[i]) begin failures++; $display("drain %0d: %0d exp %0d", i, head, q[i]); end
      pop = 1; @(negedge clk);
    end
    pop = 0;
    checks++; if (not_empty) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
