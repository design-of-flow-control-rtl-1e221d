// tb_one_cell_fifo: pushes random cells with random output back-pressure and
// checks order, content and that no cell is lost or duplicated.
module tb_one_cell_fifo;
  import abr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  cell_t in_cell = '0, out_cell;
  cell_t sent [$];
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  one_cell_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin sent.push_back(in_cell); n_in++; end
    if (out_valid && out_ready) begin
      checks++;
      if (sent.size() == 0 || sent[0] != out_cell) begin failures++; $display("mismatch"); end
      else void'(sent.pop_front());
      n_out++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    checks++; if (!in_ready || out_valid) failures++;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 3) != 0;
        in_cell  = rnd_cell();
      end
      out_ready = ($urandom % 2) != 0;
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (n_in != n_out || n_in < 300) begin failures++; $display("in %0d out %0d", n_in, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
