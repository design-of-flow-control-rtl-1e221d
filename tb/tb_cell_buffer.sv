// tb_cell_buffer: writes random cells and tags to random addresses and reads
// them back one clock after the read strobe, against a model memory.
module tb_cell_buffer;
  import abr_pkg::*;
  localparam int unsigned AW = 10;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, wr_tag = '0, rd_tag;
  cell_t wr_cell = '0, rd_cell;
  cell_t m_cell [1 << AW];
  logic [AW-1:0] m_tag [1 << AW];
  bit written [1 << AW];
  int checks = 0, failures = 0;

  cell_buffer #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    return c;
  endfunction

  initial begin
    logic [AW-1:0] exp_a; bit exp_v;
    exp_v = 0; exp_a = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rd_cell != m_cell[exp_a] || rd_tag != m_tag[exp_a]) begin
          failures++; $display("read mismatch at %0d", exp_a);
        end
      end
      // apply model writes of the previous clock after the compare
      if (wr_en) begin m_cell[wr_addr] = wr_cell; m_tag[wr_addr] = wr_tag; written[wr_addr] = 1; end
      wr_en = ($urandom % 2) == 0; wr_addr = AW'($urandom % 64); wr_cell = rnd_cell(); wr_tag = AW'($urandom);
      rd_addr = AW'($urandom % 64);
      rd_en = written[rd_addr] && !(wr_en && wr_addr == rd_addr);
      exp_v = rd_en; exp_a = rd_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
