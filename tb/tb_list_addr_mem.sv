// tb_list_addr_mem: random CPU and functional writes against a model array,
// checking both read ports and that a CPU write wins a same-index collision.
module tb_list_addr_mem;
  localparam int unsigned NUM_VC = 32, AW = 15, LW = 5;
  logic clk = 0;
  logic cpu_we = 0, wr_en = 0;
  logic [LW-1:0] cpu_idx = '0, rd_idx = '0, rd2_idx = '0, wr_idx = '0;
  logic [AW-1:0] cpu_data = '0, wr_data = '0, rd_data, rd2_data;
  logic [AW-1:0] model [NUM_VC];
  int checks = 0, failures = 0;

  list_addr_mem #(.NUM_VC(NUM_VC), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NUM_VC; i++) begin
      @(negedge clk); cpu_we = 1; cpu_idx = LW'(i); cpu_data = AW'(i * 1000); model[i] = AW'(i * 1000);
    end
    @(negedge clk); cpu_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_idx = LW'($urandom); rd2_idx = LW'($urandom); #1;
      checks += 2;
      if (rd_data != model[rd_idx] || rd2_data != model[rd2_idx]) begin
        failures++; $display("read mismatch at %0d/%0d", rd_idx, rd2_idx);
      end
      cpu_we = ($urandom % 4) == 0; cpu_idx = LW'($urandom); cpu_data = AW'($urandom);
      wr_en = ($urandom % 2) == 0; wr_idx = ($urandom % 3 == 0) ? cpu_idx : LW'($urandom);
      wr_data = AW'($urandom);
      if (wr_en) model[wr_idx] = wr_data;
      if (cpu_we) model[cpu_idx] = cpu_data;
    end
    @(negedge clk); cpu_we = 0; wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
