// tb_rm_cell_out: loads forward RM templates, queues forward requests and
// backward RM cells, and checks the offered cells: backward first, then
// forward in request order, each equal to its source except for a CRC-10
// recomputed by an independent polynomial division; also the overflow flag.
module tb_rm_cell_out;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 4, LW = 2, BRM_DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic tpl_we = 0, brm_push = 0, frm_req = 0, rm_take = 0;
  logic [LW-1:0] tpl_list = '0, frm_list = '0, rm_list;
  cell_t tpl_cell = '0, brm_cell = '0, rm_cell;
  logic rm_valid, rm_is_bwd, frm_overflow, brm_overflow;

  rm_cell_out #(.NUM_VC(NUM_VC), .BRM_DEPTH(BRM_DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cell_t tpl [NUM_VC];
  cell_t bq [$];
  int fq [$];
  bit saw_ovf = 0;
  always @(posedge clk) if (brm_overflow) saw_ovf = 1;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [9:0] poly_mod(logic [383:0] v);
    logic [10:0] r; r = '0;
    for (int i = 383; i >= 0; i--) begin r = {r[9:0], v[i]}; if (r[10]) r = r ^ 11'h633; end
    return r[9:0];
  endfunction

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    c.hdr.pt = PT_RM;
    return c;
  endfunction

  task automatic check_offer();
    cell_t src; bit bwd;
    checks++;
    if (!rm_valid) begin failures++; $display("nothing offered"); return; end
    bwd = bq.size() > 0;
    src = bwd ? bq.pop_front() : tpl[fq.pop_front()];
    if (rm_is_bwd != bwd || rm_cell[CELL_BITS-1:10] != src[CELL_BITS-1:10] ||
        rm_cell.payload[9:0] != poly_mod({src.payload[383:10], 10'h0})) begin
      failures++; $display("offered cell wrong (bwd %0d)", bwd);
    end
    checks++;
    if (poly_mod(rm_cell.payload) != 0) begin failures++; $display("CRC residue"); end
    @(negedge clk) rm_take = 1; @(negedge clk) rm_take = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    checks++; if (rm_valid) failures++;
    for (int i = 0; i < NUM_VC; i++) begin
      @(negedge clk); tpl_we = 1; tpl_list = LW'(i); tpl_cell = rnd_cell(); tpl[i] = tpl_cell;
    end
    @(negedge clk); tpl_we = 0;
    for (int r = 0; r < 200; r++) begin
      int nf, nb;
      nf = $urandom % 4; nb = $urandom % 3;
      for (int k = 0; k < nf; k++) begin
        @(negedge clk) frm_req = 1; frm_list = LW'($urandom); fq.push_back(int'(frm_list));
        @(negedge clk) frm_req = 0;
      end
      for (int k = 0; k < nb; k++) begin
        @(negedge clk) brm_push = 1; brm_cell = rnd_cell(); bq.push_back(brm_cell);
        @(negedge clk) brm_push = 0;
      end
      if (r % 20 == 0) begin      // template update between requests
        @(negedge clk); tpl_we = 1; tpl_list = LW'($urandom); tpl_cell = rnd_cell(); tpl[tpl_list] = tpl_cell;
        @(negedge clk); tpl_we = 0;
      end
      while (bq.size() + fq.size() > 0) check_offer();
      checks++; if (rm_valid) begin failures++; $display("extra offer"); end
    end
    // backward FIFO overflow
    for (int k = 0; k < BRM_DEPTH + 1; k++) begin
      @(negedge clk) brm_push = 1; brm_cell = rnd_cell();
      if (k < BRM_DEPTH) bq.push_back(brm_cell);
    end
    @(negedge clk) brm_push = 0;
    repeat (2) @(negedge clk);
    checks++; if (!saw_ovf) begin failures++; $display("no overflow flag"); end
    while (bq.size() > 0) check_offer();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
