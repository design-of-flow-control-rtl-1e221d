// tb_cell_queue: builds the per-list linked lists in a small shared buffer
// and checks them against one software queue per list.
//  phase 1: random cells (some of unknown connections) and random releases;
//  phase 2: no releases until the idle addresses run out (cells dropped);
//  phase 3: release everything; all addresses must be idle again.
// Release latency (rel_done one clock after rel_req) is checked too.
module tb_cell_queue;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 8, AW = 7, LW = 3;
  localparam int unsigned CAP = (1 << AW) - NUM_VC;
  logic clk = 0, rst_n = 0;
  logic cpu_vctab_we = 0, cpu_wraddr_we = 0, cpu_rdaddr_we = 0, cpu_iaf_push = 0, cpu_vc_valid = 0;
  logic [LW-1:0] cpu_idx = '0;
  logic [VCKEY_W-1:0] cpu_vc_key = '0;
  logic [AW-1:0] cpu_addr = '0;
  logic in_valid = 0, in_ready;
  cell_t in_cell = '0, rel_cell;
  logic rel_req = 0, rel_done, rel_empty, stored, dropped;
  logic [LW-1:0] rel_list = '0;
  logic [15:0] drop_cnt;
  logic [AW:0] idle_cnt;

  cell_queue #(.NUM_VC(NUM_VC), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, exp_drops = 0, total = 0;
  cell_t model [NUM_VC][$];
  bit st_pend = 0, rel_pend = 0, exp_empty;
  int st_list;
  cell_t st_cell, exp_cell;

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int list_of(cell_t c);
    for (int i = 0; i < NUM_VC; i++) if (vc_key(c.hdr) == VCKEY_W'(24'h020000 + i * 5)) return i;
    return -1;
  endfunction

  function automatic cell_t rnd_cell(int l);
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    {c.hdr.vpi, c.hdr.vci} = (l >= 0) ? VCKEY_W'(24'h020000 + l * 5) : VCKEY_W'(24'h030000 + $urandom % 99);
    c.hdr.pt = 3'b000;
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (rel_pend) begin
      checks++;
      if (!rel_done) begin failures++; $display("rel_done late"); end
      else if (rel_empty != exp_empty || (!exp_empty && rel_cell != exp_cell)) begin
        failures++; $display("release mismatch empty %0d exp %0d", rel_empty, exp_empty);
      end
      rel_pend = 0;
    end
    if (rel_req) begin
      exp_empty = model[rel_list].size() == 0;
      if (!exp_empty) begin exp_cell = model[rel_list].pop_front(); total--; end
      rel_pend = 1;
    end
    if (st_pend) begin
      if (st_list < 0 || total >= CAP) exp_drops++;
      else begin model[st_list].push_back(st_cell); total++; end
      st_pend = 0;
    end
    if (in_valid && in_ready) begin st_pend = 1; st_cell = in_cell; st_list = list_of(in_cell); end
  end

  task automatic cpu(ref logic we, input int idx, input int data);
    @(negedge clk); we = 1; cpu_idx = LW'(idx); cpu_addr = AW'(data); @(negedge clk); we = 0;
  endtask

  task automatic step(int p_in, int p_rel, bit known_only);
    @(negedge clk);
    if (!in_valid || in_ready) begin
      in_valid = ($urandom % 100) < p_in;
      in_cell = rnd_cell((known_only || $urandom % 8 != 0) ? int'($urandom % NUM_VC) : -1);
    end
    rel_req = !rel_req && !rel_pend && ($urandom % 100) < p_rel;
    rel_list = LW'($urandom);
  endtask

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < NUM_VC; i++) begin
      @(negedge clk); cpu_vctab_we = 1; cpu_idx = LW'(i); cpu_vc_valid = 1;
      cpu_vc_key = VCKEY_W'(24'h020000 + i * 5);
      @(negedge clk); cpu_vctab_we = 0;
      cpu(cpu_wraddr_we, i, i);
      cpu(cpu_rdaddr_we, i, i);
    end
    for (int a = NUM_VC; a < (1 << AW); a++) cpu(cpu_iaf_push, 0, a);
    @(negedge clk);
    checks++; if (int'(idle_cnt) != CAP) begin failures++; $display("idle %0d", idle_cnt); end
    // phase 1
    for (int t = 0; t < 3000; t++) step(40, 45, 0);
    // phase 2: fill
    for (int t = 0; t < 4 * CAP; t++) step(90, 0, 1);
    @(negedge clk); in_valid = 0; rel_req = 0;
    repeat (3) @(negedge clk);
    checks++; if (idle_cnt != 0) begin failures++; $display("not full: idle %0d", idle_cnt); end
    // phase 3: drain
    for (int t = 0; t < 20 * CAP && total > 0; t++) step(0, 60, 1);
    @(negedge clk); rel_req = 0;
    repeat (3) @(negedge clk);
    checks++; if (total != 0) begin failures++; $display("left %0d", total); end
    checks++; if (int'(idle_cnt) != CAP) begin failures++; $display("idle after drain %0d", idle_cnt); end
    checks++; if (int'(drop_cnt) != exp_drops || exp_drops == 0) begin
      failures++; $display("drops %0d exp %0d", drop_cnt, exp_drops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
