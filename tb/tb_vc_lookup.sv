// tb_vc_lookup: loads random VPI/VCI keys into the connection table and
// checks hits, misses, invalidation and the lowest-index rule for duplicates.
module tb_vc_lookup;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 32;
  localparam int unsigned LW = $clog2(NUM_VC);
  logic clk = 0, rst_n = 0;
  logic cpu_we = 0, cpu_valid = 0;
  logic [LW-1:0] cpu_idx = '0;
  logic [VCKEY_W-1:0] cpu_key = '0, key = '0;
  logic hit;
  logic [LW-1:0] list_no;
  logic [VCKEY_W-1:0] keys [NUM_VC];
  logic valid [NUM_VC];
  int checks = 0, failures = 0;

  vc_lookup #(.NUM_VC(NUM_VC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int i, logic v, logic [VCKEY_W-1:0] k);
    @(negedge clk); cpu_we = 1; cpu_idx = LW'(i); cpu_valid = v; cpu_key = k;
    @(negedge clk); cpu_we = 0;
    keys[i] = k; valid[i] = v;
  endtask

  task automatic look(logic [VCKEY_W-1:0] k);
    int exp_i; exp_i = -1;
    for (int i = 0; i < NUM_VC; i++) if (exp_i < 0 && valid[i] && keys[i] == k) exp_i = i;
    key = k; #1;
    checks++;
    if (hit != (exp_i >= 0) || (exp_i >= 0 && int'(list_no) != exp_i)) begin
      failures++; $display("key %h hit %0d list %0d exp %0d", k, hit, list_no, exp_i);
    end
  endtask

  initial begin
    for (int i = 0; i < NUM_VC; i++) valid[i] = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    look(24'h000000);
    for (int i = 0; i < NUM_VC; i++) wr(i, 1, VCKEY_W'(24'h100000 + i * 37));
    for (int i = 0; i < NUM_VC; i++) look(VCKEY_W'(24'h100000 + i * 37));
    for (int t = 0; t < 200; t++) look(VCKEY_W'($urandom));
    wr(5, 0, keys[5]); look(keys[5]);
    wr(9, 1, keys[20]); look(keys[20]);            // duplicate: lowest index wins
    wr(20, 0, keys[20]); look(keys[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
