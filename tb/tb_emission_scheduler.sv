// tb_emission_scheduler: sweeps a small parameter memory and checks, cell time
// by cell time, which list numbers are permitted, in which order and at which
// clock of the sweep, against a model of TCD/AEI counting. Covers idle
// entries (AEI = 0), a CPU write of TCD, and an AEI lowered below the
// running TCD (permitted at once).
module tb_emission_scheduler;
  localparam int unsigned NUM_VC = 8, AEI_W = 16, LW = 3, SLOT = 12;
  logic clk = 0, rst_n = 0;
  logic slot_start = 0, cpu_we = 0, cpu_field = 0;
  logic [LW-1:0] cpu_entry = '0, cpu_list = '0, permit_list;
  logic [AEI_W-1:0] cpu_value = '0;
  logic permit_valid, busy;

  emission_scheduler #(.NUM_VC(NUM_VC), .AEI_W(AEI_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_permits = 0;
  int aei [NUM_VC], tcd [NUM_VC], lno [NUM_VC];

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int e, bit f, int l, int v);
    @(negedge clk); cpu_we = 1; cpu_entry = LW'(e); cpu_field = f; cpu_list = LW'(l); cpu_value = AEI_W'(v);
    @(negedge clk); cpu_we = 0;
    if (f) tcd[e] = v; else begin aei[e] = v; lno[e] = l; end
  endtask

  task automatic slot();
    int exp_l [$], exp_c [$];
    for (int e = 0; e < NUM_VC; e++) if (aei[e] != 0) begin
      if (tcd[e] + 1 >= aei[e]) begin tcd[e] = 0; exp_l.push_back(lno[e]); exp_c.push_back(e + 2); end
      else tcd[e]++;
    end
    @(negedge clk); slot_start = 1; @(negedge clk); slot_start = 0;
    for (int c = 1; c < SLOT; c++) begin
      if (permit_valid) begin
        checks++; n_permits++;
        if (exp_l.size() == 0 || int'(permit_list) != exp_l[0] || c != exp_c[0]) begin
          failures++; $display("permit list %0d at clock %0d unexpected", permit_list, c);
        end
        if (exp_l.size() > 0) begin void'(exp_l.pop_front()); void'(exp_c.pop_front()); end
      end
      @(negedge clk);
    end
    checks++;
    if (exp_l.size() != 0) begin failures++; $display("%0d permits missing", exp_l.size()); end
  endtask

  initial begin
    for (int e = 0; e < NUM_VC; e++) begin aei[e] = 0; tcd[e] = 0; lno[e] = 0; end
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    // idle after reset: nothing permitted
    repeat (3) slot();
    for (int e = 0; e < NUM_VC; e++) begin
      wr(e, 1, 0, 0);
      if (e != 6) wr(e, 0, (e * 3) % NUM_VC, e + 1 + (e % 3) * 4);
    end
    repeat (60) slot();
    wr(2, 1, 0, 5);                         // TCD written by the CPU
    repeat (10) slot();
    for (int k = 0; k < 3 && tcd[7] < 5; k++) slot();
    wr(7, 0, lno[7], 2);                    // AEI lowered below TCD
    repeat (30) slot();
    checks++;
    if (n_permits < 100) begin failures++; $display("only %0d permits", n_permits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
