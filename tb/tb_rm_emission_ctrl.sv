// tb_rm_emission_ctrl: drives data-cell events and cell times into the RM
// emission control and checks every forward RM request (list, clock, and
// which rule fired) against a model of Ndt/Trc counting with the Nrm rule and
// the Mrm-and-Trm rule. Lists: one Nrm-only, two with both rules, one disabled.
module tb_rm_emission_ctrl;
  localparam int unsigned NUM_VC = 4, LW = 2, CNT_W = 9, TRM_W = 16, SLOT = 10;
  logic clk = 0, rst_n = 0;
  logic slot_start = 0, data_valid = 0, cpu_we = 0;
  logic [LW-1:0] data_list = '0, cpu_list = '0, frm_list;
  logic [1:0] cpu_field = '0;
  logic [TRM_W-1:0] cpu_value = '0;
  logic frm_valid, frm_by_nrm, frm_by_trm;

  rm_emission_ctrl #(.NUM_VC(NUM_VC), .CNT_W(CNT_W), .TRM_W(TRM_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_nrm = 0, n_trm = 0;
  int ndt [NUM_VC], trc [NUM_VC], nrm [NUM_VC], mrm [NUM_VC], trm [NUM_VC];
  bit exp_v; int exp_l, exp_kind;

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int l, int f, int v);
    @(negedge clk); cpu_we = 1; cpu_list = LW'(l); cpu_field = 2'(f); cpu_value = TRM_W'(v);
    @(negedge clk); cpu_we = 0;
    case (f) 0: nrm[l] = v; 1: mrm[l] = v; 2: trm[l] = v; default: begin ndt[l] = 0; trc[l] = 0; end endcase
  endtask

  // compare the previous clock's expectation with the outputs at this negedge
  task automatic tick();
    @(negedge clk);
    checks++;
    if (frm_valid != exp_v || (exp_v && (int'(frm_list) != exp_l ||
        frm_by_nrm != (exp_kind == 1) || frm_by_trm != (exp_kind == 2)))) begin
      failures++; $display("frm %0d list %0d kind %0d%0d exp %0d %0d %0d",
                           frm_valid, frm_list, frm_by_nrm, frm_by_trm, exp_v, exp_l, exp_kind);
    end
    exp_v = 0;
  endtask

  initial begin
    for (int i = 0; i < NUM_VC; i++) begin ndt[i] = 0; trc[i] = 0; nrm[i] = 0; mrm[i] = 0; trm[i] = 0; end
    exp_v = 0;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    wr(0, 0, 32);                           // Nrm only
    wr(1, 0, 32); wr(1, 1, 2); wr(1, 2, 40); // Nrm, Mrm, Trm
    wr(2, 0, 8);  wr(2, 1, 4); wr(2, 2, 6);
    for (int s = 0; s < 2000; s++) begin
      // cell time: sweep advances Trc of every list
      slot_start = 1;
      for (int i = 0; i < NUM_VC; i++) if (trc[i] != 65535) trc[i]++;
      tick(); slot_start = 0;
      for (int c = 1; c < SLOT; c++) begin
        if (c > NUM_VC + 1 && $urandom % 4 == 0) begin
          int l, inc; bit hn, ht;
          l = $urandom % NUM_VC;
          data_valid = 1; data_list = LW'(l);
          inc = ndt[l] + 1;
          hn = nrm[l] != 0 && inc >= nrm[l];
          ht = nrm[l] != 0 && trm[l] != 0 && inc >= mrm[l] && trc[l] >= trm[l];
          if (hn || ht) begin
            ndt[l] = 0; trc[l] = 0; exp_v = 1; exp_l = l; exp_kind = hn ? 1 : 2;
            if (hn) n_nrm++; else n_trm++;
          end else ndt[l] = inc;
          tick();
          data_valid = 0;
        end else tick();
      end
    end
    checks += 2;
    if (n_nrm == 0) begin failures++; $display("Nrm rule never fired"); end
    if (n_trm == 0) begin failures++; $display("Trm rule never fired"); end
    $display("Nrm requests %0d, Mrm/Trm requests %0d", n_nrm, n_trm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
