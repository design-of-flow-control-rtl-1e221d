// tb_rm_cell_input: sends a random mix of data, RM and OAM cells of known
// and unknown connections into the RM cell input block and checks that
// exactly the RM cells of known connections reach the CPU queue (in order),
// that every other cell reaches the service side (in order, one clock later),
// the EFCI state and change bits, the interrupt and the RM drop counter.
module tb_rm_cell_input;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 4, LW = 2, RX_DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic cpu_vctab_we = 0, cpu_vc_valid = 0, rx_valid = 0, rm_pop = 0;
  logic [LW-1:0] cpu_idx = '0;
  logic [VCKEY_W-1:0] cpu_vc_key = '0;
  cell_t rx_cell = '0, svc_cell, rm_head;
  logic svc_valid, rm_pending;
  logic [$clog2(RX_DEPTH+1)-1:0] rm_count;
  logic [15:0] rm_drop_cnt;
  logic [NUM_VC-1:0] efci_state, efci_changed, efci_clr = '0;

  rm_cell_input #(.NUM_VC(NUM_VC), .RX_DEPTH(RX_DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, drops = 0, n_rm = 0, n_efci = 0;
  cell_t svcq [$], rmq [$];
  bit efci [NUM_VC];
  bit chg [NUM_VC];

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t mk(int l, logic [2:0] pt);
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    {c.hdr.vpi, c.hdr.vci} = (l >= 0) ? VCKEY_W'(24'h050100 + l) : VCKEY_W'(24'h060000 + $urandom % 50);
    c.hdr.pt = pt;
    return c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (svc_valid) begin
      checks++;
      if (svcq.size() == 0 || svc_cell != svcq[0]) begin failures++; $display("service cell wrong"); end
      if (svcq.size() > 0) void'(svcq.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int i = 0; i < NUM_VC; i++) begin
      @(negedge clk); cpu_vctab_we = 1; cpu_idx = LW'(i); cpu_vc_valid = 1; cpu_vc_key = VCKEY_W'(24'h050100 + i);
      efci[i] = 0; chg[i] = 0;
    end
    @(negedge clk); cpu_vctab_we = 0;
    for (int t = 0; t < 3000; t++) begin
      int l; logic [2:0] pt;
      @(negedge clk);
      // checks of the state after the previous clock
      checks += 3;
      if (rm_pending != (rmq.size() > 0)) begin failures++; $display("irq wrong"); end
      if (rmq.size() > 0 && rm_head != rmq[0]) begin failures++; $display("rm head wrong"); end
      for (int i = 0; i < NUM_VC; i++)
        if (efci_state[i] != efci[i] || efci_changed[i] != chg[i]) begin
          failures++; $display("efci %0d wrong", i); break;
        end
      // CPU side; the CPU stops reading for the last 200 clocks so that the
      // RM queue certainly overflows
      rm_pop = rmq.size() > 0 && $urandom % 3 == 0 && t < 2800;
      if (rm_pop) void'(rmq.pop_front());
      efci_clr = ($urandom % 5 == 0) ? NUM_VC'($urandom) : '0;
      for (int i = 0; i < NUM_VC; i++) if (efci_clr[i]) chg[i] = 0;
      // receive side
      rx_valid = $urandom % 2;
      l = ($urandom % 5 == 0) ? -1 : int'($urandom % NUM_VC);
      case ($urandom % 6)
        0, 1: pt = PT_RM;
        2:    pt = 3'b100;           // OAM F5
        3:    pt = 3'b010;           // data, EFCI set
        default: pt = 3'b000;
      endcase
      rx_cell = mk(l, pt);
      if (rx_valid) begin
        if (l >= 0 && pt == PT_RM) begin
          n_rm++;
          if (rmq.size() < RX_DEPTH) rmq.push_back(rx_cell);
          else drops++;
        end else svcq.push_back(rx_cell);
        if (l >= 0 && !pt[2] && efci[l] != pt[1]) begin efci[l] = pt[1]; chg[l] = 1; n_efci++; end
      end
    end
    @(negedge clk); rx_valid = 0; rm_pop = 0; efci_clr = '0;
    repeat (2) @(negedge clk);
    checks += 2;
    if (int'(rm_drop_cnt) != drops || drops == 0) begin failures++; $display("drops %0d exp %0d", rm_drop_cnt, drops); end
    if (svcq.size() != 0 || n_efci == 0 || n_rm == 0) begin failures++; $display("coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
