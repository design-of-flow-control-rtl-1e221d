// tb_cpu_if: exercises every region of the CPU register map: checks the
// write strobes and decoded index/data fields, the staging register (write,
// read back, staged cell), word reads of the received RM cell, the status
// registers, the loss counters, the EFCI clear and the interrupt.
module tb_cpu_if;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 32, AW = 15, AEI_W = 16, TRM_W = 16, RX_DEPTH = 16, LW = 5;
  logic clk = 0, rst_n = 0;
  logic cpu_wr = 0, cpu_rd = 0;
  logic [15:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic irq, vctab_we, wraddr_we, rdaddr_we, vc_valid, iaf_push, sched_we, sched_field;
  logic [LW-1:0] list_idx, sched_entry, sched_list, rmpar_list;
  logic [VCKEY_W-1:0] vc_id;
  logic [AW-1:0] addr_data;
  logic [AEI_W-1:0] sched_value;
  logic rmpar_we; logic [1:0] rmpar_field; logic [TRM_W-1:0] rmpar_value;
  logic tpl_we, brm_push, rxrm_pop;
  cell_t stage_cell, rxrm_head = '0;
  logic [$clog2(RX_DEPTH+1)-1:0] rxrm_count = '0;
  logic rxrm_pending = 0;
  logic [15:0] rxrm_drops = 16'd7, store_drops = 16'd9;
  logic [NUM_VC-1:0] efci_state = '0, efci_changed = '0, efci_clr;
  logic [AW:0] idle_count = 16'd1234;
  logic ev_permit_ovf = 0, ev_frm_ovf = 0, ev_brm_ovf = 0;

  cpu_if #(.NUM_VC(NUM_VC), .AW(AW), .AEI_W(AEI_W), .TRM_W(TRM_W), .RX_DEPTH(RX_DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive a write and check the strobes while it is on the bus
  task automatic wr(logic [3:0] reg_, logic [11:0] idx, logic [31:0] d);
    @(negedge clk); cpu_wr = 1; cpu_addr = {reg_, idx}; cpu_wdata = d; #1;
    chk(vctab_we  == (reg_ == 4'h1), "vctab_we");
    chk(wraddr_we == (reg_ == 4'h2), "wraddr_we");
    chk(rdaddr_we == (reg_ == 4'h3), "rdaddr_we");
    chk(iaf_push  == (reg_ == 4'h4), "iaf_push");
    chk(sched_we  == (reg_ == 4'h5), "sched_we");
    chk(rmpar_we  == (reg_ == 4'h6), "rmpar_we");
    chk(tpl_we    == (reg_ == 4'h8), "tpl_we");
    chk(brm_push  == (reg_ == 4'h9), "brm_push");
    chk(rxrm_pop  == (reg_ == 4'hA), "rxrm_pop");
    case (reg_)
      4'h1: chk(list_idx == idx[4:0] && vc_valid == d[24] && vc_id == d[23:0], "vctab fields");
      4'h2, 4'h3, 4'h4: chk(list_idx == idx[4:0] && addr_data == d[14:0], "address fields");
      4'h5: chk(sched_entry == idx[5:1] && sched_field == idx[0] && sched_list == d[20:16] &&
                sched_value == d[15:0], "sched fields");
      4'h6: chk(rmpar_list == idx[6:2] && rmpar_field == idx[1:0] && rmpar_value == d[15:0], "rmpar fields");
      default: ;
    endcase
    @(negedge clk); cpu_wr = 0;
  endtask

  task automatic rd(logic [3:0] reg_, logic [11:0] idx, output logic [31:0] d);
    @(negedge clk); cpu_rd = 1; cpu_addr = {reg_, idx};
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
  endtask

  initial begin
    logic [31:0] d, words [CELL_WORDS];
    cell_t c;
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int r = 1; r <= 10; r++) wr(4'(r), 12'($urandom), $urandom);
    for (int t = 0; t < 100; t++) wr(4'(1 + $urandom % 6), 12'($urandom), $urandom);
    // staging register
    for (int i = 0; i < CELL_WORDS; i++) begin
      words[i] = $urandom; if (i == CELL_WORDS - 1) words[i][23:0] = '0;
      wr(4'h7, 12'(i), words[i]);
    end
    for (int i = 0; i < CELL_WORDS; i++) begin rd(4'h7, 12'(i), d); chk(d == words[i], "stage readback"); end
    c = '0;
    for (int i = 0; i < CELL_WORDS; i++) c = cell_t'({c, words[i][31:0]} >> (i == CELL_WORDS - 1 ? 24 : 0));
    chk(stage_cell == c, "staged cell");
    // received RM cell word reads: octet k of the cell in word k/4, byte 3-k%4
    for (int i = 0; i < CELL_BITS / 8; i++) rxrm_head[CELL_BITS-1-8*i -: 8] = 8'(i + 1);
    for (int i = 0; i < CELL_WORDS; i++) begin
      logic [31:0] e;
      for (int b = 0; b < 4; b++) e[31-8*b -: 8] = (4*i + b < 53) ? 8'(4*i + b + 1) : 8'h00;
      rd(4'hA, 12'(i), d); chk(d == e, "rx RM word");
    end
    // status and interrupt
    rd(4'h0, 12'd2, d); chk(d == 9, "store drops");
    rd(4'h0, 12'd6, d); chk(d == 7, "rx drops");
    rd(4'h0, 12'd7, d); chk(d == 1234, "idle count");
    chk(!irq, "irq idle");
    rxrm_pending = 1; rxrm_count = 3; #1; chk(irq, "irq rm");
    rd(4'h0, 12'd0, d); chk(d == 1, "status rm");
    rd(4'h0, 12'd1, d); chk(d == 3, "rx count");
    rxrm_pending = 0; efci_changed = 32'h0000_0100; efci_state = 32'h8000_0100; #1; chk(irq, "irq efci");
    rd(4'h0, 12'd0, d); chk(d == 2, "status efci");
    rd(4'h0, 12'd3, d); chk(d == 32'h8000_0100, "efci state");
    rd(4'h0, 12'd4, d); chk(d == 32'h0000_0100, "efci changed");
    @(negedge clk); cpu_wr = 1; cpu_addr = 16'h0004; cpu_wdata = 32'h0000_0100; #1;
    chk(efci_clr == 32'h0000_0100, "efci clear"); @(negedge clk); cpu_wr = 0; #1;
    chk(efci_clr == '0, "efci clear idle");
    // loss counters
    for (int k = 0; k < 5; k++) begin @(negedge clk); ev_permit_ovf = 1; ev_frm_ovf = k < 2; ev_brm_ovf = k < 3; end
    @(negedge clk); ev_permit_ovf = 0; ev_frm_ovf = 0; ev_brm_ovf = 0;
    rd(4'h0, 12'd5, d); chk(d == 5, "permit drops");
    rd(4'h0, 12'd8, d); chk(d == 2, "frm drops");
    rd(4'h0, 12'd9, d); chk(d == 3, "brm drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
