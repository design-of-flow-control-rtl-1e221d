// tb_workload_two_vc: the two-connection shared-memory example, at the
// design's default size. One connection may emit a cell every 1,000 cell
// times, the other every 20,000. To keep both sending without loss for a
// whole interval, the shared buffer must hold 1,000 + 20,000 = 21,000 cells
// (separate per-connection FIFOs would each need 20,000). The test stores
// exactly that backlog, checks that nothing is dropped and that
// 32,736 - 21,000 idle addresses remain, then enables the two intervals and
// runs 41,500 cell times. It checks that the fast connection sends exactly
// every 1,000 cell times (1,000 x 53 clocks) and the slow one every 20,000,
// in order, and that the released addresses return to the idle FIFO.
module tb_workload_two_vc;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 32, AW = 15, CELL_CLKS = 53;
  localparam int AEI [2] = '{1000, 20000};
  localparam int NCELL [2] = '{1000, 20000};
  localparam int RUN = 41000;                // plus 500 cell times of margin

  logic clk = 0, rst_n = 0;
  logic svc_tx_valid = 0, svc_tx_ready, slot_start, atm_tx_valid, atm_tx_is_rm;
  cell_t svc_tx_cell = '0, atm_tx_cell, atm_rx_cell = '0, svc_rx_cell;
  logic atm_rx_valid = 0, svc_rx_valid;
  logic cpu_wr = 0, cpu_rd = 0;
  logic [15:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic irq;
  abr_events_t events;

  abr_flow_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint last_tx [2];
  int n_tx [2], seq_out [2];

  initial begin
    #5s; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [VCKEY_W-1:0] key_of(int l);
    return VCKEY_W'(24'h02_0100 + l);
  endfunction

  task automatic cpu_write(logic [3:0] r, int idx, logic [31:0] d);
    @(negedge clk); cpu_wr = 1; cpu_addr = {r, 12'(idx)}; cpu_wdata = d;
    @(negedge clk); cpu_wr = 0;
  endtask
  task automatic cpu_read(logic [3:0] r, int idx, output logic [31:0] d);
    @(negedge clk); cpu_rd = 1; cpu_addr = {r, 12'(idx)};
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && atm_tx_valid) begin
      int l;
      l = (vc_key(atm_tx_cell.hdr) == key_of(0)) ? 0 : (vc_key(atm_tx_cell.hdr) == key_of(1)) ? 1 : -1;
      chk(l >= 0 && !atm_tx_is_rm, "only data cells of the two connections");
      if (l >= 0) begin
        chk(int'(atm_tx_cell.payload[383:352]) == seq_out[l], $sformatf("connection %0d order", l));
        seq_out[l]++;
        if (n_tx[l] > 0)
          chk(cyc - last_tx[l] == longint'(AEI[l]) * CELL_CLKS,
              $sformatf("connection %0d spacing %0d clocks", l, cyc - last_tx[l]));
        last_tx[l] = cyc; n_tx[l]++;
      end
    end
  end

  initial begin
    logic [31:0] d;
    int slots;
    for (int l = 0; l < 2; l++) begin n_tx[l] = 0; seq_out[l] = 0; last_tx[l] = 0; end
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int l = 0; l < int'(NUM_VC); l++) begin cpu_write(4'h2, l, l); cpu_write(4'h3, l, l); end
    for (int a = NUM_VC; a < (1 << AW); a++) cpu_write(4'h4, 0, a);
    for (int l = 0; l < 2; l++) cpu_write(4'h1, l, {7'd0, 1'b1, key_of(l)});
    // store the backlog: 1,000 + 20,000 cells
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < NCELL[l]; s++) begin
        cell_t c;
        c = '0; {c.hdr.vpi, c.hdr.vci} = key_of(l);
        c.payload[383:352] = 32'(s); c.payload[31:0] = $urandom;
        @(negedge clk); svc_tx_valid = 1; svc_tx_cell = c;
        @(posedge clk); while (!svc_tx_ready) @(posedge clk);
        @(negedge clk); svc_tx_valid = 0;
      end
    repeat (4) @(negedge clk);
    cpu_read(4'h0, 2, d); chk(d == 0, $sformatf("no cell dropped (%0d)", d));
    cpu_read(4'h0, 7, d);
    chk(d == (1 << AW) - NUM_VC - 21000, $sformatf("idle addresses after storing 21,000 cells: %0d", d));
    // clear both elapsed-time counters (TCD is free-running and not reset),
    // then enable the two intervals and run
    for (int e = 0; e < 2; e++) cpu_write(4'h5, 2 * e + 1, 0);
    for (int e = 0; e < 2; e++) cpu_write(4'h5, 2 * e, (e << 16) | AEI[e]);
    slots = 0;
    while (slots < RUN + 500) begin @(posedge clk); if (slot_start) slots++; end
    repeat (CELL_CLKS - 1) @(posedge clk);     // let the last sweep finish
    @(negedge clk);
    chk(n_tx[0] == RUN / AEI[0], $sformatf("fast connection sent %0d cells", n_tx[0]));
    chk(n_tx[1] == RUN / AEI[1], $sformatf("slow connection sent %0d cells", n_tx[1]));
    repeat (4) @(negedge clk);
    cpu_read(4'h0, 7, d);
    chk(int'(d) == (1 << AW) - NUM_VC - 21000 + n_tx[0] + n_tx[1], "released addresses returned");
    $display("sent %0d and %0d cells in %0d cell times", n_tx[0], n_tx[1], RUN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
