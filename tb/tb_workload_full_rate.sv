// tb_workload_full_rate: the design at its default size running the link
// completely full, in two phases.
//   A. One connection at the full link rate: AEI = 1, 300 cells stored. Every
//      cell time must carry the next cell of that connection, 53 clocks apart.
//   B. All 32 connections at once, each with AEI = 32 and 40 cells stored:
//      the 32-entry sweep must finish within one cell time, the permit FIFO
//      must absorb a whole sweep's worth of permits, and the link must carry
//      one data cell in every cell time until the 1,280 cells are gone, with
//      each connection's cells exactly 32 cell times apart.
// Forward RM cells are switched off (Nrm = 0) so that only data cells count.
// The test also checks cell order and content per connection, that no cell
// and no permit is lost, and that every buffer address returns to the idle
// address FIFO.
module tb_workload_full_rate;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 32, AW = 15, CELL_CLKS = 53;
  localparam int NA = 300;                   // phase A cells
  localparam int NB = 40;                    // phase B cells per connection
  localparam int IDLE0 = (1 << AW) - NUM_VC;

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
  longint last_tx [NUM_VC];
  longint last_any;
  int n_tx [NUM_VC], n_any, seq_out [NUM_VC];
  int phase = 0;

  initial begin
    #5s; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [VCKEY_W-1:0] key_of(int l);
    return VCKEY_W'(24'h05_0200 + l);
  endfunction

  task automatic cpu_write(logic [3:0] r, int idx, logic [31:0] d);
    @(negedge clk); cpu_wr = 1; cpu_addr = {r, 12'(idx)}; cpu_wdata = d;
    @(negedge clk); cpu_wr = 0;
  endtask
  task automatic cpu_read(logic [3:0] r, int idx, output logic [31:0] d);
    @(negedge clk); cpu_rd = 1; cpu_addr = {r, 12'(idx)};
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
  endtask

  task automatic store(int l, int s);
    cell_t c;
    c = '0; {c.hdr.vpi, c.hdr.vci} = key_of(l);
    c.payload[383:352] = 32'(s); c.payload[351:320] = 32'(l);
    @(negedge clk); svc_tx_valid = 1; svc_tx_cell = c;
    @(posedge clk); while (!svc_tx_ready) @(posedge clk);
    @(negedge clk); svc_tx_valid = 0;
  endtask

  task automatic run_slots(int n);
    int slots;
    slots = 0;
    while (slots < n) begin @(posedge clk); if (slot_start) slots++; end
    repeat (CELL_CLKS - 1) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic clear_counts();
    for (int l = 0; l < int'(NUM_VC); l++) begin n_tx[l] = 0; last_tx[l] = 0; end
    n_any = 0; last_any = 0;
  endtask

  // transmit monitor
  always @(posedge clk) begin
    cyc++;
    if (rst_n && atm_tx_valid) begin
      int l;
      l = -1;
      for (int k = 0; k < int'(NUM_VC); k++)
        if (vc_key(atm_tx_cell.hdr) == key_of(k)) l = k;
      chk(l >= 0 && !atm_tx_is_rm, "only data cells of known connections");
      if (l >= 0) begin
        chk(int'(atm_tx_cell.payload[383:352]) == seq_out[l] &&
            int'(atm_tx_cell.payload[351:320]) == l, $sformatf("connection %0d order", l));
        seq_out[l]++;
        if (n_tx[l] > 0) begin
          longint want;
          want = (phase == 1) ? CELL_CLKS : 32 * CELL_CLKS;
          chk(cyc - last_tx[l] == want,
              $sformatf("connection %0d spacing %0d clocks", l, cyc - last_tx[l]));
        end
        if (n_any > 0)
          chk(cyc - last_any == CELL_CLKS, $sformatf("link gap %0d clocks", cyc - last_any));
        last_tx[l] = cyc; last_any = cyc; n_tx[l]++; n_any++;
      end
    end
  end

  initial begin
    logic [31:0] d;
    for (int l = 0; l < int'(NUM_VC); l++) seq_out[l] = 0;
    clear_counts();
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int l = 0; l < int'(NUM_VC); l++) begin cpu_write(4'h2, l, l); cpu_write(4'h3, l, l); end
    for (int a = NUM_VC; a < (1 << AW); a++) cpu_write(4'h4, 0, a);
    for (int l = 0; l < int'(NUM_VC); l++) cpu_write(4'h1, l, {7'd0, 1'b1, key_of(l)});

    // phase A: one connection at the full link rate
    for (int s = 0; s < NA; s++) store(0, s);
    phase = 1;
    cpu_write(4'h5, 1, 0);
    cpu_write(4'h5, 0, 32'd1);
    run_slots(NA + 10);
    chk(n_tx[0] == NA, $sformatf("phase A sent %0d of %0d cells", n_tx[0], NA));
    cpu_write(4'h5, 0, 32'd0);                 // stop the connection
    run_slots(2);
    phase = 0;
    clear_counts();

    // phase B: 32 connections, each at 1/32 of the link
    for (int s = 0; s < NB; s++)
      for (int l = 0; l < int'(NUM_VC); l++) store(l, NA * (l == 0) + s);
    repeat (4) @(negedge clk);
    cpu_read(4'h0, 7, d);
    chk(int'(d) == IDLE0 - int'(NUM_VC) * NB, $sformatf("idle addresses with phase B stored: %0d", d));
    phase = 2;
    for (int e = 0; e < int'(NUM_VC); e++) cpu_write(4'h5, 2 * e + 1, 0);
    for (int e = 0; e < int'(NUM_VC); e++) cpu_write(4'h5, 2 * e, (e << 16) | 32);
    run_slots(NB * 32 + 40);
    for (int l = 0; l < int'(NUM_VC); l++)
      chk(n_tx[l] == NB, $sformatf("phase B connection %0d sent %0d", l, n_tx[l]));
    chk(n_any == int'(NUM_VC) * NB, $sformatf("phase B link carried %0d cells", n_any));

    repeat (4) @(negedge clk);
    cpu_read(4'h0, 2, d); chk(d == 0, $sformatf("no cell dropped (%0d)", d));
    cpu_read(4'h0, 5, d); chk(d == 0, $sformatf("no permit lost (%0d)", d));
    cpu_read(4'h0, 7, d); chk(int'(d) == IDLE0, $sformatf("all addresses idle again (%0d)", d));
    $display("phase A: %0d cells back to back; phase B: %0d cells on 32 connections",
             NA, n_any);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
