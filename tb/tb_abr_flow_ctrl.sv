// tb_abr_flow_ctrl: end-to-end test of the flow control module at its
// default size (32 lists, 32768-cell shared buffer, 53 clocks per cell time).
// The testbench plays the software and the two neighbouring interfaces:
//  - software: loads the connection table, the address memories and all
//    idle addresses over the CPU bus, sets an allowed emission interval
//    (AEI) per connection, the RM parameters and a forward RM cell per
//    connection; on interrupt it reads each received RM cell, turns it
//    around and pushes it back as a backward RM cell; it also clears EFCI
//    change bits;
//  - service side: keeps the ABR connections backlogged with numbered cells
//    and sometimes sends a cell of an unknown connection;
//  - ATM side: checks every transmitted cell and feeds receive traffic
//    (data cells with and without EFCI, RM cells, cells of other connections).
// Checks: per-connection order and content of data cells; number of data
// cells per connection between the AEI-derived bounds; each forward RM cell
// equal to its template with a valid CRC-10 and never more than Nrm data
// cells between two of them; backward RM cells equal to the turned-around
// received cells; receive cells other than RM cells delivered unchanged;
// the buffer-exhaustion drop. Every mechanism is counted and must occur.
module tb_abr_flow_ctrl;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 32, AW = 15, CELL_CLKS = 53;
  localparam int unsigned NACT = 6;          // active ABR connections 0..5
  localparam int unsigned IDLE_LIST = 6;     // permitted but never sent to
  localparam int unsigned NRM = 8, MRM = 2;
  localparam int AEI [NACT+1] = '{4, 6, 8, 12, 16, 24, 5};
  localparam int TRM [NACT] = '{0, 0, 0, 0, 60, 60};
  localparam int unsigned SLOTS = 3000;

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
  int slot_no = 0;
  int seq_in [NACT], seq_out [NACT], n_data [NACT], since_frm [NACT], n_frm [NACT];
  int n_brm = 0, n_rx_rm = 0, n_efci_irq = 0, n_svc_rx = 0, n_unknown = 0, n_rm_tx = 0;
  cell_t tpl [NACT];
  cell_t brm_exp [$];
  cell_t rx_exp [$];
  bit flood = 0;
  bit traffic = 1;

  initial begin
    #100ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [9:0] poly_mod(logic [383:0] v);
    logic [10:0] r; r = '0;
    for (int i = 383; i >= 0; i--) begin r = {r[9:0], v[i]}; if (r[10]) r = r ^ 11'h633; end
    return r[9:0];
  endfunction

  function automatic logic [VCKEY_W-1:0] key_of(int l);
    return VCKEY_W'(24'h11_0040 + l * 3);
  endfunction

  function automatic int list_of(logic [VCKEY_W-1:0] k);
    for (int l = 0; l <= IDLE_LIST; l++) if (key_of(l) == k) return l;
    return -1;
  endfunction

  function automatic cell_t data_cell(int l, int seq, logic [2:0] pt);
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    c.hdr.gfc = 0; {c.hdr.vpi, c.hdr.vci} = key_of(l); c.hdr.pt = pt; c.hdr.clp = 0;
    c.payload[383:352] = 32'(seq);
    c.payload[351:344] = 8'(l);
    return c;
  endfunction

  // ---------------- CPU bus ----------------
  semaphore bus = new(1);
  task automatic cpu_write(logic [3:0] r, int idx, logic [31:0] d);
    bus.get();
    @(negedge clk); cpu_wr = 1; cpu_addr = {r, 12'(idx)}; cpu_wdata = d;
    @(negedge clk); cpu_wr = 0;
    bus.put();
  endtask
  task automatic cpu_read(logic [3:0] r, int idx, output logic [31:0] d);
    bus.get();
    @(negedge clk); cpu_rd = 1; cpu_addr = {r, 12'(idx)};
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
    bus.put();
  endtask
  task automatic stage(cell_t c);
    for (int i = 0; i < CELL_WORDS; i++) cpu_write(4'h7, i, cell_word(c, i));
  endtask

  // ---------------- transmit monitor ----------------
  always @(posedge clk) if (rst_n) begin
    if (slot_start) slot_no++;
    if (atm_tx_valid) begin
      int l;
      l = list_of(vc_key(atm_tx_cell.hdr));
      if (atm_tx_is_rm) begin
        n_rm_tx++;
        chk(poly_mod(atm_tx_cell.payload) == 0, "RM cell CRC-10");
        if (atm_tx_cell.payload[375]) begin            // DIR = backward
          n_brm++;
          chk(brm_exp.size() > 0 && atm_tx_cell[CELL_BITS-1:10] == brm_exp[0][CELL_BITS-1:10],
              "backward RM cell content");
          if (brm_exp.size() > 0) void'(brm_exp.pop_front());
        end else begin
          chk(l >= 0 && l < NACT && atm_tx_cell[CELL_BITS-1:10] == tpl[l][CELL_BITS-1:10],
              "forward RM cell content");
          if (l >= 0 && l < NACT) begin
            chk(since_frm[l] <= int'(NRM) && since_frm[l] >= int'(MRM), "data cells between forward RM cells");
            since_frm[l] = 0; n_frm[l]++;
          end
        end
      end else begin
        chk(l >= 0 && l < NACT, "data cell of an active list");
        if (l >= 0 && l < NACT) begin
          chk(int'(atm_tx_cell.payload[383:352]) == seq_out[l] && atm_tx_cell.hdr.pt == 3'b000,
              $sformatf("list %0d order: got %0d exp %0d", l, atm_tx_cell.payload[383:352], seq_out[l]));
          seq_out[l] = int'(atm_tx_cell.payload[383:352]) + 1;
          n_data[l]++; since_frm[l]++;
        end
      end
    end
    if (svc_rx_valid) begin
      n_svc_rx++;
      chk(rx_exp.size() > 0 && svc_rx_cell == rx_exp[0], "receive cell to service side");
      if (rx_exp.size() > 0) void'(rx_exp.pop_front());
    end
  end

  // ---------------- service side source ----------------
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (!svc_tx_valid || svc_tx_ready) begin
        svc_tx_valid = 0;
        if (flood) begin
          svc_tx_valid = 1; svc_tx_cell = data_cell(5, seq_in[5]++, 3'b000);
        end else if (traffic && $urandom % 10 == 0) begin
          int l; l = $urandom % NACT;
          // keep each queue a few cells deep, faster lists deeper
          if (seq_in[l] - seq_out[l] < 6) begin
            svc_tx_valid = 1; svc_tx_cell = data_cell(l, seq_in[l]++, 3'b000);
          end else if ($urandom % 50 == 0) begin
            svc_tx_valid = 1; svc_tx_cell = data_cell(40, 0, 3'b000); n_unknown++;
          end
        end
      end
    end
  end

  // ---------------- receive side source ----------------
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      atm_rx_valid = 0;
      if (traffic && !flood && $urandom % 200 == 0) begin
        int l, k; cell_t c;
        l = $urandom % NACT; k = $urandom % 8;
        c = data_cell(k < 6 ? l : 50, 0, k == 0 ? PT_RM : (k < 3 ? 3'b010 : (k == 6 ? 3'b100 : 3'b000)));
        if (k == 0) begin c.payload[375] = 0; end
        atm_rx_valid = 1; atm_rx_cell = c;
        if (k != 0) rx_exp.push_back(c);
      end
    end
  end

  // ---------------- software: interrupt service ----------------
  initial begin
    logic [31:0] d, w [CELL_WORDS];
    cell_t c;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (irq) begin
        cpu_read(4'h0, 0, d);
        if (d[0]) begin                                // received RM cell
          for (int i = 0; i < CELL_WORDS; i++) cpu_read(4'hA, i, w[i]);
          cpu_write(4'hA, 0, 0);
          c = '0;
          for (int i = 0; i < CELL_WORDS - 1; i++) c = cell_t'({c, w[i]});
          c = cell_t'({c, w[CELL_WORDS-1][31:24]});
          chk(c.hdr.pt == PT_RM && list_of(vc_key(c.hdr)) >= 0, "received RM cell extracted");
          n_rx_rm++;
          c.payload[375] = 1;                          // turn around: DIR = backward
          stage(c);
          brm_exp.push_back(c);
          cpu_write(4'h9, 0, 0);
        end
        if (d[1]) begin                                // EFCI change
          cpu_read(4'h0, 4, d);
          cpu_write(4'h0, 4, d);
          n_efci_irq++;
        end
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] d;
    int t0, t1, total;
    for (int l = 0; l < NACT; l++) begin seq_in[l] = 0; seq_out[l] = 0; n_data[l] = 0; since_frm[l] = 0; n_frm[l] = 0; end
    traffic = 0;
    repeat (3) @(posedge clk); @(negedge clk) rst_n = 1;
    // initialisation by software
    for (int l = 0; l < int'(NUM_VC); l++) begin
      cpu_write(4'h2, l, l);
      cpu_write(4'h3, l, l);
    end
    for (int a = NUM_VC; a < (1 << AW); a++) cpu_write(4'h4, 0, a);
    cpu_read(4'h0, 7, d);
    chk(d == (1 << AW) - NUM_VC, "idle addresses loaded");
    for (int l = 0; l <= int'(IDLE_LIST); l++) cpu_write(4'h1, l, {7'd0, 1'b1, key_of(l)});
    for (int l = 0; l < int'(NACT); l++) begin
      cell_t c;
      c = data_cell(l, 0, PT_RM);
      c.payload[383:376] = 8'h01;                      // RM protocol identifier
      c.payload[375] = 0;                              // DIR = forward
      tpl[l] = c;
      stage(c);
      cpu_write(4'h8, l, 0);
      cpu_write(4'h6, 4 * l + 0, NRM);
      cpu_write(4'h6, 4 * l + 1, MRM);
      cpu_write(4'h6, 4 * l + 2, TRM[l]);
    end
    for (int e = 0; e <= int'(IDLE_LIST); e++) cpu_write(4'h5, 2 * e, (e << 16) | AEI[e]);
    // run
    traffic = 1;
    t0 = slot_no;
    wait (slot_no == t0 + int'(SLOTS));
    t1 = slot_no;
    traffic = 0;
    // rates
    for (int l = 0; l < int'(NACT); l++) begin
      int hi, lo;
      hi = (t1 - t0) / AEI[l] + 2;
      lo = ((t1 - t0) / AEI[l]) * 8 / 10;
      chk(n_data[l] + n_frm[l] * 0 <= hi && n_data[l] >= lo,
          $sformatf("list %0d: %0d data cells in %0d cell times, bounds %0d..%0d", l, n_data[l], t1 - t0, lo, hi));
      $display("list %0d AEI %0d: %0d data cells, %0d forward RM cells", l, AEI[l], n_data[l], n_frm[l]);
    end
    // drain receive side and BRM queue
    repeat (200 * CELL_CLKS) @(negedge clk);
    chk(rx_exp.size() == 0 && brm_exp.size() == 0, "receive and backward queues drained");
    // buffer exhaustion: flood list 5 (slowest) until drops
    cpu_read(4'h0, 2, d); total = d;
    flood = 1;
    repeat (2 * (1 << AW) + 200) @(negedge clk);
    flood = 0;
    repeat (4) @(negedge clk);
    cpu_read(4'h0, 7, d);
    chk(d == 0, $sformatf("no idle address left after flood (%0d)", d));
    cpu_read(4'h0, 2, d);
    chk(int'(d) > total, "cells dropped when the buffer is full");
    $display("store drops %0d (unknown connection cells %0d)", d, n_unknown);
    // mechanism coverage
    total = 0; for (int l = 0; l < int'(NACT); l++) total += n_frm[l];
    chk(total > 0, "forward RM cells sent");
    chk(n_frm[5] > 0 && n_frm[0] > 0, "forward RM by Nrm and by Mrm/Trm");
    chk(n_brm > 0 && n_rx_rm > 0, "RM cells received and backward RM cells sent");
    chk(n_efci_irq > 0, "EFCI change reported");
    chk(n_svc_rx > 0, "receive cells delivered");
    chk(n_unknown > 0, "cells of unknown connections offered");
    chk(cnt_skip > 0, $sformatf("empty list skipped (%0d)", cnt_skip));
    chk(cnt_frm_nrm > 0 && cnt_frm_trm > 0, $sformatf("forward RM rules: Nrm %0d, Mrm/Trm %0d", cnt_frm_nrm, cnt_frm_trm));
    $display("mechanisms: stored %0d, permits %0d, empty skips %0d, FRM by Nrm %0d, FRM by Trm %0d, BRM %0d, rx RM %0d, EFCI irq %0d",
             cnt_store, cnt_permit, cnt_skip, cnt_frm_nrm, cnt_frm_trm, n_brm, n_rx_rm, n_efci_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters from the monitoring strobes, for coverage
  int cnt_store = 0, cnt_permit = 0, cnt_skip = 0, cnt_frm_nrm = 0, cnt_frm_trm = 0;
  always @(posedge clk) begin
    if (events.stored) cnt_store++;
    if (events.permit) cnt_permit++;
    if (events.empty_skip) cnt_skip++;
    if (events.frm_by_nrm) cnt_frm_nrm++;
    if (events.frm_by_trm) cnt_frm_trm++;
  end
endmodule
