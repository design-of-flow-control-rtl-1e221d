// tb_cell_tx_ctrl: surrounds the transmit controller with a behavioural cell
// queue (release answered one clock after the request) and an RM cell
// source, and checks cell time by cell time what is sent: an RM cell when
// one waits, otherwise the head cell of the first permitted non-empty list,
// skipping at most MAX_TRY lists; also the sending clock, data_sent/list, the
// empty-list skips and the permit FIFO overflow.
module tb_cell_tx_ctrl;
  import abr_pkg::*;
  localparam int unsigned NUM_VC = 4, LW = 2, MAX_TRY = 3, SLOT = 24;
  logic clk = 0, rst_n = 0;
  logic slot_start = 0, permit_valid = 0, rm_valid, rm_take;
  logic [LW-1:0] permit_list = '0, rel_list, data_list;
  cell_t rm_cell, rel_cell, tx_cell;
  logic rel_req, rel_done, rel_empty, tx_valid, tx_is_rm, data_sent, empty_skip, permit_overflow;

  cell_tx_ctrl #(.NUM_VC(NUM_VC), .MAX_TRY(MAX_TRY)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_rm = 0, n_data = 0, n_skip = 0, n_ovf = 0, n_idle = 0;
  cell_t q [NUM_VC][$];      // behavioural cell queue
  cell_t rmq [$];            // RM cells waiting
  int pq [$];                // model of the permit FIFO

  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8; i++) c[i*8 +: 8] = 8'($urandom);
    return c;
  endfunction

  assign rm_valid = rmq.size() > 0;
  assign rm_cell  = rm_valid ? rmq[0] : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin rel_done <= 0; rel_empty <= 0; rel_cell <= '0; end
    else begin
      rel_done <= rel_req;
      rel_empty <= rel_req && q[rel_list].size() == 0;
      if (rel_req && q[rel_list].size() > 0) rel_cell <= q[rel_list].pop_front();
      if (rm_take) void'(rmq.pop_front());
      if (empty_skip) n_skip++;
      if (permit_overflow) n_ovf++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst_n = 1;
    for (int s = 0; s < 1500; s++) begin
      cell_t exp_c; int exp_at, exp_l; bit exp_rm, exp_any, got;
      // expected decision from the state at the start of the cell time
      exp_any = 0; exp_rm = 0; exp_l = -1; exp_at = 0;
      if (rmq.size() > 0) begin exp_any = 1; exp_rm = 1; exp_c = rmq[0]; exp_at = 1; end
      else begin
        for (int k = 0; k < MAX_TRY && pq.size() > 0; k++) begin
          int l; l = pq.pop_front();
          if (q[l].size() > 0) begin exp_any = 1; exp_l = l; exp_c = q[l][0]; exp_at = 2 + k; break; end
        end
      end
      slot_start = 1; @(negedge clk); slot_start = 0;
      got = 0;
      for (int c = 1; c < SLOT; c++) begin
        if (tx_valid) begin
          checks++;
          if (got || !exp_any || c != exp_at || tx_is_rm != exp_rm || tx_cell != exp_c ||
              data_sent == exp_rm || (!exp_rm && int'(data_list) != exp_l)) begin
            failures++; $display("slot %0d: sent at %0d rm %0d, exp at %0d rm %0d", s, c, tx_is_rm, exp_at, exp_rm);
          end
          got = 1;
          if (tx_is_rm) n_rm++; else n_data++;
        end
        // stimulus late in the cell time: new cells, RM cells, permits
        permit_valid = 0;
        if (c >= 2 + MAX_TRY + 2) begin
          if ($urandom % ((s / 500) % 3 == 0 ? 40 : 4) == 0) q[$urandom % NUM_VC].push_back(rnd_cell());
          if ($urandom % 40 == 0) rmq.push_back(rnd_cell());
          if ($urandom % ((s / 300) % 2 == 1 ? 2 : 9) == 0) begin
            permit_valid = 1; permit_list = LW'($urandom);
            if (pq.size() < NUM_VC) pq.push_back(int'(permit_list));
          end
        end
        @(negedge clk);
      end
      permit_valid = 0;
      checks++;
      if (exp_any && !got) begin failures++; $display("slot %0d: nothing sent", s); end
      if (!exp_any) n_idle++;
    end
    checks++;
    if (n_rm == 0 || n_data == 0 || n_skip == 0 || n_ovf == 0 || n_idle == 0) begin
      failures++; $display("coverage rm %0d data %0d skip %0d ovf %0d idle %0d", n_rm, n_data, n_skip, n_ovf, n_idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
