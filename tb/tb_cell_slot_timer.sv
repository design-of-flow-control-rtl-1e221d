// tb_cell_slot_timer: checks that slot_start pulses exactly once every
// CELL_CLKS clocks and that slot_phase counts 0..CELL_CLKS-1.
module tb_cell_slot_timer;
  localparam int unsigned CELL_CLKS = 53;
  logic clk = 0, rst_n = 0;
  logic slot_start;
  logic [$clog2(CELL_CLKS)-1:0] slot_phase;
  int checks = 0, failures = 0;

  cell_slot_timer #(.CELL_CLKS(CELL_CLKS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n;
    last = -1; n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20 * CELL_CLKS; cyc++) begin
      @(negedge clk);
      checks++;
      if (int'(slot_phase) != (cyc + 1) % CELL_CLKS) begin
        failures++;
        $display("phase %0d at cycle %0d", slot_phase, cyc);
      end
      if (slot_start) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != CELL_CLKS) begin
            failures++;
            $display("slot period %0d", cyc - last);
          end
        end
        last = cyc;
        n++;
      end
    end
    checks++;
    if (n != 20) begin failures++; $display("slot count %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
