// cell_slot_timer: marks the start of every cell transmission time.
//
// The link carries one cell per cell transmission time T_c (2.83 us at
// 149.76 Mbit/s). This counter divides the clock into cell times of CELL_CLKS
// clocks and pulses slot_start for one clock at the first clock of each,
// the "Start of Cell" strobe that opens the parameter-memory sweep.
// CELL_CLKS = 53 corresponds to an octet-wide link interface clocked at
// 149.76/8 = 18.72 MHz (one octet per clock); that figure is this design's
// choice, the cell time itself is the document's.
// Timing: slot_start is high in the clock after reset release and every
// CELL_CLKS clocks thereafter; slot_phase counts 0..CELL_CLKS-1.
module cell_slot_timer #(
  parameter int unsigned CELL_CLKS = 53
) (
  input  logic clk,
  input  logic rst_n,
  output logic slot_start,
  output logic [$clog2(CELL_CLKS)-1:0] slot_phase
);
  localparam int unsigned PW = $clog2(CELL_CLKS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_phase <= '0;
    else if (slot_phase == PW'(CELL_CLKS - 1)) slot_phase <= '0;
    else slot_phase <= slot_phase + 1'b1;
  end

  assign slot_start = (slot_phase == '0);

  initial assert (CELL_CLKS >= 2) else $error("CELL_CLKS must be at least 2");
endmodule
