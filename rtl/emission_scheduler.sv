// emission_scheduler: decides, once per cell transmission time, which virtual
// connections may emit a cell.
//
// A parameter memory holds, for each of NUM_VC entries, the time since the
// connection's last cell departure (TCD, in cell times), its allowed emission
// interval (AEI, in cell times, computed by software from the allowed cell
// rate) and the list number of its cell queue. On slot_start an access
// controller sweeps the entries 0..NUM_VC-1, one per clock. For each entry an
// adder forms TCD+1 and a comparator checks it against AEI. If TCD+1 has
// reached AEI the initializer writes TCD = 0 and the entry's list number is
// issued on permit_list with a one-clock permit_valid; otherwise TCD+1 is
// written back. A connection is thus permitted once every AEI cell times.
// An entry with AEI = 0 is idle: it is never permitted and its TCD stays.
// The CPU writes {list number, AEI} (cpu_field = 0) or TCD (cpu_field = 1);
// a CPU write wins over the sweep in the same clock.
// The memory, sweep, adder, comparator and initializer are the document's.
// The comparison is ">=" rather than "==" so that lowering an AEI below the
// current TCD still permits the connection; the document's flow chart
// tests "TCD < AEI", which agrees. AEI = 0 as "idle" is this design's choice.
// Timing: the sweep takes NUM_VC clocks after slot_start and must end before
// the next slot_start, i.e. NUM_VC must not exceed the clocks per cell time.
module emission_scheduler #(
  parameter int unsigned NUM_VC = 32,
  parameter int unsigned AEI_W  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      slot_start,
  input  logic                      cpu_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_entry,
  input  logic                      cpu_field,
  input  logic [$clog2(NUM_VC)-1:0] cpu_list,
  input  logic [AEI_W-1:0]          cpu_value,
  output logic                      permit_valid,
  output logic [$clog2(NUM_VC)-1:0] permit_list,
  output logic                      busy
);
  localparam int unsigned LW = $clog2(NUM_VC);

  logic [AEI_W-1:0] tcd_q [NUM_VC];
  logic [AEI_W-1:0] aei_q [NUM_VC];
  logic [LW-1:0]    lno_q [NUM_VC];

  logic [LW-1:0]    idx_q;
  logic             busy_q;
  logic [AEI_W-1:0] tcd_inc;
  logic             match;

  assign busy    = busy_q;
  assign tcd_inc = tcd_q[idx_q] + 1'b1;                       // adder
  assign match   = (aei_q[idx_q] != '0) && (tcd_inc >= aei_q[idx_q]); // comparator

  // access controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      idx_q  <= '0;
    end else if (slot_start) begin
      busy_q <= 1'b1;
      idx_q  <= '0;
    end else if (busy_q) begin
      idx_q  <= idx_q + 1'b1;
      if (idx_q == LW'(NUM_VC - 1)) busy_q <= 1'b0;
    end
  end

  // parameter memory; adder result or initializer zero written back
  always_ff @(posedge clk) begin
    if (busy_q && aei_q[idx_q] != '0 && !(cpu_we && cpu_field && cpu_entry == idx_q))
      tcd_q[idx_q] <= match ? '0 : tcd_inc;
    if (cpu_we) begin
      if (cpu_field) tcd_q[cpu_entry] <= cpu_value;
      else lno_q[cpu_entry] <= cpu_list;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      permit_valid <= 1'b0;
      permit_list  <= '0;
    end else begin
      permit_valid <= busy_q && match;
      permit_list  <= lno_q[idx_q];
    end
  end

  // AEI is reset to 0, leaving every entry idle until the CPU sets it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_VC; i++) aei_q[i] <= '0;
    end else if (cpu_we && !cpu_field) begin
      aei_q[cpu_entry] <= cpu_value;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) slot_start |-> !busy_q)
    else $error("parameter sweep longer than one cell time");
endmodule
