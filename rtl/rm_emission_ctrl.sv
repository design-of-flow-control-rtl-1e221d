// rm_emission_ctrl: decides when a forward RM cell is due on a connection.
//
// An RM parameter memory holds, per list: Ndt (in-rate data cells sent since
// the last forward RM cell), Nrm, Mrm, Trc (cell times since the last forward
// RM cell) and Trm. Each time a data cell of list n is sent (data_valid,
// data_list), an adder forms Ndt+1 and two comparisons are made:
//   Nrm rule:       Ndt+1 >= Nrm
//   Mrm/Trm rule:   Ndt+1 >= Mrm  and  Trc >= Trm
// If either holds, the list number is passed to the RM request FIFO
// (frm_valid/frm_list) and Ndt and Trc of the list are cleared; otherwise
// Ndt+1 is written back. Trc is advanced by a second adder in a sweep over
// all lists that starts at every slot_start, one list per clock, and
// saturates at its maximum. A list with Nrm = 0 is not an ABR list and never
// requests; Trm = 0 disables the Mrm/Trm rule.
// The memory, adders, comparators and the OR of the two rules are the
// document's. Counting Trc in cell times, the ">=" compares, and the
// meaning of the zero values are this design's choices. Software that wants
// a forward RM cell after Nrm-1 data cells loads Nrm-1.
// CPU fields (cpu_field): 0 Nrm, 1 Mrm, 2 Trm, 3 clear Ndt and Trc.
// Timing: frm_valid follows data_valid by one clock.
module rm_emission_ctrl #(
  parameter int unsigned NUM_VC = 32,
  parameter int unsigned CNT_W  = 9,
  parameter int unsigned TRM_W  = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      slot_start,
  input  logic                      data_valid,
  input  logic [$clog2(NUM_VC)-1:0] data_list,
  input  logic                      cpu_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_list,
  input  logic [1:0]                cpu_field,
  input  logic [TRM_W-1:0]          cpu_value,
  output logic                      frm_valid,
  output logic [$clog2(NUM_VC)-1:0] frm_list,
  output logic                      frm_by_nrm,
  output logic                      frm_by_trm
);
  localparam int unsigned LW = $clog2(NUM_VC);

  logic [CNT_W-1:0] ndt_q [NUM_VC];
  logic [CNT_W-1:0] nrm_q [NUM_VC];
  logic [CNT_W-1:0] mrm_q [NUM_VC];
  logic [TRM_W-1:0] trc_q [NUM_VC];
  logic [TRM_W-1:0] trm_q [NUM_VC];

  logic [LW-1:0]    sw_idx_q;
  logic             sw_busy_q;
  logic [CNT_W-1:0] ndt_inc;
  logic             nrm_hit, trm_hit, send;

  assign ndt_inc = ndt_q[data_list] + 1'b1;
  assign nrm_hit = (nrm_q[data_list] != '0) && (ndt_inc >= nrm_q[data_list]);
  assign trm_hit = (nrm_q[data_list] != '0) && (trm_q[data_list] != '0) &&
                   (ndt_inc >= mrm_q[data_list]) && (trc_q[data_list] >= trm_q[data_list]);
  assign send    = data_valid && (nrm_hit || trm_hit);

  // Trc sweep controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_busy_q <= 1'b0;
      sw_idx_q  <= '0;
    end else if (slot_start) begin
      sw_busy_q <= 1'b1;
      sw_idx_q  <= '0;
    end else if (sw_busy_q) begin
      sw_idx_q <= sw_idx_q + 1'b1;
      if (sw_idx_q == LW'(NUM_VC - 1)) sw_busy_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_VC; i++) begin
        ndt_q[i] <= '0;
        nrm_q[i] <= '0;
        mrm_q[i] <= '0;
        trc_q[i] <= '0;
        trm_q[i] <= '0;
      end
    end else begin
      // Trc: sweep increment, cleared by a forward RM cell or by the CPU
      if (sw_busy_q && trc_q[sw_idx_q] != '1) trc_q[sw_idx_q] <= trc_q[sw_idx_q] + 1'b1;
      if (data_valid) begin
        if (send) begin
          ndt_q[data_list] <= '0;
          trc_q[data_list] <= '0;
        end else begin
          ndt_q[data_list] <= ndt_inc;
        end
      end
      if (cpu_we) begin
        case (cpu_field)
          2'd0: nrm_q[cpu_list] <= CNT_W'(cpu_value);
          2'd1: mrm_q[cpu_list] <= CNT_W'(cpu_value);
          2'd2: trm_q[cpu_list] <= cpu_value;
          default: begin
            ndt_q[cpu_list] <= '0;
            trc_q[cpu_list] <= '0;
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm_valid  <= 1'b0;
      frm_list   <= '0;
      frm_by_nrm <= 1'b0;
      frm_by_trm <= 1'b0;
    end else begin
      frm_valid  <= send;
      frm_list   <= data_list;
      frm_by_nrm <= send && nrm_hit;
      frm_by_trm <= send && !nrm_hit && trm_hit;
    end
  end
endmodule
