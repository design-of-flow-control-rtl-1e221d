// list_addr_mem: one address per cell list. Used twice: as the write address
// memory (next write position of each list) and as the read address memory
// (next read position of each list).
//
// NUM_VC words of AW bits. The CPU writes the initial addresses through
// cpu_we/cpu_idx/cpu_data. The queue controller reads one word
// combinationally at rd_idx and writes one word through wr_en/wr_idx/wr_data.
// If both write in the same clock, the CPU write wins. Being only NUM_VC words,
// the memory is kept in registers. Its role and initialisation by software are
// the document's; port structure and write priority are this design's.
module list_addr_mem #(
  parameter int unsigned NUM_VC = 32,
  parameter int unsigned AW     = 15
) (
  input  logic                      clk,
  input  logic                      cpu_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_idx,
  input  logic [AW-1:0]             cpu_data,
  input  logic [$clog2(NUM_VC)-1:0] rd_idx,
  output logic [AW-1:0]             rd_data,
  input  logic [$clog2(NUM_VC)-1:0] rd2_idx,
  output logic [AW-1:0]             rd2_data,
  input  logic                      wr_en,
  input  logic [$clog2(NUM_VC)-1:0] wr_idx,
  input  logic [AW-1:0]             wr_data
);
  logic [AW-1:0] mem [NUM_VC];

  always_ff @(posedge clk) begin
    if (cpu_we) mem[cpu_idx] <= cpu_data;
    if (wr_en && !(cpu_we && cpu_idx == wr_idx)) mem[wr_idx] <= wr_data;
  end

  assign rd_data  = mem[rd_idx];
  assign rd2_data = mem[rd2_idx];
endmodule
