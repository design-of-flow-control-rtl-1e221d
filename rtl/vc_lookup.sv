// vc_lookup: translates the VPI/VCI of a cell into the list number of its
// cell queue (the identifier translation step in front of the write address
// memory).
//
// It is a small content-addressable table of NUM_VC entries, one per list,
// each holding a valid bit and a 24-bit VPI/VCI key. The CPU writes entry
// `cpu_idx` with {valid, key}. A lookup compares the key with every valid
// entry in parallel; the lowest matching entry number is the list number.
// The document says only that the identifier "is translated to the list
// number"; the associative table is this design's choice.
// Timing: lookup is combinational; a CPU write takes effect the next clock.
module vc_lookup
  import abr_pkg::*;
#(
  parameter int unsigned NUM_VC = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cpu_we,
  input  logic [$clog2(NUM_VC)-1:0] cpu_idx,
  input  logic                      cpu_valid,
  input  logic [VCKEY_W-1:0]        cpu_key,
  input  logic [VCKEY_W-1:0]        key,
  output logic                      hit,
  output logic [$clog2(NUM_VC)-1:0] list_no
);
  localparam int unsigned LW = $clog2(NUM_VC);

  logic [NUM_VC-1:0]  valid_q;
  logic [VCKEY_W-1:0] key_q [NUM_VC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (cpu_we) valid_q[cpu_idx] <= cpu_valid;
  end

  always_ff @(posedge clk) begin
    if (cpu_we) key_q[cpu_idx] <= cpu_key;
  end

  always_comb begin
    hit     = 1'b0;
    list_no = '0;
    for (int i = NUM_VC - 1; i >= 0; i--) begin
      if (valid_q[i] && key_q[i] == key) begin
        hit     = 1'b1;
        list_no = LW'(i);
      end
    end
  end
endmodule
