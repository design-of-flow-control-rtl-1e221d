// crc10: CRC-10 of an RM cell payload.
//
// The last 10 bits of an RM (and OAM) cell payload carry a CRC-10 over the
// preceding 374 payload bits. The generator polynomial is
// G(x) = x^10 + x^9 + x^5 + x^4 + x + 1 (ITU-T I.610), register starting at
// zero, bits taken most significant first. A payload with the CRC in place
// leaves a zero remainder when all 384 bits are divided by G(x).
// The document requires CRC-10 generation for RM cells; the polynomial comes
// from the ATM standards, not from the document.
// Combinational; the bit-serial loop unrolls to an XOR network.
module crc10 #(
  parameter int unsigned DATA_W = 374
) (
  input  logic [DATA_W-1:0] data,
  output logic [9:0]        crc
);
  localparam logic [9:0] POLY = 10'h233;

  always_comb begin
    logic fb;
    crc = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb  = data[i] ^ crc[9];
      crc = {crc[8:0], 1'b0} ^ (fb ? POLY : 10'h000);
    end
  end
endmodule
