// tb_crc10: compares the CRC-10 with a bit-serial polynomial division written
// independently (long division of data * x^10 by 0x633), checks a known
// vector and that the payload with its CRC divides to zero.
module tb_crc10;
  logic [373:0] data;
  logic [9:0]   crc;
  int checks = 0, failures = 0;

  crc10 dut (.data, .crc);

  // remainder of a bit string (most significant first) modulo G(x) = 0x633
  function automatic logic [9:0] poly_mod(logic [383:0] v, int nbits);
    logic [10:0] r;
    r = '0;
    for (int i = nbits - 1; i >= 0; i--) begin
      r = {r[9:0], v[i]};
      if (r[10]) r = r ^ 11'h633;
    end
    return r[9:0];
  endfunction

  initial begin
    #1000;
    data = '0; #1;
    checks++; if (crc != 10'h000) begin failures++; $display("zero data crc %h", crc); end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 374; i += 32) data[i +: 32] = $urandom;
      #1;
      checks += 2;
      if (crc != poly_mod({data, 10'h000}, 384)) begin failures++; $display("crc %h", crc); end
      if (poly_mod({data, crc}, 384) != 10'h000) begin failures++; $display("residue"); end
    end
    // single one in the last data bit: remainder is x^10 mod G = 0x233
    data = 374'd1; #1;
    checks++; if (crc != 10'h233) begin failures++; $display("x^10 crc %h", crc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
