// des_ip: input block. Applies the DES initial permutation IP to the 64-bit
// plaintext and splits the result into the left half L0 (first 32 bits) and the
// right half R0 (last 32 bits), which feed the two cipher functions.
//
// Purely combinational wiring; it costs no logic. The IP table is the standard
// one (des_pkg::IP_TAB). Bit 63 of datain is DES bit 1.
module des_ip
  import des_pkg::*;
(
  input  block_t datain,  // plaintext
  output half_t  l0,      // left half after IP
  output half_t  r0       // right half after IP
);

  block_t permuted;

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      permuted[63 - i] = datain[64 - int'(IP_TAB[i])];
    end
  end

  assign l0 = permuted[63:32];
  assign r0 = permuted[31:0];

endmodule
