// des_cipher_f: one cipher function of the 8-round, two-function DES core.
// It expands a 32-bit half to 48 bits with the standard E table, XORs the
// sub-key, substitutes with the S-box of the current round (des_sbox), permutes
// the 32-bit result with the standard P table and XORs it back onto the half it
// was given:
//
//     dout = din ^ P(S_round(E(din) ^ subkey))
//
// Combinational; the caller registers dout. Two instances run side by side, one
// on the left half and one on the right half, and neither depends on the
// other, so both halves advance one round per clock.
module des_cipher_f
  import des_pkg::*;
(
  input  half_t   din,     // half block at the start of the round
  input  subkey_t subkey,  // 48-bit round sub-key
  input  round_t  round,   // round index 0..7
  output half_t   dout     // half block at the end of the round
);

  subkey_t expanded;
  half_t   substituted;
  half_t   permuted;

  always_comb begin
    for (int i = 0; i < 48; i++) begin
      expanded[47 - i] = din[32 - int'(E_TAB[i])];
    end
  end

  des_sbox u_sbox (
    .x   (expanded ^ subkey),
    .sel (round),
    .y   (substituted)
  );

  always_comb begin
    for (int i = 0; i < 32; i++) begin
      permuted[31 - i] = substituted[32 - int'(P_TAB[i])];
    end
  end

  assign dout = din ^ permuted;

endmodule
