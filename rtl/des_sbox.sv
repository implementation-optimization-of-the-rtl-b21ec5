// des_sbox: round-selected substitution. The 48-bit input is cut into eight
// 6-bit groups; every group is replaced by the 4-bit entry of one S-box, and the
// eight nibbles are joined into 32 bits. The S-box is chosen by the round:
// round 0 uses S1, round 1 uses S2, ... round 7 uses S8, so that each of the
// eight standard tables is used exactly once per block. Within a group the
// outer bits (first and sixth) pick the row and the middle four the column, as
// in the standard.
//
// Combinational. sel is the round index 0..7. Using one table per round for all
// eight groups is how this design reads "first cycle using S1, second cycle S2";
// the tables themselves are the standard DES S-boxes.
module des_sbox
  import des_pkg::*;
(
  input  subkey_t x,    // E(half) xor sub-key
  input  round_t  sel,  // round index, selects S(sel+1)
  output half_t   y     // substituted value
);

  always_comb begin
    for (int g = 0; g < 8; g++) begin
      logic [5:0] six;
      six = x[47 - 6*g -: 6];
      y[31 - 4*g -: 4] = SBOX[sel][{six[5], six[0], six[4:1]}];
    end
  end

endmodule
