// des_key_schedule: sub-key generator. On load the 64-bit external key passes
// through the standard compression permutation PC-1, which drops the eight
// parity bits, and the 56-bit result is stored as the two 28-bit halves C and D.
// In every round two sub-keys are formed at once, one per cipher function:
//
//     subkey_l = PC-2(C <<< ROT_L[round], D <<< ROT_L[round])   (1 or 2 places)
//     subkey_r = PC-2(C <<< ROT_R[round], D <<< ROT_R[round])   (2, 3 or 4 places)
//
// and on step C and D advance by ROT_R[round]. The rotations are the standard
// DES shift schedule taken two entries at a time, so round r delivers the
// standard sub-keys K(2r+1) and K(2r+2); after eight rounds C and D have
// turned 28 places and hold PC-1(key) again.
//
// Timing: load and step act on the rising clock edge; the sub-keys are
// combinational from the registers and the round index. load wins over step.
module des_key_schedule
  import des_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,     // asynchronous, active low; clears C and D
  input  logic    load,      // capture PC-1(key)
  input  logic    step,      // advance C and D by the round's rotation
  input  key_t    key,       // external 64-bit key with parity bits
  input  round_t  round,     // current round 0..7
  output subkey_t subkey_l,  // sub-key of the left cipher function
  output subkey_t subkey_r   // sub-key of the right cipher function
);

  logic [55:0] pc1;
  cd_t         c_q, d_q;

  always_comb begin
    for (int i = 0; i < 56; i++) begin
      pc1[55 - i] = key[64 - int'(PC1_TAB[i])];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= '0;
      d_q <= '0;
    end else if (load) begin
      c_q <= pc1[55:28];
      d_q <= pc1[27:0];
    end else if (step) begin
      c_q <= rotl28(c_q, ROT_R[round]);
      d_q <= rotl28(d_q, ROT_R[round]);
    end
  end

  function automatic subkey_t pc2(cd_t c, cd_t d);
    logic [55:0] cd;
    subkey_t     k;
    cd = {c, d};
    for (int i = 0; i < 48; i++) begin
      k[47 - i] = cd[56 - int'(PC2_TAB[i])];
    end
    return k;
  endfunction

  assign subkey_l = pc2(rotl28(c_q, ROT_L[round]), rotl28(d_q, ROT_L[round]));
  assign subkey_r = pc2(rotl28(c_q, ROT_R[round]), rotl28(d_q, ROT_R[round]));

endmodule
