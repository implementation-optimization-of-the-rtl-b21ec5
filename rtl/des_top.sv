// des_top: DES encryptor with eight rounds and two cipher functions.
//
// The plaintext goes through the initial permutation (des_ip) and is split into
// the 32-bit halves L and R. Each half has its own cipher function
// (des_cipher_f) and its own register, and the two are updated together, once
// per clock, for eight rounds:
//
//     L(r+1) = L(r) ^ P(S_(r+1)(E(L(r)) ^ K(2r+1)))
//     R(r+1) = R(r) ^ P(S_(r+1)(E(R(r)) ^ K(2r+2)))      r = 0..7
//
// Round r uses S-box S(r+1) in both functions, so every one of the eight
// standard S-boxes is used once per block. The key schedule (des_key_schedule)
// forms the two sub-keys of a round at once from PC-1(key) by rotations of one
// to four places and PC-2. After round 8, L8 || R8 goes through the final
// permutation (des_output) and is held on dataout.
//
// Because the two halves never exchange data, the result is not the ciphertext
// of standard FIPS 46 DES; the core reproduces the round structure described for
// this design, with the standard DES tables.
//
// Interface and timing: raise first with datain and key valid while busy is low.
// The next edge is the initialisation clock (PC-1 and IP), then eight round
// clocks follow with busy high; on the ninth edge dataout is written, busy falls
// and dataready rises. A block thus takes nine clocks from the edge that samples
// first to dataready, and a new block can start on the edge after dataready rises.
// key and datain need only be valid on the edge that samples first. Reset
// (rst_n, asynchronous, active low) is this design's addition.
//
// Bit order: bit 63 of datain, key and dataout is bit 0 of the original
// datain[0:63] / key[0:63] / dataout[0:63] buses, i.e. DES bit 1.
module des_top
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   first,      // start: datain and key valid
  input  block_t datain,     // plaintext
  input  key_t   key,        // 64-bit key including parity bits
  output block_t dataout,    // ciphertext, held until the next block
  output logic   busy,       // encryption in progress
  output logic   dataready   // dataout valid
);

  logic    load, round_en, last;
  round_t  round;
  half_t   l0, r0, l_q, r_q, l_next, r_next;
  subkey_t subkey_l, subkey_r;

  des_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .first     (first),
    .load      (load),
    .round_en  (round_en),
    .round     (round),
    .last      (last),
    .busy      (busy),
    .dataready (dataready)
  );

  des_ip u_ip (
    .datain (datain),
    .l0     (l0),
    .r0     (r0)
  );

  des_key_schedule u_keys (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .step     (round_en),
    .key      (key),
    .round    (round),
    .subkey_l (subkey_l),
    .subkey_r (subkey_r)
  );

  des_cipher_f u_f_left (
    .din    (l_q),
    .subkey (subkey_l),
    .round  (round),
    .dout   (l_next)
  );

  des_cipher_f u_f_right (
    .din    (r_q),
    .subkey (subkey_r),
    .round  (round),
    .dout   (r_next)
  );

  // Half-block registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0;
      r_q <= '0;
    end else if (load) begin
      l_q <= l0;
      r_q <= r0;
    end else if (round_en) begin
      l_q <= l_next;
      r_q <= r_next;
    end
  end

  des_output u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (last),
    .l8      (l_next),
    .r8      (r_next),
    .dataout (dataout)
  );

endmodule
