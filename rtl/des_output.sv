// des_output: output block. Joins the final halves as L8 || R8, applies the
// standard final permutation (the inverse of IP) and holds the ciphertext on
// dataout. The result is captured on the clock edge where capture is high
// (the last round) and is held until the next capture; reset clears it.
//
// The halves are joined without the swap that standard 16-round DES makes
// before its final permutation, since in this core the halves never cross.
// The hold element is an edge-triggered register rather than the level-
// sensitive latch of the original FPGA build, which keeps the core free of
// timing hazards between the round logic and the output.
module des_output
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   capture,  // capture FP(l8 || r8) on this edge
  input  half_t  l8,       // final left half
  input  half_t  r8,       // final right half
  output block_t dataout   // ciphertext, held
);

  block_t joined, permuted;

  assign joined = {l8, r8};

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      permuted[63 - i] = joined[64 - int'(FP_TAB[i])];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dataout <= '0;
    end else if (capture) begin
      dataout <= permuted;
    end
  end

endmodule
