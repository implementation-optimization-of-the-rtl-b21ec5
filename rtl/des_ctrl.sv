// des_ctrl: sequencer of the 8-round DES core.
//
// A block takes nine clock edges. On the edge that samples first = 1 while the
// core is idle, load is high: the key schedule captures PC-1(key) and the
// half-block registers capture IP(datain) (the one initialisation clock). The
// core is then busy for eight edges, rounds 0..7; round_en is high in each and
// round gives the round index. In round 7 last is high, the output block
// captures the ciphertext on that edge, busy falls and dataready rises.
// dataready then stays high, with dataout held, until the next accepted first.
//
// first while busy is ignored (the running block is not disturbed). Reset is
// asynchronous and active low and leaves the core idle with dataready low.
module des_ctrl
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   first,      // start request: key and datain are valid
  output logic   load,       // initialisation clock: capture key and IP(datain)
  output logic   round_en,   // a round is computed on this edge
  output round_t round,      // round index 0..7
  output logic   last,       // the final round: capture the ciphertext
  output logic   busy,       // a block is being encrypted
  output logic   dataready   // dataout holds the result of the last block
);

  logic   busy_q, ready_q;
  round_t round_q;

  assign load     = first && !busy_q;
  assign round_en = busy_q;
  assign round    = round_q;
  assign last     = busy_q && (round_q == round_t'(ROUNDS - 1));
  assign busy     = busy_q;
  assign dataready = ready_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      ready_q <= 1'b0;
      round_q <= '0;
    end else if (load) begin
      busy_q  <= 1'b1;
      ready_q <= 1'b0;
      round_q <= '0;
    end else if (busy_q) begin
      round_q <= round_q + 1'b1;
      if (last) begin
        busy_q  <= 1'b0;
        ready_q <= 1'b1;
      end
    end
  end

  // busy and dataready are never high together.
  a_busy_ready_excl : assert property (@(posedge clk) disable iff (!rst_n)
    !(busy_q && ready_q));
  // A block always ends with dataready on the edge after the last round.
  a_last_then_ready : assert property (@(posedge clk) disable iff (!rst_n)
    last |=> (ready_q && !busy_q));

endmodule
