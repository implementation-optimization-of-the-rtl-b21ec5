// tb_des_cipher_f: checks one cipher function, dout = din ^ P(S_round(E(din) ^ k)),
// against vectors computed with a separate software model of the same round,
// which was itself validated by reproducing the standard DES test vector
// (key 133457799BBCDFF1, plaintext 0123456789ABCDEF -> 85E813540F0AB405).
// Every round index, and so every S-box, is covered.
module tb_des_cipher_f;
  import des_pkg::*;

  half_t   din, dout;
  subkey_t subkey;
  round_t  round;
  int      checks = 0, failures = 0;

  des_cipher_f dut (.din(din), .subkey(subkey), .round(round), .dout(dout));

  typedef struct packed { half_t d; subkey_t k; round_t r; half_t q; } vec_t;
  localparam vec_t VEC [12] = '{
    '{32'h52e6b438, 48'h269ef2a74de4, 3'd0, 32'hb178625f},
    '{32'h6513270e, 48'h0c5ca6a3a450, 3'd1, 32'h93c9bcd6},
    '{32'h128b2f33, 48'h892fd23f0824, 3'd2, 32'hf31f69f2},
    '{32'h1818e811, 48'h95315d9dc9f8, 3'd3, 32'hc4509aa7},
    '{32'h0ed90475, 48'h81e7e8e25d94, 3'd4, 32'h6766c255},
    '{32'h36f675cc, 48'h1600099950d8, 3'd5, 32'h380eb663},
    '{32'h6f03675a, 48'h11e26b0d549b, 3'd6, 32'h5b75cba3},
    '{32'h3d9c1724, 48'h8d111738f7d9, 3'd7, 32'h96a487d4},
    '{32'h6cad4a26, 48'hd3ac0f21ddb6, 3'd0, 32'h551359ff},
    '{32'h90c192cf, 48'hf28c1fb17c23, 3'd1, 32'h43cb475b},
    '{32'h39263059, 48'ha09fa170b338, 3'd2, 32'h2ba15a08},
    '{32'h953f48f1, 48'h0fd6f29d0da9, 3'd3, 32'h04a5690a}
  };

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (VEC[i]) begin
      din = VEC[i].d; subkey = VEC[i].k; round = VEC[i].r;
      #1;
      checks++;
      if (dout !== VEC[i].q) begin
        failures++;
        $display("FAIL f(%h, %h, round %0d) = %h, expected %h",
                 din, subkey, round, dout, VEC[i].q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
