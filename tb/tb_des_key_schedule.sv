// tb_des_key_schedule: loads two keys and steps through the eight rounds,
// checking that round r presents the standard DES sub-keys K(2r+1) (left) and
// K(2r+2) (right). The expected sub-keys were computed with a separate
// software key schedule using the standard shift schedule (K1 of key
// 133457799BBCDFF1 is the well-known 1B02EFFC7072). A second pass without
// reloading checks that C and D return to PC-1(key) after eight rounds, and a
// cycle with step low checks that the registers hold.
module tb_des_key_schedule;
  import des_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b1, load = 1'b0, step = 1'b0;
  key_t    key;
  round_t  round;
  subkey_t subkey_l, subkey_r;
  int      checks = 0, failures = 0;

  des_key_schedule dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .key(key),
                        .round(round), .subkey_l(subkey_l), .subkey_r(subkey_r));

  always #5 clk = ~clk;

  localparam key_t    KEYS [2] = '{64'h133457799bbcdff1, 64'h0e329232ea6d0d73};
  localparam subkey_t SK [2][16] = '{
    '{48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
      48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
      48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
      48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5},
    '{48'h36146478e1e1, 48'h40bd1176e8fd, 48'h45a473239ddb, 48'he7c4828fb533,
      48'h7a83826f4f64, 48'h38901b58c9de, 48'h25005ec5d49d, 48'h264894cb36e9,
      48'h54554179f633, 48'h43c9453f4c2e, 48'h09e1878c79d6, 48'h3105aba5e2f5,
      48'hf100a1f38ec3, 48'h918a949e871f, 48'h1432961f77c4, 48'h606f044c3ae7}
  };

  task automatic check_round(int k, int r);
    round = round_t'(r);
    #1;
    checks += 2;
    if (subkey_l !== SK[k][2 * r]) begin
      failures++;
      $display("FAIL key %0d round %0d left %h, expected %h", k, r, subkey_l, SK[k][2 * r]);
    end
    if (subkey_r !== SK[k][2 * r + 1]) begin
      failures++;
      $display("FAIL key %0d round %0d right %h, expected %h", k, r, subkey_r, SK[k][2 * r + 1]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    round = '0;
    key   = '0;
    #0.5 rst_n = 1'b0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      key = KEYS[k]; load = 1'b1;
      @(negedge clk);
      load = 1'b0; key = ~KEYS[k];   // the key only needs to be valid on load
      for (int pass = 0; pass < 2; pass++) begin
        for (int r = 0; r < 8; r++) begin
          check_round(k, r);
          if (r == 3 && pass == 0) begin
            // a clock with step low must not move C and D
            @(negedge clk);
            check_round(k, r);
          end
          step = 1'b1;
          @(negedge clk);
          step = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
