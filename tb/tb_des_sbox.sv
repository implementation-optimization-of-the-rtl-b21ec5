// tb_des_sbox: checks the round-selected S-box unit. Expected values are typed
// in from the published DES S-boxes independently of the RTL tables: the first
// and last entry of every box, row-selection entries of S1, and the eight
// substitutions of the classic worked example's first round (each box on its
// own 6-bit group). It also checks, exhaustively, that with the same six bits in
// all groups every group gives the same nibble, and that each of the 4 rows of
// each box is a permutation of 0..15.
module tb_des_sbox;
  import des_pkg::*;

  subkey_t x;
  round_t  sel;
  half_t   y;
  int      checks = 0, failures = 0;

  des_sbox dut (.x(x), .sel(sel), .y(y));

  // Standard S-box entries, written as {box, six-bit input, output}.
  typedef struct packed { logic [2:0] box; logic [5:0] six; logic [3:0] val; } known_t;
  localparam known_t KNOWN [28] = '{
    // first entry (row 0, col 0) and last entry (row 3, col 15) of S1..S8
    '{3'd0, 6'b000000, 4'd14}, '{3'd0, 6'b111111, 4'd13},
    '{3'd1, 6'b000000, 4'd15}, '{3'd1, 6'b111111, 4'd9},
    '{3'd2, 6'b000000, 4'd10}, '{3'd2, 6'b111111, 4'd12},
    '{3'd3, 6'b000000, 4'd7},  '{3'd3, 6'b111111, 4'd14},
    '{3'd4, 6'b000000, 4'd2},  '{3'd4, 6'b111111, 4'd3},
    '{3'd5, 6'b000000, 4'd12}, '{3'd5, 6'b111111, 4'd13},
    '{3'd6, 6'b000000, 4'd4},  '{3'd6, 6'b111111, 4'd12},
    '{3'd7, 6'b000000, 4'd13}, '{3'd7, 6'b111111, 4'd11},
    // S1 rows 1, 2 and 3 at column 0, row 0 column 1
    '{3'd0, 6'b000001, 4'd0},  '{3'd0, 6'b100000, 4'd4},
    '{3'd0, 6'b100001, 4'd15}, '{3'd0, 6'b000010, 4'd4},
    // worked example, round 1: S1..S8 on their groups
    '{3'd0, 6'b011000, 4'd5},  '{3'd1, 6'b010001, 4'd12},
    '{3'd2, 6'b011110, 4'd8},  '{3'd3, 6'b111010, 4'd2},
    '{3'd4, 6'b100001, 4'd11}, '{3'd5, 6'b100110, 4'd5},
    '{3'd6, 6'b010100, 4'd9},  '{3'd7, 6'b100111, 4'd7}
  };

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (KNOWN[i]) begin
      for (int g = 0; g < 8; g++) begin
        x   = subkey_t'({$urandom, $urandom});
        x[47 - 6 * g -: 6] = KNOWN[i].six;
        sel = KNOWN[i].box;
        #1;
        checks++;
        if (y[31 - 4 * g -: 4] !== KNOWN[i].val) begin
          failures++;
          $display("FAIL S%0d(%b) in group %0d = %0d, expected %0d",
                   KNOWN[i].box + 1, KNOWN[i].six, g, y[31 - 4 * g -: 4], KNOWN[i].val);
        end
      end
    end
    for (int b = 0; b < 8; b++) begin
      for (int row = 0; row < 4; row++) begin
        logic [15:0] seen;
        seen = '0;
        for (int col = 0; col < 16; col++) begin
          logic [5:0] six;
          six = {row[1], col[3:0], row[0]};
          x   = {8{six}};
          sel = round_t'(b);
          #1;
          checks++;
          if (y !== {8{y[3:0]}}) begin
            failures++;
            $display("FAIL S%0d groups disagree: %h", b + 1, y);
          end
          seen[y[3:0]] = 1'b1;
        end
        checks++;
        if (seen !== 16'hffff) begin
          failures++;
          $display("FAIL S%0d row %0d is not a permutation (%h)", b + 1, row, seen);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
