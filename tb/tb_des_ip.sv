// tb_des_ip: checks the input block. The expected permutation is computed from
// the closed form of IP (output bit 8*row+col+1 takes input bit
// 8*(7-col) + (row<4 ? 2*row+2 : 2*row-7)) rather than from the table, and the
// classic worked vector 0123456789ABCDEF -> L0 CC00CCFF, R0 F0AAF0AA is checked.
module tb_des_ip;
  import des_pkg::*;

  block_t datain;
  half_t  l0, r0;
  int     checks = 0, failures = 0;

  des_ip dut (.datain(datain), .l0(l0), .r0(r0));

  function automatic block_t ip_ref(block_t x);
    block_t y;
    for (int row = 0; row < 8; row++) begin
      for (int col = 0; col < 8; col++) begin
        int src;
        src = 8 * (7 - col) + (row < 4 ? 2 * row + 2 : 2 * row - 7);
        y[63 - (8 * row + col)] = x[64 - src];
      end
    end
    return y;
  endfunction

  task automatic check(block_t x);
    block_t exp_v;
    datain = x;
    #1;
    exp_v = ip_ref(x);
    checks++;
    if ({l0, r0} !== exp_v) begin
      failures++;
      $display("FAIL ip(%h) = %h_%h, expected %h", x, l0, r0, exp_v);
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
    datain = 64'h0123456789abcdef;
    #1;
    checks++;
    if (l0 !== 32'hcc00ccff || r0 !== 32'hf0aaf0aa) begin
      failures++;
      $display("FAIL worked vector: %h %h", l0, r0);
    end
    // Every single-bit input must land on exactly the place the closed form says.
    for (int b = 0; b < 64; b++) check(64'd1 << b);
    for (int n = 0; n < 200; n++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
