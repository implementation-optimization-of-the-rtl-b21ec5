// tb_des_output: checks the output block. Its final permutation must undo the
// initial permutation: the testbench builds L8 || R8 as IP(x), with IP computed
// from its closed form, and expects x on dataout after a capture edge. It also
// checks that dataout holds while capture is low and that reset clears it.
module tb_des_output;
  import des_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1, capture = 1'b0;
  half_t  l8, r8;
  block_t dataout;
  int     checks = 0, failures = 0;

  des_output dut (.clk(clk), .rst_n(rst_n), .capture(capture), .l8(l8), .r8(r8),
                  .dataout(dataout));

  always #5 clk = ~clk;

  function automatic block_t ip_ref(block_t x);
    block_t y;
    for (int row = 0; row < 8; row++) begin
      for (int col = 0; col < 8; col++) begin
        y[63 - (8 * row + col)] = x[64 - (8 * (7 - col) + (row < 4 ? 2 * row + 2 : 2 * row - 7))];
      end
    end
    return y;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t x, held;
    l8 = '0; r8 = '0;
    #0.5 rst_n = 1'b0;
    #0.5;
    checks++;
    if (dataout !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    #11 rst_n = 1'b1;
    // worked vector: FP(CC00CCFF_F0AAF0AA) = 0123456789ABCDEF
    @(negedge clk);
    {l8, r8} = 64'hcc00ccfff0aaf0aa; capture = 1'b1;
    @(negedge clk);
    capture = 1'b0;
    checks++;
    if (dataout !== 64'h0123456789abcdef) begin
      failures++; $display("FAIL worked vector: %h", dataout);
    end
    for (int n = 0; n < 100; n++) begin
      x = (n < 64) ? (64'd1 << n) : {$urandom, $urandom};
      {l8, r8} = ip_ref(x);
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      checks++;
      if (dataout !== x) begin
        failures++; $display("FAIL FP(IP(%h)) = %h", x, dataout);
      end
      held = dataout;
      {l8, r8} = {$urandom, $urandom};
      @(negedge clk);
      checks++;
      if (dataout !== held) begin
        failures++; $display("FAIL dataout changed without capture");
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (dataout !== '0) begin failures++; $display("FAIL reset does not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
