// tb_des_ctrl: checks the sequencer's timing. For each block it expects load in
// the cycle where first is raised while idle, then eight busy cycles with round
// 0..7 and round_en, last only in round 7, dataready on the ninth edge after
// first was sampled, and dataready held until the next start. It also raises
// first in the middle of a block (must be ignored), starts a block right after
// dataready (back to back), and resets in the middle of a block.
module tb_des_ctrl;
  import des_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1, first = 1'b0;
  logic   load, round_en, last, busy, dataready;
  round_t round;
  int     checks = 0, failures = 0;

  des_ctrl dut (.clk(clk), .rst_n(rst_n), .first(first), .load(load), .round_en(round_en),
                .round(round), .last(last), .busy(busy), .dataready(dataready));

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Runs one block from the negedge where first is raised; pokes first in the
  // round given by poke (-1 for none). Returns the edges until dataready.
  task automatic run_block(int poke, output int edges);
    first = 1'b1;
    #1 expect_true(load && !busy, "load on start");
    @(negedge clk);
    first = 1'b0;
    edges = 1;
    for (int r = 0; r < 8; r++) begin
      first = (r == poke);
      #1;
      expect_true(busy && round_en && round == round_t'(r), "round sequence");
      expect_true(last == (r == 7), "last only in round 7");
      expect_true(!load, "no load while busy");
      expect_true(!dataready, "no dataready while busy");
      @(negedge clk);
      edges++;
    end
    first = 1'b0;
    #1 expect_true(dataready && !busy && !round_en, "dataready after last round");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    #0.5 rst_n = 1'b0;
    #0.5 expect_true(!busy && !dataready, "idle in reset");
    #11 rst_n = 1'b1;
    @(negedge clk);
    run_block(-1, edges);
    checks++;
    if (edges != 9) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 9", edges);
    end
    // dataready is held while idle
    repeat (3) @(negedge clk);
    #1 expect_true(dataready && !busy, "dataready held");
    // first raised during rounds 3 must be ignored
    @(negedge clk);
    run_block(3, edges);
    expect_true(edges == 9, "latency with ignored first");
    // back to back: start on the cycle dataready is first seen
    run_block(-1, edges);
    expect_true(edges == 9, "latency back to back");
    // reset in the middle of a block
    @(negedge clk);
    first = 1'b1;
    @(negedge clk);
    first = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b0;
    #1 expect_true(!busy && !dataready && !round_en, "reset aborts block");
    @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    expect_true(!busy && !dataready, "stays idle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
