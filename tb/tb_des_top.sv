// tb_des_top: end-to-end test of the 8-round, two-cipher-function DES core at
// its default configuration.
//
// Reference: the testbench carries its own model of the core, built from
// bit-at-a-time permutations and a key schedule that applies the standard
// one-or-two-place shifts one sub-key at a time. The same model's primitives,
// run as standard 16-round DES, must reproduce the FIPS 46 test vector
// (0123456789ABCDEF under 133457799BBCDFF1 -> 85E813540F0AB405), which ties
// the tables to the standard. Eight fixed vectors computed by a separate
// software model are checked as well, then random blocks.
//
// Every block must take nine clocks from the edge that samples first to
// dataready. Mechanisms counted, each of which must happen at least once: the
// initialisation clock, each of the eight rounds (so each S-box S1..S8), each
// sub-key rotation of 1, 2, 3 and 4 places, first ignored while busy, a
// back-to-back start, dataout held while idle, and a reset in mid-block.
module tb_des_top;
  import des_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1, first = 1'b0;
  block_t datain, dataout;
  key_t   key;
  logic   busy, dataready;
  int     checks = 0, failures = 0;

  des_top dut (.clk(clk), .rst_n(rst_n), .first(first), .datain(datain), .key(key),
               .dataout(dataout), .busy(busy), .dataready(dataready));

  always #1 clk = ~clk;   // 2 ns period, the 500 MHz clock of the FPGA build

  // ---------------- reference model ----------------
  localparam int SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};

  // out bit i (1-based, MSB first) = in bit tab[i-1]
  function automatic logic [63:0] perm(logic [63:0] x, int in_w, int out_w, int tab[]);
    logic [63:0] y = '0;
    for (int i = 0; i < out_w; i++) y[out_w - 1 - i] = x[in_w - tab[i]];
    return y;
  endfunction

  function automatic void tab_of(string which, ref int tab[]);
    case (which)
      "IP":  begin tab = new[64]; foreach (tab[i]) tab[i] = int'(IP_TAB[i]);  end
      "FP":  begin tab = new[64]; foreach (tab[i]) tab[i] = int'(FP_TAB[i]);  end
      "E":   begin tab = new[48]; foreach (tab[i]) tab[i] = int'(E_TAB[i]);   end
      "P":   begin tab = new[32]; foreach (tab[i]) tab[i] = int'(P_TAB[i]);   end
      "PC1": begin tab = new[56]; foreach (tab[i]) tab[i] = int'(PC1_TAB[i]); end
      default: begin tab = new[48]; foreach (tab[i]) tab[i] = int'(PC2_TAB[i]); end
    endcase
  endfunction

  // box < 0: standard (group g uses S(g+1)); otherwise all groups use S(box+1)
  function automatic logic [31:0] ref_f(logic [31:0] r, logic [47:0] k, int box);
    int t_e[], t_p[];
    logic [47:0] x;
    logic [31:0] s;
    tab_of("E", t_e); tab_of("P", t_p);
    x = 48'(perm(64'(r), 32, 48, t_e)) ^ k;
    for (int g = 0; g < 8; g++) begin
      logic [5:0] six;
      int b;
      six = x[47 - 6 * g -: 6];
      b = (box < 0) ? g : box;
      s[31 - 4 * g -: 4] = SBOX[b][16 * (2 * six[5] + six[0]) + six[4:1]];
    end
    return 32'(perm(64'(s), 32, 32, t_p));
  endfunction

  function automatic void ref_subkeys(logic [63:0] k, ref logic [47:0] ks[16]);
    int t1[], t2[];
    logic [27:0] c, d;
    logic [55:0] cd;
    tab_of("PC1", t1); tab_of("PC2", t2);
    cd = 56'(perm(k, 64, 56, t1));
    c = cd[55:28]; d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < SHIFTS[i]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = 48'(perm(64'({c, d}), 56, 48, t2));
    end
  endfunction

  function automatic logic [63:0] ref_des_standard(logic [63:0] m, logic [63:0] k);
    logic [47:0] ks[16];
    int t_ip[], t_fp[];
    logic [31:0] l, r, t;
    tab_of("IP", t_ip); tab_of("FP", t_fp);
    ref_subkeys(k, ks);
    {l, r} = perm(m, 64, 64, t_ip);
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ ref_f(r, ks[i], -1);
      l = t;
    end
    return perm({r, l}, 64, 64, t_fp);
  endfunction

  function automatic logic [63:0] ref_des8(logic [63:0] m, logic [63:0] k);
    logic [47:0] ks[16];
    int t_ip[], t_fp[];
    logic [31:0] l, r;
    tab_of("IP", t_ip); tab_of("FP", t_fp);
    ref_subkeys(k, ks);
    {l, r} = perm(m, 64, 64, t_ip);
    for (int i = 0; i < 8; i++) begin
      l = l ^ ref_f(l, ks[2 * i], i);
      r = r ^ ref_f(r, ks[2 * i + 1], i);
    end
    return perm({l, r}, 64, 64, t_fp);
  endfunction

  // ---------------- fixed vectors from a separate software model ----------------
  typedef struct packed { block_t m; key_t k; block_t c; } vec_t;
  localparam vec_t VEC [8] = '{
    '{64'h0123456789abcdef, 64'h133457799bbcdff1, 64'h986cd9e2ba4360f1},
    '{64'h0000000000000000, 64'h0000000000000000, 64'hf3300cf0cffcff03},
    '{64'hffffffffffffffff, 64'hffffffffffffffff, 64'h0ccff30f300300fc},
    '{64'h8787878787878787, 64'h0e329232ea6d0d73, 64'h3518971048d2fd45},
    '{64'h95e60af593bd04cf, 64'h0cb1e29c658cda14, 64'hf10a596cd311d8d5},
    '{64'h3898d190f9ebdacc, 64'h8e81973e0becd7b0, 64'hb06920d1871cc0d7},
    '{64'h2217beaddbc496cb, 64'h6b4cb2424a23d596, 64'hdd353bfb589e3ba3},
    '{64'h8a6a63ec24ede6a4, 64'h922766581e27a1c0, 64'h47fc84fa20a6b1be}
  };

  // ---------------- mechanism counters ----------------
  int n_init = 0, n_blocks = 0, n_ignored = 0, n_b2b = 0, n_hold = 0, n_reset = 0;
  int n_round[8], n_rot[5];

  // The round is tracked from the ports: busy cycles counted since the last
  // accepted start.
  int round_seen = 0;
  always @(posedge clk) begin
    if (rst_n && first && !busy) begin
      n_init++;
      round_seen = 0;
    end else if (rst_n && busy) begin
      int r;
      r = round_seen;
      round_seen++;
      n_round[r % 8]++;
      n_rot[SHIFTS[2 * r]]++;
      n_rot[SHIFTS[2 * r] + SHIFTS[2 * r + 1]]++;
      if (first) n_ignored++;
    end
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Starts a block on the current negedge, waits for dataready, checks result
  // and latency. poke: round in which first is raised again (-1: none).
  task automatic encrypt(block_t m, key_t k, block_t exp_c, int poke);
    int edges;
    datain = m; key = k; first = 1'b1;
    @(negedge clk);
    first = 1'b0;
    datain = {$urandom, $urandom}; key = {$urandom, $urandom};  // only sampled with first
    edges = 1;
    while (!dataready && edges < 40) begin
      first = (edges - 1 == poke);
      @(negedge clk);
      edges++;
    end
    first = 1'b0;
    checks++;
    if (edges != 9) fail($sformatf("latency %0d clocks, expected 9", edges));
    checks++;
    if (dataout !== exp_c)
      fail($sformatf("E(%h, key %h) = %h, expected %h", m, k, dataout, exp_c));
    n_blocks++;
  endtask

  initial begin
    #20000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t m, c;
    key_t   k;
    foreach (n_round[i]) n_round[i] = 0;
    foreach (n_rot[i]) n_rot[i] = 0;
    datain = '0; key = '0;

    // the reference primitives reproduce standard DES
    checks++;
    if (ref_des_standard(64'h0123456789abcdef, 64'h133457799bbcdff1) !== 64'h85e813540f0ab405)
      fail("reference model does not reproduce the FIPS 46 vector");
    foreach (VEC[i]) begin
      checks++;
      if (ref_des8(VEC[i].m, VEC[i].k) !== VEC[i].c) fail($sformatf("reference model vector %0d", i));
    end

    #0.5 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || dataready) fail("not idle after reset");

    foreach (VEC[i]) begin
      encrypt(VEC[i].m, VEC[i].k, VEC[i].c, (i == 2) ? 4 : -1);
      if (i % 2 == 0) begin
        n_b2b++;                    // next block starts on the dataready cycle
      end else begin
        block_t held;
        held = dataout;
        repeat (3) @(negedge clk);
        checks++;
        if (!dataready || dataout !== held) fail("dataout not held while idle");
        else n_hold++;
      end
    end

    for (int n = 0; n < 40; n++) begin
      m = {$urandom, $urandom};
      k = {$urandom, $urandom};
      c = ref_des8(m, k);
      encrypt(m, k, c, (n % 7 == 3) ? (n % 8) : -1);
    end

    // reset in the middle of a block, then a clean block
    datain = VEC[0].m; key = VEC[0].k; first = 1'b1;
    @(negedge clk);
    first = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b0;
    #0.5;
    checks++;
    if (busy || dataready || dataout !== '0) fail("reset does not abort the block");
    else n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    encrypt(VEC[3].m, VEC[3].k, VEC[3].c, -1);

    // every mechanism must have happened
    checks++; if (n_init == 0)    fail("initialisation clock never seen");
    for (int r = 0; r < 8; r++) begin
      checks++; if (n_round[r] == 0) fail($sformatf("round %0d / S%0d never used", r, r + 1));
    end
    for (int s = 1; s <= 4; s++) begin
      checks++; if (n_rot[s] == 0) fail($sformatf("rotation by %0d never used", s));
    end
    checks++; if (n_ignored == 0) fail("first during busy never tried");
    checks++; if (n_b2b == 0)     fail("no back-to-back block");
    checks++; if (n_hold == 0)    fail("no idle hold");
    checks++; if (n_reset == 0)   fail("no mid-block reset");
    $display("blocks=%0d init=%0d rounds=%0d,%0d,%0d,%0d,%0d,%0d,%0d,%0d rot1..4=%0d,%0d,%0d,%0d ignored=%0d b2b=%0d hold=%0d reset=%0d",
             n_blocks, n_init, n_round[0], n_round[1], n_round[2], n_round[3], n_round[4],
             n_round[5], n_round[6], n_round[7], n_rot[1], n_rot[2], n_rot[3], n_rot[4],
             n_ignored, n_b2b, n_hold, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
