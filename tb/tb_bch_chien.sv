// tb_bch_chien: checks the shortened Chien search on polynomials with known
// roots.
//
// For a configuration (K, N) chosen from the code table, v output positions
// p in 0..K-1 are drawn; the bit at position p is the coefficient of x^j,
// j = N-1-p. sigma(x) = c * prod (1 + alpha^j x) is built here with the
// reference field arithmetic (c a random non-zero scale), loaded, and the
// search is stepped K times. `root` must be high exactly at the drawn
// positions. Short and normal frames are covered.
module tb_bch_chien;
  import bch_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0, short_frame = 0;
  code_rate_t code_rate = CR_1_4;
  gf_t [T_MAX:0] sigma = '0;
  logic root;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_chien dut (.*);

  task automatic run(bit sf, int cr, int v);
    int k, n, t;
    int pos [$];
    bit mark [];
    logic [15:0] poly [T_MAX+1];
    int hits = 0, misses = 0, extra = 0;
    ref_code(sf, cr, k, n, t);
    mark = new[k];
    while (pos.size() < v) begin
      int p = int'($urandom_range(k - 1));
      if (!mark[p]) begin mark[p] = 1; pos.push_back(p); end
    end
    foreach (poly[i]) poly[i] = 0;
    poly[0] = 16'(1 + $urandom_range(ref_q(sf) - 1));
    foreach (pos[i]) begin
      logic [15:0] a = ref_pow(n - 1 - pos[i], sf);
      for (int c = T_MAX; c >= 1; c--) poly[c] ^= ref_mul(poly[c-1], a, sf);
    end
    @(negedge clk);
    for (int i = 0; i <= T_MAX; i++) sigma[i] = poly[i];
    short_frame = sf; code_rate = code_rate_t'(cr); load = 1;
    @(negedge clk);
    load = 0;
    for (int p = 0; p < k; p++) begin
      step = 1;
      if (root && mark[p]) hits++;
      else if (!root && mark[p]) misses++;
      else if (root) extra++;
      @(negedge clk);
    end
    step = 0;
    checks++;
    if (hits != v || misses != 0 || extra != 0) begin
      failures++;
      $display("FAIL sf=%0d cr=%0d v=%0d: hits %0d misses %0d extra %0d", sf, cr, v, hits, misses, extra);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cr = 0; cr < 10; cr++) run(1'b1, cr, cr + 3);
    run(1'b0, 0, 12);
    run(1'b0, 5, 10);
    run(1'b0, 10, 8);
    run(1'b0, 9, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
