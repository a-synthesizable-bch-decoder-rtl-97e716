// tb_bch_kes: checks the key equation solver on known error patterns.
//
// For v distinct error exponents e_1..e_v (v = 0..t) the syndromes
// S_j = sum alpha^(j*e_i) are computed here with the reference field
// arithmetic and handed to the solver. The resulting sigma must have degree
// v (deg output, top coefficient non-zero, nothing above it) and vanish at
// every alpha^(-e_i). The solver must be busy for exactly t cycles and pulse
// done right after. Both field sizes and t = 8, 10, 12 are covered.
module tb_bch_kes;
  import bch_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, short_frame = 0;
  logic [3:0] t = 4'd12;
  gf_t [NSYN:1] syn;
  logic busy, done;
  gf_t [T_MAX:0] sigma;
  logic [4:0] deg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_kes dut (.*);

  task automatic run(bit sf, int tt, int v);
    int e [$];
    int busy_cycles = 0;
    int q = ref_q(sf);
    while (e.size() < v) begin
      int x = int'($urandom_range(q - 1));
      bit dup = 0;
      foreach (e[i]) if (e[i] == x) dup = 1;
      if (!dup) e.push_back(x);
    end
    for (int j = 1; j <= NSYN; j++) begin
      logic [15:0] s = 0;
      foreach (e[i]) s ^= ref_pow(longint'(j) * e[i], sf);
      syn[j] = s;
    end
    @(negedge clk);
    short_frame = sf; t = 4'(tt); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
      if (busy_cycles > 40) break;
    end
    checks++;
    if (busy_cycles != tt) begin failures++; $display("FAIL busy %0d cycles, t=%0d", busy_cycles, tt); end
    checks++;
    if (int'(deg) != v) begin failures++; $display("FAIL deg %0d for %0d errors", deg, v); end
    checks++;
    if (sigma[v] == 0) begin failures++; $display("FAIL sigma[%0d] is zero", v); end
    for (int i = v + 1; i <= T_MAX; i++) begin
      checks++;
      if (sigma[i] != 0) begin failures++; $display("FAIL sigma[%0d] non-zero above degree %0d", i, v); end
    end
    foreach (e[i]) begin
      logic [15:0] x = ref_pow(-longint'(e[i]), sf), acc = 0;
      for (int c = T_MAX; c >= 0; c--) acc = ref_mul(acc, x, sf) ^ sigma[c];
      checks++;
      if (acc != 0) begin failures++; $display("FAIL sf=%0d t=%0d v=%0d: no root at error %0d", sf, tt, v, e[i]); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int sf = 0; sf < 2; sf++)
      for (int ti = 0; ti < 3; ti++) begin
        automatic int tt = (ti == 0) ? 8 : (ti == 1) ? 10 : 12;
        for (int v = 0; v <= tt; v++) run(sf[0], tt, v);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
