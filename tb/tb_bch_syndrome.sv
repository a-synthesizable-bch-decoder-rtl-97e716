// tb_bch_syndrome: checks the syndrome calculator against a direct
// evaluation of the received polynomial.
//
// Random words of a few hundred bits are shifted in, MSB first, for both
// field sizes; every syndrome S_j = r(alpha^j), j = 1..24, is recomputed
// here by Horner's rule with the reference field arithmetic. The generator
// polynomial g(x) = G1*...*Gt (its own table, built here) is also shifted in
// as a valid codeword and must give syn_zero for t = 8, 10 and 12, while a
// single flipped bit must not.
module tb_bch_syndrome;
  import bch_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0, bit_in = 0, short_frame = 0;
  logic [3:0] t = 4'd12;
  gf_t [NSYN:1] syn;
  logic syn_zero;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_syndrome dut (.*);

  logic [16:0] gn [12] = '{17'h1002d, 17'h10173, 17'h10fbd, 17'h15a55, 17'h11f2f, 17'h1f7b5,
                           17'h1af65, 17'h17367, 17'h10ea1, 17'h175a7, 17'h13a2d, 17'h11ae3};
  logic [16:0] gs [12] = '{17'h0402b, 17'h04941, 17'h04647, 17'h05591, 17'h06b55, 17'h06389,
                           17'h06ce5, 17'h04f21, 17'h0460f, 17'h05a49, 17'h05811, 17'h065ef};

  bit word [$];

  task automatic feed();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (word[i]) begin
      shift = 1; bit_in = word[i]; @(negedge clk);
    end
    shift = 0;
    @(negedge clk);
  endtask

  task automatic check_syn(bit sf);
    for (int j = 1; j <= 24; j++) begin
      logic [15:0] x = ref_pow(j, sf), acc = 0;
      foreach (word[i]) acc = ref_mul(acc, x, sf) ^ 16'(word[i]);
      checks++;
      if (syn[j] !== acc) begin
        failures++;
        $display("FAIL sf=%0d S%0d got %h exp %h", sf, j, syn[j], acc);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 8; trial++) begin
      automatic bit sf = trial[0];
      short_frame = sf; t = 4'd12;
      word.delete();
      for (int i = 0; i < 200 + int'($urandom_range(300)); i++) word.push_back(1'($urandom));
      feed();
      check_syn(sf);
      checks++;
      if (syn_zero) begin failures++; $display("FAIL random word gave syn_zero"); end
    end
    for (int trial = 0; trial < 6; trial++) begin
      automatic bit sf = trial[0];
      automatic int tt = (trial < 2) ? 8 : (trial < 4) ? 10 : 12;
      automatic logic [192:0] g = 1;
      for (int i = 0; i < tt; i++) begin
        automatic logic [192:0] p = 0;
        automatic logic [16:0] mp = sf ? gs[i] : gn[i];
        for (int b = 0; b <= 16; b++) if (mp[b]) p ^= g << b;
        g = p;
      end
      short_frame = sf; t = 4'(tt);
      word.delete();
      for (int i = tt * (sf ? 14 : 16); i >= 0; i--) word.push_back(g[i]);
      feed();
      checks++;
      if (!syn_zero) begin failures++; $display("FAIL codeword sf=%0d t=%0d not syn_zero", sf, tt); end
      check_syn(sf);
      word[5] = ~word[5];
      feed();
      checks++;
      if (syn_zero) begin failures++; $display("FAIL corrupted codeword gave syn_zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
