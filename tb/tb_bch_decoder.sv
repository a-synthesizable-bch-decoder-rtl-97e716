// tb_bch_decoder: end-to-end test of the BCH decoder at its default size.
//
// For every one of the 21 DVB-S2 frame configurations (11 normal, 10 short)
// the testbench draws a random BBFRAME, encodes it systematically with the
// generator polynomial g(x) = G1(x)*...*Gt(x), flips a chosen number of bits
// of the codeword, feeds it to the decoder and compares the K output bits
// with the original message. The encoder, the polynomial products and the
// code table are the testbench's own, written independently of the RTL.
//
// Frames cover: no error (the key equation is skipped), exactly t errors,
// errors only in the parity part, fewer than t errors, input pauses
// (in_valid low inside a frame) and back-to-back frames. It also checks the
// cycle budget: t+4 cycles from the last input bit to the first output bit
// (3 for a clean frame), t cycles of key equation solving, and K output bits
// on K consecutive cycles.
module tb_bch_decoder;
  import bch_pkg::*;

  localparam int NMAXB = 58320;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_data = 1'b0;
  frame_t frame_type = FRAME_NORMAL;
  code_rate_t code_rate = CR_1_4;
  logic in_ready, out_valid, out_data;

  always #5 clk = ~clk;

  bch_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_parity_only = 0, n_full_t = 0;
  int n_pause = 0, n_short = 0, n_normal = 0, n_t8 = 0, n_t10 = 0, n_t12 = 0;
  int n_flips_out = 0, kes_cycles = 0;
  int bit_errors = 0;

  // ---- independent model: code table and minimal polynomials ----------
  function automatic void code_params(input bit sf, input int cr,
                                      output int k, output int n, output int t);
    int kn [11] = '{16008, 21408, 25728, 32208, 38688, 43040, 48408, 51648, 53840, 57472, 58192};
    int tn [11] = '{12, 12, 12, 12, 12, 10, 12, 12, 10, 8, 8};
    int ks [10] = '{3072, 5232, 6312, 7032, 9552, 10632, 11712, 12432, 13152, 14232};
    if (!sf) begin k = kn[cr]; t = tn[cr]; n = k + 16 * t; end
    else     begin k = ks[cr]; t = 12;     n = k + 14 * t; end
  endfunction

  function automatic logic [16:0] min_poly(input bit sf, input int i);
    logic [16:0] gn [12] = '{17'h1002d, 17'h10173, 17'h10fbd, 17'h15a55, 17'h11f2f, 17'h1f7b5,
                             17'h1af65, 17'h17367, 17'h10ea1, 17'h175a7, 17'h13a2d, 17'h11ae3};
    logic [16:0] gs [12] = '{17'h0402b, 17'h04941, 17'h04647, 17'h05591, 17'h06b55, 17'h06389,
                             17'h06ce5, 17'h04f21, 17'h0460f, 17'h05a49, 17'h05811, 17'h065ef};
    return sf ? gs[i] : gn[i];
  endfunction

  typedef logic [192:0] gpoly_t;

  function automatic gpoly_t gen_poly(input bit sf, input int t);
    gpoly_t g = 1;
    for (int i = 0; i < t; i++) begin
      gpoly_t p = '0;
      logic [16:0] mp = min_poly(sf, i);
      for (int b = 0; b <= 16; b++) if (mp[b]) p ^= g << b;
      g = p;
    end
    return g;
  endfunction

  bit cw  [NMAXB];   // transmitted codeword, in transmission order
  bit rx  [NMAXB];   // with errors

  task automatic build_frame(input bit sf, input int k, input int n, input int t,
                             input int nerr, input bit parity_only);
    gpoly_t g = gen_poly(sf, t);
    gpoly_t r = '0;
    int deg = n - k;
    bit fb;
    int pos [$];
    for (int i = 0; i < k; i++) begin
      cw[i] = 1'($urandom);
      fb = cw[i] ^ r[deg-1];
      r = r << 1;
      r[deg] = 1'b0;
      if (fb) r ^= (g & ~(gpoly_t'(1) << deg));
    end
    for (int i = 0; i < deg; i++) cw[k+i] = r[deg-1-i];
    for (int i = 0; i < n; i++) rx[i] = cw[i];
    while (pos.size() < nerr) begin
      int p = parity_only ? k + int'($urandom_range(deg - 1)) : int'($urandom_range(n - 1));
      bit dup = 0;
      foreach (pos[j]) if (pos[j] == p) dup = 1;
      if (!dup) begin pos.push_back(p); rx[p] = ~rx[p]; end
    end
  endtask

  // ---- output monitor ------------------------------------------------
  int out_idx = 0, exp_k = 0;
  longint cyc = 0, last_in_cyc = 0, first_out_cyc = 0, last_out_cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_kes.busy) kes_cycles <= kes_cycles + 1;
    if (out_valid) begin
      if (out_idx == 0) first_out_cyc = cyc;
      last_out_cyc = cyc;
      if (out_idx < exp_k) begin
        if (out_data !== cw[out_idx]) bit_errors++;
        if (out_data != dut.u_mb.rd_data) n_flips_out++;
      end
      out_idx++;
    end
  end

  task automatic run_frame(input bit sf, input int cr, input int nerr,
                           input bit parity_only, input bit pauses);
    int k, n, t;
    int kes0;
    code_params(sf, cr, k, n, t);
    build_frame(sf, k, n, t, nerr, parity_only);
    exp_k = k;
    out_idx = 0;
    bit_errors = 0;
    kes0 = kes_cycles;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      if (pauses && ($urandom_range(15) == 0)) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid   = 1'b1;
      in_data    = rx[i];
      frame_type = sf ? FRAME_SHORT : FRAME_NORMAL;
      code_rate  = code_rate_t'(cr);
      // In a frame the decoder must always be ready.
      checks++;
      if (!in_ready) begin failures++; $display("FAIL in_ready low at bit %0d", i); end
      @(posedge clk);
      last_in_cyc = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
    // change the configuration inputs mid-frame work: they must be ignored
    frame_type = sf ? FRAME_NORMAL : FRAME_SHORT;
    wait (out_idx == k);
    @(negedge clk);
    checks++;
    if (bit_errors != 0) begin
      failures++;
      $display("FAIL sf=%0d cr=%0d nerr=%0d: %0d wrong output bits", sf, cr, nerr, bit_errors);
    end
    checks++;
    if (last_out_cyc - first_out_cyc != longint'(k - 1)) begin
      failures++;
      $display("FAIL output not contiguous: %0d cycles for %0d bits", last_out_cyc - first_out_cyc + 1, k);
    end
    checks++;
    if (first_out_cyc - last_in_cyc != ((nerr == 0) ? 3 : longint'(t + 4))) begin
      failures++;
      $display("FAIL latency %0d (t=%0d nerr=%0d)", first_out_cyc - last_in_cyc, t, nerr);
    end
    checks++;
    if (kes_cycles - kes0 != ((nerr == 0) ? 0 : t)) begin
      failures++;
      $display("FAIL KES ran %0d cycles, t=%0d", kes_cycles - kes0, t);
    end
    if (nerr == 0) n_clean++; else n_corrected++;
    if (parity_only && nerr > 0) n_parity_only++;
    if (nerr == t) n_full_t++;
    if (pauses) n_pause++;
    if (sf) n_short++; else n_normal++;
    if (t == 8) n_t8++; else if (t == 10) n_t10++; else n_t12++;
    $display("frame sf=%0d cr=%0d k=%0d n=%0d t=%0d errors=%0d%s%s ok=%0d",
             sf, cr, k, n, t, nerr, parity_only ? " (parity)" : "", pauses ? " (pauses)" : "",
             bit_errors == 0);
  endtask

  task automatic mech(input string name, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("mechanism %-28s seen %0d times", name, count);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // short frames: all 10 rates
    for (int cr = 0; cr < 10; cr++) begin
      int t = 12;
      case (cr % 4)
        0: run_frame(1'b1, cr, t, 1'b0, 1'b0);
        1: run_frame(1'b1, cr, 0, 1'b0, 1'b1);
        2: run_frame(1'b1, cr, 3, 1'b1, 1'b0);
        default: run_frame(1'b1, cr, 1 + int'($urandom_range(t - 1)), 1'b0, 1'b1);
      endcase
    end
    // normal frames: all 11 rates, back to back
    for (int cr = 0; cr < 11; cr++) begin
      int k, n, t;
      code_params(1'b0, cr, k, n, t);
      case (cr % 3)
        0: run_frame(1'b0, cr, t, 1'b0, 1'b0);
        1: run_frame(1'b0, cr, cr == 1 ? 0 : 1 + int'($urandom_range(t - 1)), 1'b0, 1'b1);
        default: run_frame(1'b0, cr, t, cr == 5, 1'b0);
      endcase
    end
    mech("clean frame (KES skipped)", n_clean);
    mech("frame corrected", n_corrected);
    mech("errors in parity only", n_parity_only);
    mech("t errors corrected", n_full_t);
    mech("input pauses", n_pause);
    mech("short frame (GF(2^14))", n_short);
    mech("normal frame (GF(2^16))", n_normal);
    mech("t = 8", n_t8);
    mech("t = 10", n_t10);
    mech("t = 12", n_t12);
    mech("output bit flipped", n_flips_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
