// tb_bch_control: checks the decoder's control unit on its own.
//
// The testbench plays the syndrome calculator and key equation solver: it
// drives syn_zero and answers kes_start with kes_done a few cycles later. For
// frames of several configurations, with and without input pauses and with
// clean and erroneous frames, it counts what the controller does: N syndrome
// shifts, K buffer writes (all during the first K accepted bits), one
// kes_start only for a frame with errors, one prf_load right after kes_done,
// K buffer reads on consecutive cycles right after, out_valid one cycle after
// each read, in_ready low from the end of reception to the end of TX, and the
// configuration held even when the inputs change during the frame.
module tb_bch_control;
  import bch_pkg::*;
  import tb_gf_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, syn_zero = 0, kes_done = 0;
  frame_t frame_type = FRAME_SHORT;
  code_rate_t code_rate = CR_1_4;
  logic in_ready;
  bch_state_t state;
  bch_cfg_t cfg;
  code_rate_t rate;
  logic sc_shift, sc_clear, mb_wr, mb_rd, kes_start, prf_load, prf_step, corr_en, out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bch_control dut (.*);

  int n_shift, n_wr, n_wr_late, n_start, n_load, n_rd, n_ov, n_ready_bad, n_step_bad;
  int rd_first, rd_last, load_cyc, cyc;
  bit count_on = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (count_on) begin
      if (mb_wr) begin n_wr++; if (n_shift >= int'(cfg.k)) n_wr_late++; end
      if (sc_shift) n_shift++;
      if (kes_start) n_start++;
      if (prf_load) begin n_load++; load_cyc = cyc; end
      if (mb_rd) begin if (n_rd == 0) rd_first = cyc; rd_last = cyc; n_rd++; end
      if (out_valid) n_ov++;
      if (prf_step != out_valid) n_step_bad++;
      if ((state == ST_KES || state == ST_TX) && in_ready) n_ready_bad++;
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(bit sf, int cr, bit errs, bit pauses);
    int k, n, t;
    ref_code(sf, cr, k, n, t);
    n_shift = 0; n_wr = 0; n_wr_late = 0; n_start = 0; n_load = 0; n_rd = 0; n_ov = 0;
    n_ready_bad = 0; n_step_bad = 0; rd_first = 0; rd_last = 0; load_cyc = 0;
    count_on = 1;
    syn_zero = !errs;
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      if (pauses && $urandom_range(7) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      frame_type = (i == 0) ? (sf ? FRAME_SHORT : FRAME_NORMAL) : frame_t'($urandom_range(1));
      code_rate  = (i == 0) ? code_rate_t'(cr) : code_rate_t'($urandom_range(10));
      @(negedge clk);
    end
    in_valid = 0;
    check(cfg.k == 16'(k) && cfg.n == 16'(n) && cfg.t == 4'(t) && cfg.short_frame == sf && rate == code_rate_t'(cr),
          "configuration not held");
    if (errs) begin
      wait (n_start == 1);
      repeat (t) @(negedge clk);
      kes_done = 1;
      @(negedge clk);
      kes_done = 0;
    end
    wait (state == ST_IDLE);
    repeat (3) @(negedge clk);
    count_on = 0;
    check(n_shift == n, $sformatf("%0d shifts, expected %0d", n_shift, n));
    check(n_wr == k && n_wr_late == 0, $sformatf("%0d writes (%0d late), expected %0d", n_wr, n_wr_late, k));
    check(n_start == int'(errs), "kes_start count");
    check(n_load == int'(errs), "prf_load count");
    check(n_rd == k && rd_last - rd_first == k - 1, "reads not K consecutive");
    check(n_ov == k, "out_valid count");
    check(n_step_bad == 0, "prf_step differs from out_valid");
    check(!errs || rd_first == load_cyc + 1, "TX does not follow prf_load");
    check(corr_en == errs, "corr_en");
    check(n_ready_bad == 0, "in_ready high while busy");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1'b1, 0, 1'b1, 1'b0);
    run(1'b1, 3, 1'b0, 1'b1);
    run(1'b1, 9, 1'b1, 1'b1);
    run(1'b0, 10, 1'b1, 1'b0);
    run(1'b0, 0, 1'b0, 1'b0);
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
