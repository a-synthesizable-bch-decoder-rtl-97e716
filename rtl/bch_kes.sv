// bch_kes: key equation solver (KES), simplified inverse-free
// Berlekamp-Massey (SiBM) algorithm.
//
// From the syndromes S_1..S_2t it finds the error locator polynomial
// sigma(x), whose roots are the inverses of the error positions. For binary
// BCH codes every even-indexed discrepancy is zero, so only the t odd steps
// are executed, and the algorithm needs no field inversion: instead of
// dividing by the previous discrepancy, sigma is scaled by it. One iteration
// takes one clock cycle, so the solver needs exactly t cycles.
//
// Iteration r = 0..t-1 (C = sigma, lam = correction polynomial, b = last
// non-zero discrepancy, L = current length):
//   d   = sum_{i=0..t} C_i * S_(2r+1-i)
//   C  <- b*C + d*lam
//   if d != 0 and L <= r : lam <- x^2*C_old, L <- 2r+1-L, b <- d
//   else                  : lam <- x^2*lam
// Start values: C = 1, lam = x, L = 0, b = 1. The syndromes enter a
// shift register window so that win[i] holds S_(2r+1-i) in iteration r; this
// replaces a wide multiplexer by a two-step shift per iteration.
//
// The algorithm and its t-cycle latency follow the decoder's description;
// the register window, the handshake and the exact formulation above are
// this design's own. sigma is left scaled by a non-zero constant, which does
// not move its roots. Polynomials are kept to degree T_MAX; a decodable word
// never needs more.
//
// Interface: `start` (one cycle) loads the syndromes, the field select and
// t. `busy` is then high for exactly t cycles, one per iteration. `done`
// pulses in the cycle after the last iteration; `sigma` and `deg` (the final
// L) are valid from then on until the next `start`.
module bch_kes
  import bch_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                short_frame,
  input  logic [3:0]          t,
  input  gf_t  [NSYN:1]       syn,
  output logic                busy,
  output logic                done,
  output gf_t  [T_MAX:0]      sigma,
  output logic [4:0]          deg
);

  gf_t [T_MAX:0]   c_q, lam_q, win_q;
  gf_t [NSYN-2:0]  que_q;            // S_(2r+2) .. S_2t still to enter
  gf_t             b_q;
  logic [4:0]      l_q;
  logic [3:0]      r_q, t_q;
  logic            sf_q;

  gf_t [T_MAX:0]   c_nxt;
  gf_t             d;

  always_comb begin
    d = '0;
    for (int i = 0; i <= T_MAX; i++)
      d ^= gf_mul(c_q[i], win_q[i], sf_q);
    for (int i = 0; i <= T_MAX; i++)
      c_nxt[i] = gf_mul(b_q, c_q[i], sf_q) ^ gf_mul(d, lam_q[i], sf_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q   <= '0;
      lam_q <= '0;
      win_q <= '0;
      que_q <= '0;
      b_q   <= '0;
      l_q   <= '0;
      r_q   <= '0;
      t_q   <= '0;
      sf_q  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        c_q      <= '0;
        c_q[0]   <= 16'h0001;
        lam_q    <= '0;
        lam_q[1] <= 16'h0001;
        win_q    <= '0;
        win_q[0] <= syn[1];
        for (int k = 0; k <= NSYN - 2; k++) que_q[k] <= syn[k+2];
        b_q      <= 16'h0001;
        l_q      <= '0;
        r_q      <= '0;
        t_q      <= t;
        sf_q     <= short_frame;
        busy     <= 1'b1;
      end else if (busy) begin
        c_q <= c_nxt;
        if (d != '0 && {1'b0, l_q} <= {2'b00, r_q}) begin
          for (int i = 0; i <= T_MAX; i++) lam_q[i] <= (i >= 2) ? c_q[i-2] : '0;
          l_q <= {r_q, 1'b1} - l_q;
          b_q <= d;
        end else begin
          for (int i = 0; i <= T_MAX; i++) lam_q[i] <= (i >= 2) ? lam_q[i-2] : '0;
        end
        for (int i = 2; i <= T_MAX; i++) win_q[i] <= win_q[i-2];
        win_q[1] <= que_q[0];
        win_q[0] <= que_q[1];
        for (int k = 0; k <= NSYN - 4; k++) que_q[k] <= que_q[k+2];
        que_q[NSYN-3] <= '0;
        que_q[NSYN-2] <= '0;
        r_q <= r_q + 4'd1;
        if (r_q == t_q - 4'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign sigma = c_q;
  assign deg   = l_q;

endmodule
