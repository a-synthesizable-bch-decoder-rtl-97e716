// bch_chien: polynomial roots finder (PRF), shortened Chien search.
//
// The codeword is sent highest coefficient first, so the bit at output
// position p (p = 0 for the first bit) is the coefficient of x^j with
// j = N-1-p. That bit is wrong exactly when sigma(alpha^-j) = 0. Because the
// DVB-S2 codes are shortened (N < 2^m - 1), the search does not start at
// alpha^0: with beta = 2^m - N - 1 the first point is alpha^(beta+1) =
// alpha^-(N-1). On `load` each coefficient is therefore pre-multiplied,
//   reg_i <- sigma_i * alpha^(i*(beta+1)),
// and each `step` afterwards multiplies reg_i by the constant alpha^i, which
// moves the evaluation point to the next bit. `root` is high when the sum of
// all registers (sigma at the current point) is zero.
//
// The pre-multiplying constants alpha^(i*(beta+1)) for all 21 frame
// configurations are computed at elaboration time from the code table. The
// shortened search itself follows the decoder's description; the table of
// constants and the use of general multipliers for the one-time load are this
// design's choices.
//
// Interface: `load` takes sigma, the field select and the code rate (one
// cycle). From the next cycle `root` belongs to the first information bit;
// every cycle with `step` high moves it on by one bit. `root` is
// combinational from the registers.
module bch_chien
  import bch_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                step,
  input  logic                short_frame,
  input  code_rate_t          code_rate,
  input  gf_t  [T_MAX:0]      sigma,
  output logic                root
);

  typedef gf_t [T_MAX:1] crow_t;

  // alpha^(i*(beta+1)), i = 1..T_MAX, for one frame configuration.
  function automatic crow_t gen_crow(int f, int r);
    crow_t c;
    bch_cfg_t cfg = lookup_cfg(frame_t'(f[0]), code_rate_t'(r[3:0]));
    int unsigned shift = (f == 1 ? 16384 : 65536) - int'(cfg.n);
    gf_t a = gf_pow(shift, f[0]);
    gf_t p = 16'h0001;
    for (int i = 1; i <= T_MAX; i++) begin
      p = gf_mul(p, a, f[0]);
      c[i] = p;
    end
    return c;
  endfunction

  // alpha^i, i = 1..T_MAX: the per-step multipliers.
  function automatic crow_t gen_cstep(int f);
    crow_t c;
    gf_t p = 16'h0001;
    for (int i = 1; i <= T_MAX; i++) begin
      p = gf_xtime(p, f[0]);
      c[i] = p;
    end
    return c;
  endfunction

  // Constant tables, one elaboration-time row per configuration.
  crow_t [1:0][15:0] cinit;
  crow_t [1:0]       cstep;

  for (genvar f = 0; f < 2; f++) begin : g_field
    localparam crow_t STEP = gen_cstep(f);
    assign cstep[f] = STEP;
    for (genvar r = 0; r < 16; r++) begin : g_rate
      localparam crow_t ROW = gen_crow(f, r);
      assign cinit[f][r] = ROW;
    end
  end

  gf_t [T_MAX:0] reg_q;
  logic          sf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_q <= '0;
      sf_q  <= 1'b0;
    end else if (load) begin
      sf_q     <= short_frame;
      reg_q[0] <= sigma[0];
      for (int i = 1; i <= T_MAX; i++)
        reg_q[i] <= gf_mul(sigma[i], cinit[short_frame][code_rate][i], short_frame);
    end else if (step) begin
      for (int i = 1; i <= T_MAX; i++)
        reg_q[i] <= sf_q ? gf_mul(reg_q[i], cstep[1][i], 1'b1)
                         : gf_mul(reg_q[i], cstep[0][i], 1'b0);
    end
  end

  always_comb begin
    gf_t sum;
    sum = '0;
    for (int i = 0; i <= T_MAX; i++) sum ^= reg_q[i];
    root = (sum == '0);
  end

endmodule
