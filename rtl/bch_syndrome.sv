// bch_syndrome: syndrome calculator (SC) of the BCH decoder.
//
// Twelve LFSRs divide the serially received codeword r(x), most significant
// coefficient first, by the minimal polynomials G1..G12 of the selected frame
// type. After the last bit, LFSR i holds b_i(x) = r(x) mod G_i(x). Every
// syndrome S_j (j = 1..2*T_MAX) is then b_i(alpha^j), where G_i is the
// minimal polynomial of alpha^j (i is found from the odd part of j). Since
// b_i has degree < m, S_j = sum_l b_i[l] * alpha^(j*l) is a fixed XOR network
// whose columns alpha^(j*l) are computed at elaboration time (one matrix per
// field). This LFSR-plus-XOR-matrix structure is the iterative syndrome
// calculator the decoder is built around; it needs one clock per received
// bit, overlapped with reception. Computing even syndromes from the LFSR of
// their odd part, leaving the syndromes combinational and gating syn_zero
// by t are this design's choices.
//
// Interface: `shift` with `bit_in` feeds one bit; `clear` zeroes the LFSRs
// (it wins over `shift`). `short_frame` selects the polynomial set and must
// be steady for the whole frame. `syn` is combinational from the LFSR state
// and is valid the cycle after the last bit was shifted in. `syn_zero` is
// high when S_1..S_2t are all zero for the given t.
module bch_syndrome
  import bch_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              shift,
  input  logic              bit_in,
  input  logic              short_frame,
  input  logic [3:0]        t,
  output gf_t  [NSYN:1]     syn,
  output logic              syn_zero
);

  // Which LFSR (0-based) serves syndrome j: the one of alpha^(odd part of j).
  function automatic int unsigned lfsr_of(int unsigned j);
    int unsigned o = j;
    while (o % 2 == 0) o = o / 2;
    return (o - 1) / 2;
  endfunction

  // Row of the XOR matrix of S_j: alpha^(j*l), l = 0..M_MAX-1, in field f
  // (0: normal, 1: short); columns beyond m are zero.
  typedef gf_t [M_MAX-1:0] srow_t;

  function automatic srow_t gen_srow(int f, int j);
    srow_t s;
    gf_t step = gf_pow(j, f[0]);
    gf_t a = 16'h0001;
    for (int l = 0; l < M_MAX; l++) begin
      s[l] = (f == 1 && l >= 14) ? '0 : a;
      a = gf_mul(a, step, f[0]);
    end
    return s;
  endfunction

  logic [T_MAX-1:0][M_MAX-1:0] rem_q;

  // Remainder registers: rem <- (rem * x + bit) mod G_i.
  for (genvar i = 0; i < T_MAX; i++) begin : g_lfsr
    logic [M_MAX-1:0] gn, gs, nxt;
    assign gn = G_NORMAL[i][M_MAX-1:0];
    assign gs = G_SHORT[i][M_MAX-1:0];
    always_comb begin
      if (short_frame) begin
        nxt = {2'b00, rem_q[i][12:0], bit_in};
        if (rem_q[i][13]) nxt ^= gs;
      end else begin
        nxt = {rem_q[i][14:0], bit_in};
        if (rem_q[i][15]) nxt ^= gn;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     rem_q[i] <= '0;
      else if (clear) rem_q[i] <= '0;
      else if (shift) rem_q[i] <= nxt;
    end
  end

  // Evaluation of each remainder at alpha^j: the XOR matrix.
  for (genvar j = 1; j <= NSYN; j++) begin : g_syn
    localparam srow_t ROW_N = gen_srow(0, j);
    localparam srow_t ROW_S = gen_srow(1, j);
    localparam int unsigned LI = lfsr_of(j);
    always_comb begin
      syn[j] = '0;
      for (int l = 0; l < M_MAX; l++)
        if (rem_q[LI][l]) syn[j] ^= short_frame ? ROW_S[l] : ROW_N[l];
    end
  end

  always_comb begin
    syn_zero = 1'b1;
    for (int j = 1; j <= NSYN; j++)
      if (j <= 2 * int'(t) && syn[j] != '0) syn_zero = 1'b0;
  end

endmodule
