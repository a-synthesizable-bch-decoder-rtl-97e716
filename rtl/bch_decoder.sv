// bch_decoder: DVB-S2 BCH decoder, top level.
//
// Takes one FECFRAME without its LDPC parity (the N_bch-bit BCH codeword)
// serially, one bit per clock, corrects up to t = 8, 10 or 12 bit errors and
// delivers the K_bch-bit BBFRAME serially. Five units and an XOR gate:
//   bch_control  - state machine and bit counters (CU)
//   bch_syndrome - 12 LFSRs and XOR matrices giving S_1..S_2t (SC)
//   bch_kes      - simplified inverse-free Berlekamp-Massey, t cycles (KES)
//   bch_chien    - shortened Chien search, one bit position per clock (PRF)
//   bch_membuf   - one-bit-wide buffer holding the BBFRAME (MB)
// The output bit is the buffered bit XOR the roots finder's flag, the flag
// being used only when the frame had a non-zero syndrome.
//
// Interface: bits are taken when in_valid and in_ready are both high; the
// first bit's frame_type and code_rate select the configuration of the whole
// frame. in_ready is low while a frame is being corrected and sent, so one
// frame is decoded at a time. out_valid marks each of the K output bits, in
// order; there is no back-pressure on the output. Latency from the last
// input bit to the first output bit: t+4 cycles (errors) or 3 (clean frame).
//
// The five units, their order and the XOR correction follow the published
// architecture. The handshake, the gating of the XOR by the frame's error
// flag and the simulation assertions at the bottom are this design's own.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned MB_DEPTH = K_MAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_data,
  input  frame_t      frame_type,
  input  code_rate_t  code_rate,
  output logic        in_ready,
  output logic        out_valid,
  output logic        out_data
);

  bch_state_t     state;
  bch_cfg_t       cfg;
  code_rate_t     rate;
  logic           sc_shift, sc_clear, mb_wr, mb_rd;
  logic           kes_start, kes_busy, kes_done;
  logic           prf_load, prf_step, prf_root, corr_en;
  logic           syn_zero, mb_bit;
  gf_t [NSYN:1]   syn;
  gf_t [T_MAX:0]  sigma;
  logic [4:0]     deg;
  logic [$clog2(MB_DEPTH+1)-1:0] mb_count;

  bch_control u_cu (
    .clk, .rst_n, .in_valid, .frame_type, .code_rate,
    .syn_zero, .kes_done, .in_ready, .state, .cfg, .rate,
    .sc_shift, .sc_clear, .mb_wr, .mb_rd, .kes_start, .prf_load,
    .prf_step, .corr_en, .out_valid
  );

  bch_syndrome u_sc (
    .clk, .rst_n, .clear(sc_clear), .shift(sc_shift), .bit_in(in_data),
    .short_frame(cfg.short_frame), .t(cfg.t), .syn, .syn_zero
  );

  bch_kes u_kes (
    .clk, .rst_n, .start(kes_start), .short_frame(cfg.short_frame),
    .t(cfg.t), .syn, .busy(kes_busy), .done(kes_done), .sigma, .deg
  );

  bch_chien u_prf (
    .clk, .rst_n, .load(prf_load), .step(prf_step),
    .short_frame(cfg.short_frame), .code_rate(rate), .sigma, .root(prf_root)
  );

  bch_membuf #(.DEPTH(MB_DEPTH)) u_mb (
    .clk, .rst_n, .wr_en(mb_wr), .wr_data(in_data), .rd_en(mb_rd),
    .rd_data(mb_bit), .count(mb_count)
  );

  // The correcting XOR gate.
  assign out_data = mb_bit ^ (prf_root & corr_en);

  // Schedule rules, checked in simulation: the solver iterates only in the
  // KES state, the buffer never holds more than one BBFRAME, and no bit is
  // taken while the decoder is busy.
  assert property (@(posedge clk) disable iff (!rst_n) kes_busy |-> state == ST_KES)
    else $error("bch_decoder: key equation solver busy outside KES");
  assert property (@(posedge clk) disable iff (!rst_n) mb_count <= cfg.k)
    else $error("bch_decoder: buffer holds more than K bits");
  assert property (@(posedge clk) disable iff (!rst_n) (state == ST_KES || state == ST_TX) |-> !in_ready)
    else $error("bch_decoder: input accepted while busy");

endmodule
