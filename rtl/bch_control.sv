// bch_control: control unit (CU) of the BCH decoder.
//
// A five-state machine with the bit counters that sequence one frame:
//   IDLE - wait for the first valid bit; its frame type and code rate are
//          latched with it and select K, N and t from the code table.
//   RX1  - the first K bits (the BBFRAME) go to the syndrome calculator and
//          into the memory buffer.
//   RX2  - the remaining N-K parity bits go to the syndrome calculator only.
//   KES  - first cycle: if all 2t syndromes are zero the frame is clean and
//          the machine goes straight to TX; otherwise the key equation solver
//          is started, and when it is done the roots finder is loaded.
//   TX   - K bits are read from the buffer, one per clock, XORed with the
//          roots finder's flag; after the K-th the machine returns to IDLE.
// The state sequence, the K/N split and the skip of the key equation for a
// clean frame follow the decoder's description. The handshake (in_valid /
// in_ready, bits may pause between valid cycles), the extra decision cycle at
// the start of KES and the output timing are this design's choices.
//
// Timing for a frame with errors and no input gaps: N cycles of reception,
// t+2 cycles in KES (decision/load, t iterations, roots finder load) and K
// cycles in TX; out_valid follows each buffer read by one cycle. For a
// clean frame KES lasts one cycle. The output has no back-pressure.
module bch_control
  import bch_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  frame_t      frame_type,
  input  code_rate_t  code_rate,
  input  logic        syn_zero,
  input  logic        kes_done,
  output logic        in_ready,
  output bch_state_t  state,
  output bch_cfg_t    cfg,          // configuration of the current frame
  output code_rate_t  rate,         // code rate of the current frame
  output logic        sc_shift,
  output logic        sc_clear,
  output logic        mb_wr,
  output logic        mb_rd,
  output logic        kes_start,
  output logic        prf_load,
  output logic        prf_step,
  output logic        corr_en,      // frame has a non-zero syndrome
  output logic        out_valid
);

  bch_state_t       state_q;
  bch_cfg_t         cfg_q;
  code_rate_t       rate_q;
  logic [CNT_W-1:0] cnt_q;
  logic             kes_run_q;
  logic             corr_q;
  logic             out_valid_q;

  logic accept;

  assign in_ready  = (state_q == ST_IDLE) || (state_q == ST_RX1) || (state_q == ST_RX2);
  assign accept    = in_valid && in_ready;

  // In IDLE the configuration of the arriving bit is used directly.
  assign cfg       = (state_q == ST_IDLE) ? lookup_cfg(frame_type, code_rate) : cfg_q;
  assign rate      = (state_q == ST_IDLE) ? code_rate : rate_q;

  assign sc_shift  = accept;
  assign sc_clear  = (state_q == ST_KES) || (state_q == ST_TX);
  assign mb_wr     = accept && (state_q != ST_RX2);
  assign mb_rd     = (state_q == ST_TX);
  assign kes_start = (state_q == ST_KES) && !kes_run_q && !syn_zero;
  assign prf_load  = (state_q == ST_KES) && kes_run_q && kes_done;
  assign prf_step  = out_valid_q;
  assign corr_en   = corr_q;
  assign out_valid = out_valid_q;
  assign state     = state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      cfg_q       <= '0;
      rate_q      <= CR_1_4;
      cnt_q       <= '0;
      kes_run_q   <= 1'b0;
      corr_q      <= 1'b0;
      out_valid_q <= 1'b0;
    end else begin
      out_valid_q <= mb_rd;
      unique case (state_q)
        ST_IDLE: if (accept) begin
          cfg_q   <= cfg;
          rate_q  <= code_rate;
          cnt_q   <= CNT_W'(1);
          state_q <= ST_RX1;
        end
        ST_RX1: if (accept) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == cfg_q.k - 1'b1) state_q <= ST_RX2;
        end
        ST_RX2: if (accept) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == cfg_q.n - 1'b1) begin
            state_q   <= ST_KES;
            kes_run_q <= 1'b0;
          end
        end
        ST_KES: begin
          if (!kes_run_q) begin
            corr_q <= !syn_zero;
            cnt_q  <= '0;
            if (syn_zero) state_q   <= ST_TX;
            else          kes_run_q <= 1'b1;
          end else if (kes_done) begin
            kes_run_q <= 1'b0;
            state_q   <= ST_TX;
          end
        end
        ST_TX: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == cfg_q.k - 1'b1) state_q <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

endmodule
