// bch_membuf: memory buffer (MB) holding one BBFRAME.
//
// A one-bit-wide, DEPTH-deep memory used as a circular FIFO. During
// reception the information bits of the frame are written in arrival order;
// after the key equation has been solved they are read back in the same
// order and corrected on their way out. The BCH parity bits are never
// stored. DEPTH defaults to the largest BBFRAME of the standard (58192 bits,
// normal frame, rate 9/10).
//
// Both pointers wrap at DEPTH, so the buffer needs no per-frame reset: every
// frame writes and then reads the same number of bits. Writing a full frame
// before reading it is the decoder's schedule; the circular organisation and
// the registered (one-cycle) read are this design's choices, suited to a
// single-port-per-direction SRAM.
//
// Interface: `wr_en` stores `wr_data`. `rd_en` fetches the oldest bit; it
// appears on `rd_data` one clock later. `count` is the number of bits held.
module bch_membuf #(
  parameter int unsigned DEPTH = 58192
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic                      wr_data,
  input  logic                      rd_en,
  output logic                      rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic          mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= inc(wr_ptr);
      if (rd_en) rd_ptr <= inc(rd_ptr);
      if (wr_en && !rd_en)      count <= count + 1'b1;
      else if (rd_en && !wr_en) count <= count - 1'b1;
    end
  end

  // A read of an empty buffer or a write to a full one is a schedule error.
  // Simulation-only checks of the schedule; they add no logic.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != 0)
    else $error("bch_membuf: read from empty buffer");
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (int'(count) != DEPTH || rd_en))
    else $error("bch_membuf: write to full buffer");

endmodule
