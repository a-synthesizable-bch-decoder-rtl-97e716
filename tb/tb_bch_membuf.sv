// tb_bch_membuf: checks the frame buffer as a FIFO.
//
// A small buffer (DEPTH 37) is filled with frames of random length up to
// DEPTH and read back, so the pointers wrap many times. Every bit read must
// equal the bit written in that order (a queue in the testbench is the
// reference), arriving one clock after its read request, and `count` must
// track the fill level.
module tb_bch_membuf;
  localparam int unsigned DEPTH = 37;

  logic clk = 0, rst_n = 0, wr_en = 0, wr_data = 0, rd_en = 0;
  logic rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  bit model [$];

  always #5 clk = ~clk;

  bch_membuf #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      automatic int len = 1 + int'($urandom_range(DEPTH - 1));
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        wr_en = 1; wr_data = 1'($urandom);
        model.push_back(wr_data);
      end
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (int'(count) != len) begin failures++; $display("FAIL count %0d exp %0d", count, len); end
      for (int i = 0; i < len; i++) begin
        rd_en = 1;
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data !== model.pop_front()) begin failures++; $display("FAIL frame %0d bit %0d", f, i); end
      end
      checks++;
      if (count != 0) begin failures++; $display("FAIL count not zero after read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
