// tb_frame_fifo: self-checking test of the frame buffer (DEPTH = 8): write a
// frame, read it forwards twice around the ring, read it backwards from the
// newest word, clear and refill.
module tb_frame_fifo;
  import sd_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic clear = 0, wr_en = 0, rd_start = 0, rd_rev = 0, rd_next = 0;
  word_t wr_data = 0, rd_data;
  logic full;
  word_t ref_q [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  frame_fifo #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      chk(!full, "empty after clear");
      for (int i = 0; i < D; i++) begin
        ref_q[i] = word_t'($urandom);
        wr_en = 1; wr_data = ref_q[i]; @(negedge clk);
      end
      wr_en = 0;
      chk(full, "full after a frame");
      rd_start = 1; rd_rev = 0; @(negedge clk); rd_start = 0;
      for (int i = 0; i < 2 * D; i++) begin
        chk(rd_data == ref_q[i % D], $sformatf("forward %0d", i));
        rd_next = 1; @(negedge clk); rd_next = 0;
      end
      rd_start = 1; rd_rev = 1; @(negedge clk); rd_start = 0;
      for (int i = 0; i < D; i++) begin
        chk(rd_data == ref_q[D-1-i], $sformatf("reverse %0d", i));
        rd_next = 1; @(negedge clk); rd_next = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
