// tb_pq_gen_serial: self-checking test of the serial pair generator (N = 8):
// two sweeps are stepped through and checked against the cyclic-by-rows order,
// the last flag and the wrap to (0,1); clr restarts a sweep mid-way.
module tb_pq_gen_serial;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic clr = 0, inc = 0, last;
  idx_t p, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pq_gen_serial #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sw = 0; sw < 2; sw++)
      for (int i = 0; i < N - 1; i++)
        for (int j = i + 1; j < N; j++) begin
          checks++;
          if (p != idx_t'(i) || q != idx_t'(j) || last != (i == N - 2)) begin
            failures++; $display("got (%0d,%0d) last %0d, expected (%0d,%0d)", p, q, last, i, j);
          end
          inc = 1; @(negedge clk); inc = 0;
        end
    repeat (5) begin inc = 1; @(negedge clk); end
    inc = 0; clr = 1; @(negedge clk); clr = 0;
    checks++;
    if (p != 0 || q != 1) begin failures++; $display("clr: got (%0d,%0d)", p, q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
