// tb_pq_gen_parallel: self-checking test of the parallel pair generator
// (N = 8). Every transform set must hold N/2 pairs with p < q that touch each
// index exactly once; over the N-1 sets every one of the N(N-1)/2 pairs must
// appear exactly once; last must flag the final set and the address wrap.
module tb_pq_gen_parallel;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic clr = 0, inc = 0, last;
  idx_t p [N/2], q [N/2];
  int checks = 0, failures = 0;
  int seen [N][N];
  always #5 clk = ~clk;

  pq_gen_parallel #(.N(N)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (seen[i, j]) seen[i][j] = 0;
    for (int s = 0; s < N - 1; s++) begin
      int used [N];
      foreach (used[i]) used[i] = 0;
      for (int k = 0; k < N / 2; k++) begin
        checks++;
        if (p[k] >= q[k] || q[k] >= N) begin failures++; $display("set %0d lane %0d: (%0d,%0d)", s, k, p[k], q[k]); end
        else begin
          used[p[k]]++; used[q[k]]++; seen[p[k]][q[k]]++;
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (used[i] != 1) begin failures++; $display("set %0d uses index %0d %0d times", s, i, used[i]); end
      end
      checks++;
      if (last != (s == N - 2)) begin failures++; $display("set %0d: last %0d", s, last); end
      inc = 1; @(negedge clk); inc = 0;
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        checks++;
        if (seen[i][j] != 1) begin failures++; $display("pair (%0d,%0d) seen %0d times", i, j, seen[i][j]); end
      end
    checks++;
    if (p[0] != 0 || q[0] != 1) begin failures++; $display("no wrap to set 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
