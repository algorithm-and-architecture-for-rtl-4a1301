// tb_autocorr_unit: self-checking test of the autocorrelation unit (N = 8)
// together with the MAC unit it shares. Random frames, one at full scale to
// reach the saturation, are compared lag by lag with a direct sum computed in
// the testbench; the frame time, N + N*(N+3) + 1 clocks from start to done,
// is checked as well.
module tb_autocorr_unit;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, x_valid = 0, busy, r_valid, done;
  logic mac_valid, mac_clr;
  word_t x_in = 0, mac_d0, mac_d1, r_data;
  acc_t mac_acc;
  idx_t r_lag;
  int checks = 0, failures = 0;
  int n_r;
  word_t xs [N];
  always #5 clk = ~clk;

  autocorr_unit #(.N(N)) dut (.*);
  mac_unit u_mac (.clk, .rst_n, .in_valid(mac_valid), .acc_clr(mac_clr), .data_in0(mac_d0),
                  .data_in1(mac_d1), .acc_out(mac_acc), .out_valid());

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && r_valid) begin
    longint s, e;
    s = 0;
    for (int k = int'(r_lag); k < N; k++) s += longint'(xs[k]) * longint'(xs[k - int'(r_lag)]);
    e = s >>> (15 + 3);
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    checks++;
    if (int'(r_lag) != n_r || longint'(r_data) != e) begin
      failures++; $display("lag %0d (expected lag %0d): got %0d expected %0d", r_lag, n_r, r_data, e);
    end
    n_r++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      int cyc;
      for (int k = 0; k < N; k++) begin
        xs[k] = word_t'($urandom);
        if (f == 1) xs[k] = 16'sh8000;
        if (f == 2) xs[k] = word_t'($urandom_range(0, 200)) - 16'sd100;
      end
      n_r = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      for (int k = 0; k < N; k++) begin
        x_valid = 1; x_in = xs[k]; @(negedge clk); cyc++;
      end
      x_valid = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + N * (N + 3) + 1 + 1 || n_r != N) begin
        failures++; $display("frame %0d: %0d clocks, %0d lags", f, cyc, n_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
