// tb_gain_unit: self-checking test of the gain unit (N = 8). Several frames
// of random diagonal pairs, some giving lambda = 0, some a large SNR that
// drives mu to zero, and one with a reloaded mu0; every gain and the frame's
// mu are compared with integer arithmetic done in the testbench.
module tb_gain_unit;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic mu0_load = 0, start = 0, in_valid = 0, in_ready, out_valid, done;
  logic [15:0] mu0_in = 0, mu;
  word_t d1 = 0, d2 = 0, g;
  int checks = 0, failures = 0;
  int n_out;
  longint exp_g [N];
  longint exp_mu;
  always #5 clk = ~clk;

  gain_unit #(.N(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_out >= N || longint'(g) != exp_g[n_out]) begin
      failures++; $display("gain %0d: got %0d expected %0d", n_out, g, exp_g[n_out]);
    end
    if (n_out == 0) begin
      checks++;
      if (longint'(mu) != exp_mu) begin failures++; $display("mu: got %0d expected %0d", mu, exp_mu); end
    end
    n_out++;
  end

  initial begin
    longint lam [N];
    longint sum, mu0, den, q;
    mu0 = 1024;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      word_t a [N], b [N];
      if (f == 3) begin
        @(negedge clk); mu0_load = 1; mu0_in = 16'd3000; mu0 = 3000;
        @(negedge clk); mu0_load = 0;
      end
      sum = 0;
      for (int i = 0; i < N; i++) begin
        b[i] = word_t'($urandom_range(50, 4000));
        if (f == 2 && i % 2 == 1) b[i] = word_t'(-$signed(16'($urandom_range(0, 300))));  // noise diagonal <= 0
        case (f)
          1: a[i] = word_t'(b[i] * 12 > 32767 ? 32767 : b[i] * 12);   // high SNR: mu clamps to 0
          2: a[i] = word_t'($urandom_range(0, 4000));                  // some lambda = 0
          default: a[i] = word_t'(b[i] + $urandom_range(0, 3 * b[i]));
        endcase
        if (a[i] > b[i] && b[i] > 0) lam[i] = ((longint'(a[i]) - b[i]) << 8) / b[i]; else lam[i] = 0;
        if (lam[i] > 65535) lam[i] = 65535;
        sum += lam[i];
      end
      exp_mu = (sum >> 3) >= mu0 ? 0 : mu0 - (sum >> 3);
      for (int i = 0; i < N; i++) begin
        den = lam[i] + exp_mu;
        if (den == 0) exp_g[i] = 0;
        else begin
          q = (lam[i] << 15) / den;
          exp_g[i] = q > 32767 ? 32767 : q;
        end
      end
      n_out = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < N; i++) begin
        in_valid = 1; d1 = a[i]; d2 = b[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      while (!done) @(negedge clk);
      checks++;
      if (n_out != N) begin failures++; $display("frame %0d: %0d gains", f, n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
