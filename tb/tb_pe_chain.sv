// tb_pe_chain: self-checking test of a chain of R = 20 processing elements.
// Each rotation feeds a symmetric 2x2 block A1 and A2 = c A1 + e I, which share
// their eigenvectors, so one simultaneous rotation must diagonalize both.
// Checked against real arithmetic: the first six directions against the sign
// rule replayed in the testbench; the off-diagonal entries of both outputs,
// once the CORDIC gain K^2 is removed, below 0.2% of the block's size; the
// traces preserved; and done arriving 13R + 9 clocks after the first word.
module tb_pe_chain;
  import sd_pkg::*;
  localparam int R = 20, GUARD = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic in_valid = 0, out_valid, done;
  word_t in_data = 0;
  peword_t out_data;
  logic [R-1:0] dir_neg;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  int exp_dirs [6];
  always #5 clk = ~clk;

  pe_chain #(.R(R), .GUARD(GUARD)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k2;
    k2 = 1.0;
    for (int i = 0; i < R; i++) k2 = k2 / (1.0 + 2.0 ** (-2 * i));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int w [8];
      real o [8], scale, m [8];
      int cyc, n;
      real app, apq, aqq, cc, ee;
      app = $urandom_range(0, 20000) - 10000.0;
      aqq = $urandom_range(0, 20000) - 10000.0;
      apq = $urandom_range(0, 16000) - 8000.0;
      cc = $urandom_range(1, 5) / 8.0; ee = $urandom_range(0, 4000);
      w[0] = int'(app); w[1] = int'(apq); w[2] = int'(apq); w[3] = int'(aqq);
      w[4] = int'(cc * app + ee); w[5] = int'(cc * apq); w[6] = w[5]; w[7] = int'(cc * aqq + ee);
      for (int i = 0; i < 8; i++) m[i] = w[i];
      scale = fabs(m[0]) + fabs(m[1]) + fabs(m[3]) + 1.0;
      // replay the sign rule for the first directions in real arithmetic
      for (int i = 0; i < 6; i++) begin
        real s, mm [8];
        int d;
        d = ((m[3] + m[7] - m[0] - m[4]) < 0) != ((m[1] + m[5]) < 0);
        s = (d ? -1.0 : 1.0) * 2.0 ** (-i);
        for (int b = 0; b < 2; b++) begin
          real pp, pq, qp, qq, rpp, rpq, rqp, rqq;
          pp = m[4*b]; pq = m[4*b+1]; qp = m[4*b+2]; qq = m[4*b+3];
          rpp = pp - s * qp; rpq = pq - s * qq; rqp = s * pp + qp; rqq = s * pq + qq;
          mm[4*b] = rpp - s * rpq; mm[4*b+1] = s * rpp + rpq;
          mm[4*b+2] = rqp - s * rqq; mm[4*b+3] = s * rqp + rqq;
        end
        m = mm;
        exp_dirs[i] = d;
      end
      for (int i = 0; i < 8; i++) begin
        @(negedge clk); in_valid = 1; in_data = word_t'(w[i]);
      end
      @(negedge clk); in_valid = 0;
      cyc = 8; n = 0;
      while (!done) begin
        if (out_valid) begin o[n] = real'(out_data) / 2.0 ** GUARD * k2; n++; end
        @(negedge clk); cyc++;
      end
      checks += 6;
      for (int i = 0; i < 6; i++)
        if (dir_neg[i] != exp_dirs[i][0]) begin failures++; $display("rotation %0d: direction %0d differs", t, i); end
      checks++;
      if (n != 8 || cyc != 13 * R + 9) begin failures++; $display("rotation %0d: %0d words, done after %0d clocks", t, n, cyc); end
      checks += 4;
      if (fabs(o[1]) > 0.002 * scale || fabs(o[2]) > 0.002 * scale) begin failures++; $display("A1 off-diagonal %f %f (scale %f)", o[1], o[2], scale); end
      if (fabs(o[5]) > 0.002 * scale || fabs(o[6]) > 0.002 * scale) begin failures++; $display("A2 off-diagonal %f %f", o[5], o[6]); end
      if (fabs(o[0] + o[3] - app - aqq) > 0.002 * scale) begin failures++; $display("A1 trace %f vs %f", o[0] + o[3], app + aqq); end
      if (fabs(o[4] + o[7] - w[4] - w[7]) > 0.002 * scale) begin failures++; $display("A2 trace changed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
