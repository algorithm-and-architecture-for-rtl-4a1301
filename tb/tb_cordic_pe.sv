// tb_cordic_pe: self-checking test of one CORDIC processing element
// (SHIFT = 2). Random pairs of 2x2 blocks are streamed in; the direction bit
// is compared with the sign rule, and the eight output words with J^T A J
// (J = [1 s; -s 1], s = +-1/4) evaluated in real arithmetic, within the
// rounding of the two arithmetic shifts. Back-to-back rotations and the
// timing (first output word 5 clocks after the last input word, done two
// clocks after the eighth output word) are checked too.
module tb_cordic_pe;
  import sd_pkg::*;
  localparam int SH = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic in_valid = 0, out_valid, dir_neg, done;
  peword_t in_data = 0, out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_pe #(.SHIFT(SH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int w [8];
      real e [8], s;
      int dexp, cyc;
      for (int i = 0; i < 8; i++) w[i] = int'($urandom_range(0, 2000000)) - 1000000;
      if (t % 5 == 0) begin w[1] = 0; w[5] = 0; end   // sign(0) = +1 on the pq sum
      dexp = ((w[3] + w[7] - w[0] - w[4]) < 0) != ((w[1] + w[5]) < 0);
      s = dexp ? -0.25 : 0.25;
      for (int m = 0; m < 2; m++) begin
        real pp, pq, qp, qq, rpp, rpq, rqp, rqq;
        pp = w[4*m]; pq = w[4*m+1]; qp = w[4*m+2]; qq = w[4*m+3];
        rpp = pp - s * qp; rpq = pq - s * qq; rqp = s * pp + qp; rqq = s * pq + qq;
        e[4*m]   = rpp - s * rpq; e[4*m+1] = s * rpp + rpq;
        e[4*m+2] = rqp - s * rqq; e[4*m+3] = s * rqp + rqq;
      end
      for (int i = 0; i < 8; i++) begin
        @(negedge clk); in_valid = 1; in_data = peword_t'(w[i]);
      end
      @(negedge clk); in_valid = 0;
      cyc = 0;
      while (!out_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 5 || dir_neg != dexp[0]) begin
        failures++; $display("rotation %0d: first output after %0d, dir %0d expected %0d", t, cyc, dir_neg, dexp);
      end
      for (int i = 0; i < 8; i++) begin
        real err;
        err = real'(out_data) - e[i];
        checks++;
        if (!out_valid || err > 2.0 || err < -2.0) begin
          failures++; $display("rotation %0d word %0d: got %0d expected %f", t, i, out_data, e[i]);
        end
        @(negedge clk);
      end
      @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("no done two clocks after the last word"); end
      begin
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
