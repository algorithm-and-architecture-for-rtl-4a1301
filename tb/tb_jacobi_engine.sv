// tb_jacobi_engine: self-checking test of the simultaneous diagonalization
// engine (N = 8, R = 20, 5 sweeps) with three shift memories. Two symmetric
// matrices that share their eigenvectors, A = Q D1 Q^T and B = Q D2 Q^T with a
// random orthogonal Q built in the testbench, are loaded and diagonalized,
// once with each pair order. Checked in real arithmetic against the matrices
// read back: the off-diagonal parts of A and B (below 2% of the diagonal),
// the orthogonality of V, that V^T A0 V and V^T B0 V match the returned
// matrices, the rotation and sweep counters, and the run time
// N^2 + NSWEEP * N(N-1)/2 * (8N + 13R + 12) clocks.
module tb_jacobi_engine;
  import sd_pkg::*;
  localparam int N = 8, R = 20, NSW = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, pair_order = 0, busy, done;
  dmsm_req_t ea, eb, ev, ta = DMSM_IDLE, tb_ = DMSM_IDLE, tv = DMSM_IDLE, ra, rb, rv;
  word_t da, db, dv;
  idx_t cur_p, cur_q;
  logic [31:0] rot_count;
  logic [15:0] sweep_count;
  logic tb_own = 1;
  int checks = 0, failures = 0;
  real a0 [N][N], b0 [N][N], af [N][N], bf [N][N], vf [N][N];
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  always #5 clk = ~clk;

  assign ra = tb_own ? ta : ea;
  assign rb = tb_own ? tb_ : eb;
  assign rv = tb_own ? tv : ev;
  dmsm #(.N(N)) u_a (.clk, .req(ra), .data_out(da));
  dmsm #(.N(N)) u_b (.clk, .req(rb), .data_out(db));
  dmsm #(.N(N)) u_v (.clk, .req(rv), .data_out(dv));

  jacobi_engine #(.N(N), .R(R), .NSWEEP(NSW)) dut (
    .clk, .rst_n, .start, .pair_order, .busy, .done, .req_a(ea), .req_b(eb), .req_v(ev),
    .dout_a(da), .dout_b(db), .dout_v(dv), .cur_p, .cur_q, .rot_count, .sweep_count);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      real q [N][N], d1 [N], d2 [N];
      real offa, offb, diaga, diagb, e_orth, e_ra, e_rb;
      int cyc, exp_cyc;
      // random orthogonal Q: product of random plane rotations
      foreach (q[i, j]) q[i][j] = (i == j) ? 1.0 : 0.0;
      for (int t = 0; t < 40; t++) begin
        int i, j;
        real th, c, s;
        i = $urandom_range(0, N - 1); j = (i + 1 + $urandom_range(0, N - 2)) % N;
        th = $urandom_range(0, 6283) / 1000.0; c = $cos(th); s = $sin(th);
        for (int r = 0; r < N; r++) begin
          real x, y;
          x = q[r][i]; y = q[r][j];
          q[r][i] = c * x - s * y; q[r][j] = s * x + c * y;
        end
      end
      for (int i = 0; i < N; i++) begin
        d1[i] = 0.02 + $urandom_range(0, 250) / 1000.0;
        d2[i] = 0.01 + $urandom_range(0, 100) / 1000.0;
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a0[i][j] = 0; b0[i][j] = 0;
          for (int k = 0; k < N; k++) begin
            a0[i][j] += q[i][k] * d1[k] * q[j][k];
            b0[i][j] += q[i][k] * d2[k] * q[j][k];
          end
        end
      // load A and B row by row (quantized to Q1.15)
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          ta = DMSM_IDLE; ta.shift_en = 1; ta.shift_sel = idx_t'(r);
          tb_ = ta;
          ta.din  = word_t'($rtoi(a0[r][N-1-k] * 32768.0));
          tb_.din = word_t'($rtoi(b0[r][N-1-k] * 32768.0));
          a0[r][N-1-k] = real'(ta.din) / 32768.0;
          b0[r][N-1-k] = real'(tb_.din) / 32768.0;
        end
      @(negedge clk); ta = DMSM_IDLE; tb_ = DMSM_IDLE; tb_own = 0;
      pair_order = run[0];
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = N * N + NSW * (N * (N - 1) / 2) * (8 * N + 13 * R + 12) + 2;
      $display("run %0d: %0d clocks (expected %0d)", run, cyc, exp_cyc);
      chk(cyc == exp_cyc, "run time");
      chk(rot_count == NSW * N * (N - 1) / 2 && sweep_count == NSW, "rotation and sweep counters");
      // read A, B and V back by rotating their rows
      tb_own = 1;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          ta = DMSM_IDLE; ta.shift_en = 1; ta.in_sel = 1; ta.shift_sel = idx_t'(r); ta.out_sel = idx_t'(r);
          tb_ = ta; tv = ta;
          #1;
          af[r][N-1-k] = real'(da) / 32768.0;
          bf[r][N-1-k] = real'(db) / 32768.0;
          vf[r][N-1-k] = real'(dv) / 32768.0;
        end
      @(negedge clk); ta = DMSM_IDLE; tb_ = DMSM_IDLE; tv = DMSM_IDLE;
      offa = 0; offb = 0; diaga = 0; diagb = 0; e_orth = 0; e_ra = 0; e_rb = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          real vtv, ra_, rb_;
          if (i == j) begin diaga += fabs(af[i][j]); diagb += fabs(bf[i][j]); end
          else begin offa += fabs(af[i][j]); offb += fabs(bf[i][j]); end
          vtv = 0; ra_ = 0; rb_ = 0;
          for (int k = 0; k < N; k++) begin
            vtv += vf[k][i] * vf[k][j];
            for (int l = 0; l < N; l++) begin
              ra_ += vf[k][i] * a0[k][l] * vf[l][j];
              rb_ += vf[k][i] * b0[k][l] * vf[l][j];
            end
          end
          if (fabs(vtv - (i == j ? 1.0 : 0.0)) > e_orth) e_orth = fabs(vtv - (i == j ? 1.0 : 0.0));
          if (fabs(ra_ - af[i][j]) > e_ra) e_ra = fabs(ra_ - af[i][j]);
          if (fabs(rb_ - bf[i][j]) > e_rb) e_rb = fabs(rb_ - bf[i][j]);
        end
      $display("run %0d: off(A)/diag(A) %f, off(B)/diag(B) %f, |V'V-I| %f, |V'A0V-A| %f, |V'B0V-B| %f",
               run, offa / diaga, offb / diagb, e_orth, e_ra, e_rb);
      chk(offa < 0.02 * diaga, "A diagonalized");
      chk(offb < 0.02 * diagb, "B diagonalized");
      chk(e_orth < 0.005, "V orthogonal");
      chk(e_ra < 0.003 && e_rb < 0.003, "V^T A0 V and V^T B0 V reproduce the results");
      for (int i = 0; i < N; i++) chk(fabs(vf[i][i]) <= 1.0, "V entries in range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
