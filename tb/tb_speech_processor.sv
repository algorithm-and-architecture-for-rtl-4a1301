// tb_speech_processor: end-to-end test of the speech enhancement processor at
// reduced size (N = 8, R = 20 CORDIC iterations, 4 Jacobi sweeps, 25 %
// overlap). A test signal made of pauses (white noise) and voiced segments
// (a sinusoid in the same noise) is cut into overlapping frames of N samples,
// each starting N - OV samples after the previous one, and fed frame by frame.
//
// A reference model in real arithmetic follows the processing chain: frame
// autocorrelation and speech/pause decision, Toeplitz matrices of the last
// speech and noise coefficients, the same sign-driven CORDIC Jacobi sweeps
// (each rotation applied exactly, without quantization), eigenvalue ratios,
// SNR and mu, gains, x = V.G.V^T.y and overlap-add. Checked: the decision of
// every frame, the rotation and sweep counters, the number of output samples,
// and every output sample within a tolerance for the 16-bit data path.
//
// Mechanisms counted (each must occur at least once): pause and speech
// frames, both Jacobi pair orders, every mode of the memory controller,
// overlap-add of a non-zero tail, a reload of mu0, mu clamped at zero and mu
// above zero, a saturated gain, an input stall (samples offered while the
// processor is busy), and reads of the status registers.
module tb_speech_processor;
  import sd_pkg::*;
  localparam int N = 8, R = 20, NSW = 4, OVP = 25;
  localparam int OV = N * OVP / 100, H = N - OV;
  localparam int NF = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic frame_start = 0, x_valid = 0, x_ready, mu0_load = 0, pair_order = 0;
  logic [15:0] mu0_in = 0, reg_rdata;
  word_t x_in = 0, y_out;
  logic y_valid, frame_done, busy, frame_is_noise;
  mem_mode_e mode;
  logic [31:0] rot_count;
  logic [15:0] sweep_count;
  logic [1:0] reg_addr = 0;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  always #5 clk = ~clk;

  speech_processor #(.N(N), .R(R), .NSWEEP(NSW), .OVERLAP_PCT(OVP)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int c_noise, c_speech, c_order0, c_order1, c_ola, c_mu0_load, c_mu_zero, c_mu_pos, c_gsat, c_stall, c_reg;
  int c_mode [6];
  mem_mode_e last_mode = MODE_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (mode != last_mode) c_mode[mode]++;
    last_mode <= mode;
    if (x_valid && !x_ready) c_stall++;
    if (dut.u_gain.out_valid && dut.u_gain.g == ONE_Q15) c_gsat++;
  end

  // ---------------- outputs ----------------
  int n_out;
  real exp_y [H];
  real max_err;
  always @(posedge clk) if (rst_n && y_valid) begin
    real err;
    err = fabs(real'(y_out) / 32768.0 - exp_y[n_out < H ? n_out : 0]);
    if (err > max_err) max_err = err;
    checks++;
    if (n_out >= H || err > 0.02) begin
      failures++; $display("output %0d: got %f expected %f", n_out, real'(y_out) / 32768.0, exp_y[n_out < H ? n_out : 0]);
    end
    n_out++;
  end

  // ---------------- reference model state ----------------
  int rs_m [N], rn_m [N];
  int e_noise;
  logic first = 1;
  real tail [OV];

  task automatic jacobi(inout real a [N][N], inout real b [N][N], output real v [N][N], input logic order);
    foreach (v[i, j]) v[i][j] = (i == j) ? 1.0 : 0.0;
    for (int sw = 0; sw < NSW; sw++)
      for (int t = 0; t < N * (N - 1) / 2; t++) begin
        int p, q, s, k, x1, x2;
        real th, c, sn, m [8];
        if (!order) begin
          // cyclic by rows
          int cnt;
          cnt = 0;
          for (int i = 0; i < N - 1; i++)
            for (int j = i + 1; j < N; j++) begin
              if (cnt == t) begin p = i; q = j; end
              cnt++;
            end
        end else begin
          // round-robin sets of N/2 disjoint pairs
          s = t / (N / 2); k = t % (N / 2);
          if (k == 0) begin x1 = 0; x2 = 1 + s; end
          else begin x1 = 1 + (s + k) % (N - 1); x2 = 1 + (s - k + N - 1) % (N - 1); end
          p = x1 < x2 ? x1 : x2; q = x1 < x2 ? x2 : x1;
        end
        m = '{a[p][p], a[p][q], a[q][p], a[q][q], b[p][p], b[p][q], b[q][p], b[q][q]};
        th = 0;
        for (int i = 0; i < R; i++) begin
          real st, mm [8];
          logic dn;
          dn = ((m[3] + m[7] - m[0] - m[4]) < 0) != ((m[1] + m[5]) < 0);
          st = (dn ? -1.0 : 1.0) * 2.0 ** (-i);
          th += (dn ? -1.0 : 1.0) * $atan(2.0 ** (-i));
          for (int bb = 0; bb < 2; bb++) begin
            real pp, pq, qp, qq, rpp, rpq, rqp, rqq;
            pp = m[4*bb]; pq = m[4*bb+1]; qp = m[4*bb+2]; qq = m[4*bb+3];
            rpp = pp - st * qp; rpq = pq - st * qq; rqp = st * pp + qp; rqq = st * pq + qq;
            mm[4*bb] = rpp - st * rpq; mm[4*bb+1] = st * rpp + rpq;
            mm[4*bb+2] = rqp - st * rqq; mm[4*bb+3] = st * rqp + rqq;
          end
          m = mm;
        end
        c = $cos(th); sn = $sin(th);
        for (int j = 0; j < N; j++) begin
          real xa, ya, xb, yb;
          xa = a[p][j]; ya = a[q][j]; a[p][j] = c * xa - sn * ya; a[q][j] = sn * xa + c * ya;
          xb = b[p][j]; yb = b[q][j]; b[p][j] = c * xb - sn * yb; b[q][j] = sn * xb + c * yb;
        end
        for (int i = 0; i < N; i++) begin
          real xa, ya, xb, yb, xv, yv;
          xa = a[i][p]; ya = a[i][q]; a[i][p] = c * xa - sn * ya; a[i][q] = sn * xa + c * ya;
          xb = b[i][p]; yb = b[i][q]; b[i][p] = c * xb - sn * yb; b[i][q] = sn * xb + c * yb;
          xv = v[i][p]; yv = v[i][q]; v[i][p] = c * xv - sn * yv; v[i][q] = sn * xv + c * yv;
        end
      end
  endtask

  // Runs the model on one frame; returns the decision and fills exp_y.
  task automatic model(input word_t xs [N], input logic order, input real mu0, output logic noise,
                       output real mu_out);
    int r [N];
    real a [N][N], b [N][N], v [N][N], lam [N], g [N], z [N], xo [N], snr, mu;
    for (int m = 0; m < N; m++) begin
      longint s;
      s = 0;
      for (int k = m; k < N; k++) s += longint'(xs[k]) * xs[k-m];
      s = s >>> (15 + $clog2(N));
      r[m] = s > 32767 ? 32767 : (s < -32768 ? -32768 : int'(s));
    end
    noise = first || (r[0] < 2 * e_noise);
    first = 0;
    if (noise) begin e_noise = r[0]; rn_m = r; end else rs_m = r;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = rs_m[i > j ? i - j : j - i] / 32768.0;
        b[i][j] = rn_m[i > j ? i - j : j - i] / 32768.0;
      end
    jacobi(a, b, v, order);
    snr = 0;
    for (int i = 0; i < N; i++) begin
      lam[i] = (a[i][i] > b[i][i] && b[i][i] > 0) ? (a[i][i] - b[i][i]) / b[i][i] : 0.0;
      if (lam[i] > 255.0) lam[i] = 255.0;
      snr += lam[i];
    end
    snr = snr / N;
    mu = (mu0 > snr) ? mu0 - snr : 0.0;
    mu_out = mu;
    for (int i = 0; i < N; i++) g[i] = (lam[i] + mu > 0) ? lam[i] / (lam[i] + mu) : 0.0;
    for (int j = 0; j < N; j++) begin
      z[j] = 0;
      for (int i = 0; i < N; i++) z[j] += v[i][j] * xs[i] / 32768.0;
    end
    for (int i = 0; i < N; i++) begin
      xo[i] = 0;
      for (int j = 0; j < N; j++) xo[i] += v[i][j] * g[j] * z[j];
    end
    for (int i = 0; i < H; i++) begin
      // the output word saturates at the ends of the Q1.15 range
      exp_y[i] = xo[i] + ((i < OV) ? tail[i] : 0.0);
      if (exp_y[i] > 32767.0 / 32768.0) exp_y[i] = 32767.0 / 32768.0;
      if (exp_y[i] < -1.0) exp_y[i] = -1.0;
    end
    for (int i = 0; i < OV; i++) tail[i] = xo[H + i];
  endtask

  // ---------------- stimulus ----------------
  initial begin
    word_t sig [NF * H + OV];
    real mu0;
    // pause, pause, voiced, voiced, pause, voiced, voiced, voiced
    logic voiced_f [NF] = '{0, 0, 1, 1, 0, 1, 1, 1};
    foreach (tail[i]) tail[i] = 0.0;
    foreach (c_mode[i]) c_mode[i] = 0;
    {c_noise, c_speech, c_order0, c_order1, c_ola, c_mu0_load, c_mu_zero, c_mu_pos, c_gsat, c_stall, c_reg} = '0;
    max_err = 0;
    e_noise = 0;
    foreach (rn_m[i]) rn_m[i] = (i == 0) ? 64 : 0;
    foreach (rs_m[i]) rs_m[i] = 0;
    for (int n = 0; n < NF * H + OV; n++) begin
      real s;
      int f;
      f = n / H; if (f >= NF) f = NF - 1;
      s = ($urandom_range(0, 2000) - 1000) / 1000.0 * 0.1;
      if (voiced_f[f]) s += 0.35 * $sin(0.9 * n);
      sig[n] = word_t'($rtoi(s * 32768.0));
    end
    mu0 = 4.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      word_t xs [N];
      logic noise;
      real mu_m;
      int acc;
      for (int i = 0; i < N; i++) xs[i] = sig[f * H + i];
      pair_order = (f % 2 == 1);
      if (f == 6) begin
        // a higher threshold keeps mu above zero on a voiced frame
        @(negedge clk); mu0_load = 1; mu0_in = 16'(200 * 256); mu0 = 200.0; c_mu0_load++;
        @(negedge clk); mu0_load = 0;
      end
      // a tail kept from the previous frame will be added to this frame's first samples
      if (dut.u_mode4.tail[0] != 0) c_ola++;
      model(xs, pair_order, mu0, noise, mu_m);
      if (pair_order) c_order1++; else c_order0++;
      // offer the first sample early: the processor is idle but not taking input
      @(negedge clk); x_valid = 1; x_in = xs[0];
      @(negedge clk);
      frame_start = 1; @(negedge clk); frame_start = 0;
      acc = 0;
      while (acc < N) begin
        x_in = xs[acc]; x_valid = 1;
        #1 if (x_ready) acc++;
        @(negedge clk);
      end
      x_valid = 0;
      n_out = 0;
      while (!frame_done) begin
        @(negedge clk);
        if (mode == MODE_I && sweep_count == 1 && c_reg < 4 * (f + 1)) begin
          reg_addr = 2'b00; #1 chk(reg_rdata == 16'(dut.cur_p), "P register");
          reg_addr = 2'b01; #1 chk(reg_rdata == 16'(dut.cur_q), "Q register");
          reg_addr = 2'b10; #1 chk(reg_rdata == 16'(N), "n register");
          reg_addr = 2'b11; #1 chk(reg_rdata == 16'(MODE_I), "Mode register");
          c_reg += 4;
        end
      end
      chk(frame_is_noise == noise, $sformatf("frame %0d decision %0d expected %0d", f, frame_is_noise, noise));
      chk(n_out == H, $sformatf("frame %0d: %0d output samples", f, n_out));
      chk(rot_count == NSW * N * (N - 1) / 2 && sweep_count == NSW, "rotation and sweep counters");
      chk(fabs(real'(dut.u_gain.mu) / 256.0 - mu_m) < 0.1 * mu_m + 0.5, $sformatf("frame %0d: mu %f expected %f",
          f, real'(dut.u_gain.mu) / 256.0, mu_m));
      if (noise) c_noise++; else c_speech++;
      if (dut.u_gain.mu == 0) c_mu_zero++; else c_mu_pos++;
      $display("frame %0d: %s, pair order %0d, mu %0.3f, largest output error so far %f",
               f, noise ? "pause " : "speech", pair_order, real'(dut.u_gain.mu) / 256.0, max_err);
    end
    chk(c_noise > 0, "pause frames"); chk(c_speech > 0, "speech frames");
    chk(c_order0 > 0 && c_order1 > 0, "both pair orders");
    for (int m = 1; m <= 5; m++) chk(c_mode[m] > 0, $sformatf("mode %0d entered", m));
    chk(c_ola > 0, "overlap-add"); chk(c_mu0_load > 0, "mu0 reload");
    chk(c_mu_zero > 0, "mu clamped at zero"); chk(c_mu_pos > 0, "mu above zero");
    chk(c_gsat > 0, "saturated gain"); chk(c_stall > 0, "input stall"); chk(c_reg > 0, "register reads");
    $display("counts: pause %0d speech %0d order0 %0d order1 %0d modes L%0d I%0d II%0d III%0d IV%0d ola %0d mu0 %0d mu=0 %0d mu>0 %0d gsat %0d stall %0d reg %0d",
             c_noise, c_speech, c_order0, c_order1, c_mode[MODE_LOAD], c_mode[MODE_I], c_mode[MODE_II], c_mode[MODE_III],
             c_mode[MODE_IV], c_ola, c_mu0_load, c_mu_zero, c_mu_pos, c_gsat, c_stall, c_reg);
    $display("largest output error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
endmodule
