// tb_top_mem_ctrl: self-checking test of the top memory controller (N = 4)
// with shift memories A and B. The testbench delivers coefficient sets as the
// autocorrelation unit would and plays the four mode controllers with random
// delays. Checked: A and B hold the Toeplitz matrices of the last speech and
// noise coefficient sets (B = NOISE_FLOOR * I before any noise frame), the
// modes run once each in the order I, II, III, IV with the mode output and
// the Mode register following, the P, Q and n registers, and done.
module tb_top_mem_ctrl;
  import sd_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, done, r_valid = 0, r_is_noise = 0;
  idx_t r_lag = 0, cur_p = 0, cur_q = 0;
  word_t r_data = 0, da, db;
  mem_mode_e mode;
  dmsm_req_t ma, mb, ta = DMSM_IDLE, ra, rb;
  logic [3:0] ms, md;
  logic [1:0] reg_addr = 0;
  logic [15:0] reg_rdata;
  logic tb_own = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  assign ra = tb_own ? ta : ma;
  assign rb = tb_own ? ta : mb;
  dmsm #(.N(N)) u_a (.clk, .req(ra), .data_out(da));
  dmsm #(.N(N)) u_b (.clk, .req(rb), .data_out(db));
  top_mem_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .done, .mode, .r_valid, .r_lag, .r_data, .r_is_noise,
    .req_a(ma), .req_b(mb), .m1_start(ms[0]), .m1_done(md[0]), .m2_start(ms[1]), .m2_done(md[1]),
    .m3_start(ms[2]), .m3_done(md[2]), .m4_start(ms[3]), .m4_done(md[3]), .cur_p, .cur_q, .reg_addr, .reg_rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input word_t r [N], input logic noise);
    for (int m = 0; m < N; m++) begin
      @(negedge clk); r_valid = 1; r_lag = idx_t'(m); r_data = r[m]; r_is_noise = noise;
    end
    @(negedge clk); r_valid = 0;
  endtask

  initial begin
    word_t rs [N], rn [N], tmp [N];
    md = 0;
    foreach (rn[i]) rn[i] = (i == 0) ? 16'sd64 : 16'sd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    reg_addr = 2'b10; #1 chk(reg_rdata == N, "n register");
    for (int f = 0; f < 3; f++) begin
      foreach (tmp[i]) tmp[i] = word_t'($urandom);
      foreach (rs[i]) rs[i] = word_t'($urandom);
      send(rs, 0);
      if (f > 0) begin rn = tmp; send(rn, 1); end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      chk(mode == MODE_LOAD, "LOAD mode");
      for (int m = 0; m < 4; m++) begin
        int d;
        while (ms == 0) @(negedge clk);
        chk(ms == 4'(1 << m), $sformatf("mode %0d started alone and in order (%b)", m + 1, ms));
        @(negedge clk);
        chk(mode == mem_mode_e'(m + 1), "mode output");
        reg_addr = 2'b11; #1 chk(reg_rdata == 16'(m + 1), "Mode register");
        cur_p = idx_t'($urandom_range(0, N - 1)); cur_q = idx_t'($urandom_range(0, N - 1));
        reg_addr = 2'b00; #1 chk(reg_rdata == 16'(cur_p), "P register");
        reg_addr = 2'b01; #1 chk(reg_rdata == 16'(cur_q), "Q register");
        d = $urandom_range(0, 5);
        repeat (d) begin @(negedge clk); chk(ms == 0 && !done, "waits for the mode's done"); end
        if (m == 0) begin
          // while Mode I runs, check the Toeplitz matrices built before it
          tb_own = 1;
          for (int r = 0; r < N; r++)
            for (int k = 0; k < N; k++) begin
              int c;
              @(negedge clk);
              ta = DMSM_IDLE; ta.shift_en = 1; ta.in_sel = 1; ta.shift_sel = idx_t'(r); ta.out_sel = idx_t'(r);
              c = N - 1 - k;
              #1 chk(da == rs[r > c ? r - c : c - r] && db == rn[r > c ? r - c : c - r],
                     $sformatf("Toeplitz entry (%0d,%0d)", r, c));
            end
          @(negedge clk); ta = DMSM_IDLE; tb_own = 0;
        end
        md[m] = 1; @(negedge clk); md[m] = 0;
      end
      @(negedge clk);
      chk(done, "done after Mode IV");
      @(negedge clk);
      chk(mode == MODE_IDLE, "idle afterwards");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
