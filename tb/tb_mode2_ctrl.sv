// tb_mode2_ctrl: self-checking test of the Mode II controller (N = 8) with
// the shift memories A and B, the gain unit and FIFO G. Random diagonal
// entries (and off-diagonal clutter that must be ignored) are loaded; after
// the mode FIFO G must hold the gains the testbench computes from the
// diagonals, and both memories must be unchanged.
module tb_mode2_ctrl;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, done;
  dmsm_req_t ma, mb, ta = DMSM_IDLE, tb_ = DMSM_IDLE, ra, rb;
  word_t da, db;
  logic gu_start, gu_valid, gu_ready, gu_out_valid, gu_done;
  word_t gu_d1, gu_d2, gu_g;
  logic g_clear, g_wr, g_full, rd_start = 0, rd_next = 0;
  word_t g_data, g_rd;
  logic tb_own = 1;
  int checks = 0, failures = 0;
  word_t am [N][N], bm [N][N];
  always #5 clk = ~clk;

  assign ra = tb_own ? ta : ma;
  assign rb = tb_own ? tb_ : mb;
  dmsm #(.N(N)) u_a (.clk, .req(ra), .data_out(da));
  dmsm #(.N(N)) u_b (.clk, .req(rb), .data_out(db));
  gain_unit #(.N(N)) u_gain (.clk, .rst_n, .mu0_load(1'b0), .mu0_in(16'd0), .start(gu_start),
    .in_valid(gu_valid), .in_ready(gu_ready), .d1(gu_d1), .d2(gu_d2), .out_valid(gu_out_valid),
    .g(gu_g), .mu(), .done(gu_done));
  frame_fifo #(.DEPTH(N)) u_g (.clk, .rst_n, .clear(g_clear), .wr_en(g_wr), .wr_data(g_data),
    .rd_start, .rd_rev(1'b0), .rd_next, .rd_data(g_rd), .full(g_full));
  mode2_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .done, .req_a(ma), .req_b(mb), .dout_a(da), .dout_b(db),
    .gu_start, .gu_valid, .gu_ready, .gu_d1, .gu_d2, .gu_out_valid, .gu_g, .gu_done, .g_clear, .g_wr, .g_data);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      longint lam [N], sum, mu, g;
      foreach (am[i, j]) begin am[i][j] = word_t'($urandom); bm[i][j] = word_t'($urandom); end
      sum = 0;
      for (int i = 0; i < N; i++) begin
        bm[i][i] = word_t'($urandom_range(100, 3000));
        am[i][i] = word_t'($urandom_range(0, 9000));
        lam[i] = am[i][i] > bm[i][i] ? ((longint'(am[i][i]) - bm[i][i]) << 8) / bm[i][i] : 0;
        if (lam[i] > 65535) lam[i] = 65535;
        sum += lam[i];
      end
      mu = (sum >> 3) >= 1024 ? 0 : 1024 - (sum >> 3);
      tb_own = 1;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          ta = DMSM_IDLE; ta.shift_en = 1; ta.shift_sel = idx_t'(r); tb_ = ta;
          ta.din = am[r][N-1-k]; tb_.din = bm[r][N-1-k];
        end
      @(negedge clk); ta = DMSM_IDLE; tb_ = DMSM_IDLE; tb_own = 0;
      start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      chk(g_full, "FIFO G holds a frame");
      rd_start = 1; @(negedge clk); rd_start = 0;
      for (int i = 0; i < N; i++) begin
        g = (lam[i] + mu == 0) ? 0 : (lam[i] << 15) / (lam[i] + mu);
        if (g > 32767) g = 32767;
        chk(longint'(g_rd) == g, $sformatf("frame %0d gain %0d: got %0d expected %0d", f, i, g_rd, g));
        rd_next = 1; @(negedge clk); rd_next = 0;
      end
      tb_own = 1;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          ta = DMSM_IDLE; ta.shift_en = 1; ta.in_sel = 1; ta.shift_sel = idx_t'(r); ta.out_sel = idx_t'(r); tb_ = ta;
          #1 chk(da == am[r][N-1-k] && db == bm[r][N-1-k], "memories unchanged");
        end
      @(negedge clk); ta = DMSM_IDLE; tb_ = DMSM_IDLE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
