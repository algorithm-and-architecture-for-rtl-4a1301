// tb_mode4_ctrl: self-checking test of the Mode IV controller (N = 8, 25 %
// overlap, so 2 overlapping and 6 output samples per frame) with shift memory
// Tmp, FIFO G and the MAC. Three frames with random Tmp and z are run; every
// output sample is compared with x = Tmp.z computed in the testbench plus the
// tail kept from the previous frame; the frame time, N(N+3) + 2 clocks, is
// checked.
module tb_mode4_ctrl;
  import sd_pkg::*;
  localparam int N = 8, OV = 2, H = N - OV;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, done;
  dmsm_req_t mt, tt = DMSM_IDLE, rt;
  word_t dt;
  logic g_rd_start, g_rd_rev, g_rd_next, mac_valid, mac_clr, out_valid;
  word_t g_rd_data, mac_d0, mac_d1, out_data;
  acc_t mac_acc;
  logic tb_own = 1, t_clear = 0, t_wr = 0;
  word_t t_wdata = 0;
  int checks = 0, failures = 0;
  int n_out;
  word_t exp_out [H];
  always #5 clk = ~clk;

  assign rt = tb_own ? tt : mt;
  dmsm #(.N(N)) u_t (.clk, .req(rt), .data_out(dt));
  frame_fifo #(.DEPTH(N)) u_g (.clk, .rst_n, .clear(t_clear), .wr_en(t_wr), .wr_data(t_wdata),
    .rd_start(g_rd_start), .rd_rev(g_rd_rev), .rd_next(g_rd_next), .rd_data(g_rd_data), .full());
  mac_unit u_mac (.clk, .rst_n, .in_valid(mac_valid), .acc_clr(mac_clr), .data_in0(mac_d0), .data_in1(mac_d1),
    .acc_out(mac_acc), .out_valid());
  mode4_ctrl #(.N(N), .OVERLAP_PCT(25)) dut (.clk, .rst_n, .start, .done, .req_t(mt), .dout_t(dt),
    .g_rd_start, .g_rd_rev, .g_rd_next, .g_rd_data, .mac_valid, .mac_clr, .mac_d0, .mac_d1, .mac_acc,
    .out_valid, .out_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t sat(input longint s);
    return word_t'(s > 32767 ? 32767 : (s < -32768 ? -32768 : s));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (n_out >= H || out_data != exp_out[n_out]) begin
      failures++; $display("sample %0d: got %0d expected %0d", n_out, out_data, exp_out[n_out]);
    end
    n_out++;
  end

  initial begin
    word_t tail [OV];
    foreach (tail[i]) tail[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      word_t tm [N][N], z [N], x [N];
      int cyc;
      foreach (tm[i, j]) tm[i][j] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      foreach (z[i]) z[i] = word_t'(int'($urandom_range(0, 16000)) - 8000);
      if (f == 2) begin tm[0][0] = 16'sh7fff; tm[0][1] = 16'sh7fff; z[0] = 16'sh7fff; z[1] = 16'sh7fff; end
      for (int i = 0; i < N; i++) begin
        longint s;
        s = 0;
        for (int j = 0; j < N; j++) s += longint'(tm[i][j]) * z[j];
        x[i] = sat(s >>> 15);
      end
      for (int i = 0; i < H; i++) exp_out[i] = (i < OV) ? sat(longint'(x[i]) + tail[i]) : x[i];
      for (int i = 0; i < OV; i++) tail[i] = x[H + i];
      tb_own = 1;
      @(negedge clk); t_clear = 1; @(negedge clk); t_clear = 0;
      for (int i = 0; i < N; i++) begin t_wr = 1; t_wdata = z[i]; @(negedge clk); end
      t_wr = 0;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          tt = DMSM_IDLE; tt.shift_en = 1; tt.shift_sel = idx_t'(r); tt.din = tm[r][N-1-k];
        end
      @(negedge clk); tt = DMSM_IDLE; tb_own = 0;
      n_out = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (n_out != H) begin failures++; $display("frame %0d: %0d samples", f, n_out); end
      if (cyc != N * (N + 3) + 2) begin failures++; $display("frame %0d: %0d clocks", f, cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
