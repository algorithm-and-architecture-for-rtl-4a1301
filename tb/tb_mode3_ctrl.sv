// tb_mode3_ctrl: self-checking test of the Mode III controller (N = 8) with
// shift memories V and Tmp, FIFOs G and Y and the MAC unit. With random V, g
// and y it checks Tmp = V.diag(g) and FIFO G = V^T.y word by word against
// integer arithmetic in the testbench (Q1.15, products shifted right by 15
// and saturated), and the mode's time, 2N(N+2) + 2 clocks.
module tb_mode3_ctrl;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, done;
  dmsm_req_t mv, mt, tv = DMSM_IDLE, tt = DMSM_IDLE, rv, rt;
  word_t dv, dt;
  logic g_clear, g_wr, g_rd_start, g_rd_rev, g_rd_next, y_rd_start, y_rd_rev, y_rd_next;
  word_t g_data, g_rd_data, y_rd_data;
  logic mac_valid, mac_clr;
  word_t mac_d0, mac_d1;
  acc_t mac_acc;
  logic tb_own = 1;
  logic t_clear = 0, t_wr = 0, t_rd_start = 0, t_rd_next = 0, ty_wr = 0;
  word_t t_wdata = 0;
  int checks = 0, failures = 0;
  word_t vm [N][N], gv [N], yv [N];
  always #5 clk = ~clk;

  assign rv = tb_own ? tv : mv;
  assign rt = tb_own ? tt : mt;
  dmsm #(.N(N)) u_v (.clk, .req(rv), .data_out(dv));
  dmsm #(.N(N)) u_t (.clk, .req(rt), .data_out(dt));
  frame_fifo #(.DEPTH(N)) u_g (.clk, .rst_n, .clear(tb_own ? t_clear : g_clear), .wr_en(tb_own ? t_wr : g_wr),
    .wr_data(tb_own ? t_wdata : g_data), .rd_start(tb_own ? t_rd_start : g_rd_start), .rd_rev(tb_own ? 1'b0 : g_rd_rev),
    .rd_next(tb_own ? t_rd_next : g_rd_next), .rd_data(g_rd_data), .full());
  frame_fifo #(.DEPTH(N)) u_y (.clk, .rst_n, .clear(t_clear), .wr_en(ty_wr), .wr_data(t_wdata),
    .rd_start(y_rd_start), .rd_rev(y_rd_rev), .rd_next(y_rd_next), .rd_data(y_rd_data), .full());
  mac_unit u_mac (.clk, .rst_n, .in_valid(mac_valid), .acc_clr(mac_clr), .data_in0(mac_d0), .data_in1(mac_d1),
    .acc_out(mac_acc), .out_valid());
  mode3_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .done, .req_v(mv), .req_t(mt), .dout_v(dv),
    .g_clear, .g_wr, .g_data, .g_rd_start, .g_rd_rev, .g_rd_next, .g_rd_data,
    .y_rd_start, .y_rd_rev, .y_rd_next, .y_rd_data, .mac_valid, .mac_clr, .mac_d0, .mac_d1, .mac_acc);

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

  function automatic word_t satq(input longint v);
    longint s;
    s = v >>> 15;
    return word_t'(s > 32767 ? 32767 : (s < -32768 ? -32768 : s));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int cyc;
      foreach (vm[i, j]) vm[i][j] = word_t'($urandom);
      for (int i = 0; i < N; i++) begin
        gv[i] = word_t'($urandom_range(0, 32767)); yv[i] = word_t'($urandom);
        if (f == 1) begin gv[i] = 16'sh7fff; yv[i] = 16'sh7fff; vm[i][0] = 16'sh7fff; end
      end
      tb_own = 1;
      @(negedge clk); t_clear = 1; @(negedge clk); t_clear = 0;
      for (int i = 0; i < N; i++) begin t_wr = 1; t_wdata = gv[i]; @(negedge clk); end
      t_wr = 0;
      for (int i = 0; i < N; i++) begin ty_wr = 1; t_wdata = yv[i]; @(negedge clk); end
      ty_wr = 0;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          tv = DMSM_IDLE; tv.shift_en = 1; tv.shift_sel = idx_t'(r); tv.din = vm[r][N-1-k];
        end
      @(negedge clk); tv = DMSM_IDLE;
      t_rd_start = 1; @(negedge clk); t_rd_start = 0;
      tb_own = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(cyc == 2 * N * (N + 2) + 2 + 1, $sformatf("mode time %0d clocks", cyc));
      tb_own = 1;
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          word_t e;
          @(negedge clk);
          tt = DMSM_IDLE; tt.shift_en = 1; tt.in_sel = 1; tt.shift_sel = idx_t'(r); tt.out_sel = idx_t'(r);
          e = satq(longint'(vm[r][N-1-k]) * gv[N-1-k]);
          #1 chk(dt == e, $sformatf("Tmp[%0d][%0d] got %0d expected %0d", r, N-1-k, dt, e));
        end
      @(negedge clk); tt = DMSM_IDLE;
      t_rd_start = 1; @(negedge clk); t_rd_start = 0;
      for (int j = 0; j < N; j++) begin
        longint s;
        s = 0;
        for (int i = 0; i < N; i++) s += longint'(vm[i][j]) * yv[i];
        chk(g_rd_data == satq(s), $sformatf("z[%0d] got %0d expected %0d", j, g_rd_data, satq(s)));
        t_rd_next = 1; @(negedge clk); t_rd_next = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
