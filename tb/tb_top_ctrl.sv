// tb_top_ctrl: self-checking test of the frame controller (N = 4,
// VAD_SHIFT = 1). The testbench plays the autocorrelation unit and the memory
// controller. A sequence of frame energies checks the speech/pause decision
// (first frame noise; noise while r(0) < 2 * last noise energy), that the
// decision is given with lag 0 and held for the other lags, the input
// handshake (exactly N samples accepted), the start of the memory controller
// after the autocorrelation and frame_done after the memory controller.
module tb_top_ctrl;
  import sd_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic frame_start = 0, busy, frame_done, x_valid = 0, x_ready, y_clear, ac_start, ac_done = 0;
  logic r_valid = 0, r_is_noise, frame_is_noise, mc_start, mc_done = 0;
  idx_t r_lag = 0;
  word_t r_data = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  top_ctrl #(.N(N), .VAD_SHIFT(1)) dut (.*);

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
    int energy [8] = '{100, 150, 1000, 290, 700, 5000, 200, 50};
    logic expn [8] = '{1, 1, 0, 1, 0, 0, 1, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      int acc;
      @(negedge clk);
      chk(!busy, "idle between frames");
      frame_start = 1; #1 chk(ac_start && y_clear, "autocorrelation started");
      @(negedge clk); frame_start = 0;
      acc = 0;
      for (int t = 0; t < 8 * N && acc < N; t++) begin
        x_valid = $urandom_range(0, 1);
        #1 if (x_valid && x_ready) acc++;
        @(negedge clk);
      end
      for (int t = 0; t < 3; t++) begin
        x_valid = 1;
        #1 if (x_valid && x_ready) acc++;
        @(negedge clk);
      end
      x_valid = 0;
      chk(acc == N, $sformatf("frame %0d: %0d samples accepted", f, acc));
      for (int m = 0; m < N; m++) begin
        r_valid = 1; r_lag = idx_t'(m); r_data = word_t'(m == 0 ? energy[f] : 7);
        #1 chk(r_is_noise == expn[f], $sformatf("frame %0d lag %0d: decision %0d", f, m, r_is_noise));
        @(negedge clk);
      end
      r_valid = 0;
      chk(!mc_start, "memory controller waits for the autocorrelation");
      ac_done = 1; @(negedge clk); ac_done = 0;
      chk(mc_start && frame_is_noise == expn[f], "memory controller started, decision held");
      repeat ($urandom_range(0, 4)) begin @(negedge clk); chk(!frame_done, "frame waits"); end
      mc_done = 1; @(negedge clk); mc_done = 0;
      @(negedge clk);
      chk(frame_done, "frame_done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
