// tb_mac_unit: self-checking test of the MAC unit. Random sums of random
// length are fed back to back (acc_clr on each first pair); each result is
// compared with a sum computed in the testbench, two clocks after the last
// pair, which also checks the pipeline latency.
module tb_mac_unit;
  import sd_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic in_valid = 0, acc_clr = 0;
  word_t d0 = 0, d1 = 0;
  acc_t acc;
  logic ov;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mac_unit dut (.clk, .rst_n, .in_valid, .acc_clr, .data_in0(d0), .data_in1(d1), .acc_out(acc), .out_valid(ov));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_sum;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int len;
      len = 1 + $urandom_range(0, 20);
      exp_sum = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_valid = 1; acc_clr = (i == 0);
        d0 = word_t'($urandom); d1 = word_t'($urandom);
        if (t % 3 == 0) begin d0 = 16'sh8000; d1 = 16'sh8000; end
        exp_sum += longint'(d0) * longint'(d1);
      end
      @(negedge clk); in_valid = 0; acc_clr = 0;
      @(negedge clk);
      checks++;
      if (acc !== acc_t'(exp_sum)) begin
        failures++;
        $display("sum %0d: got %0d expected %0d", t, acc, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
