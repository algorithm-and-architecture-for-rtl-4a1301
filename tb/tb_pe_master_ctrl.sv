// tb_pe_master_ctrl: self-checking test of the PE master controller. The
// testbench plays the sign and execution controllers with random response
// delays and checks that start_s and start_e are held exactly until their
// done pulses, in order, and that done follows done_e by one clock.
module tb_pe_master_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic start = 0, done, start_s, done_s = 0, start_e, done_e = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pe_master_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int ds, de;
      ds = $urandom_range(0, 6); de = $urandom_range(0, 6);
      @(negedge clk);
      chk(!start_s && !start_e && !done, "idle outputs");
      start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < ds; i++) begin chk(start_s && !start_e, "start_s held"); @(negedge clk); end
      chk(start_s, "start_s before done_s");
      done_s = 1; @(negedge clk); done_s = 0;
      for (int i = 0; i < de; i++) begin chk(start_e && !start_s, "start_e held"); @(negedge clk); end
      chk(start_e, "start_e before done_e");
      done_e = 1; @(negedge clk); done_e = 0;
      chk(done && !start_e, "done after done_e");
      @(negedge clk);
      chk(!done, "done is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
