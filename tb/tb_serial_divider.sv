// tb_serial_divider: self-checking test of the serial divider: random and
// corner-case divisions compared with the testbench's integer division, the
// latency (NUM_W + 2 clocks from start to done) and the zero-divisor rule.
module tb_serial_divider;
  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;   // a falling edge so the asynchronous reset is applied
  logic [31:0] num = 0, q;
  logic [23:0] den = 0;
  logic [24:0] rem;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  serial_divider #(.NUM_W(32), .DEN_W(24)) dut (.clk, .rst_n, .start, .dividend(num), .divisor(den),
    .quotient(q), .remainder(rem), .busy, .done);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int cyc;
      @(negedge clk);
      num = $urandom; den = 24'($urandom);
      if (t % 4 == 1) den = 24'($urandom_range(1, 300));
      if (t % 7 == 2) num = 32'($urandom_range(0, 1000));
      if (t == 5) den = 0;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (den == 0) begin
        if (q !== '1) begin failures++; $display("zero divisor: q=%h", q); end
      end else if (q !== num / den || rem !== 25'(num % den)) begin
        failures++; $display("%0d / %0d: got q=%0d r=%0d", num, den, q, rem);
      end
      if (den != 0) begin
        checks++;
        if (cyc != 34) begin failures++; $display("latency %0d clocks, expected 34", cyc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
