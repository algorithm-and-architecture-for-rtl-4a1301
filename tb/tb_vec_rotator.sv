// tb_vec_rotator: self-checking test of the gain-compensated element-pair
// rotator (R = 20). For random pairs and random direction vectors the output
// is compared with an exact plane rotation by theta = sum_i d_i atan(2^-i)
// computed in real arithmetic; the error must stay within 3 LSB.
module tb_vec_rotator;
  import sd_pkg::*;
  localparam int R = 20;
  word_t x, y, xr, yr;
  logic [R-1:0] dir_neg;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  logic clk = 0;
  always #5 clk = ~clk;

  vec_rotator #(.R(R)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real maxerr;
    maxerr = 0;
    for (int t = 0; t < 2000; t++) begin
      real th, ex, ey, c, s;
      x = word_t'(int'($urandom_range(0, 44000)) - 22000);
      y = word_t'(int'($urandom_range(0, 44000)) - 22000);
      dir_neg = R'($urandom);
      if (t == 0) dir_neg = '0;
      th = 0;
      for (int i = 0; i < R; i++) th += (dir_neg[i] ? -1.0 : 1.0) * $atan(2.0 ** (-i));
      c = $cos(th); s = $sin(th);
      ex = x * c - y * s;
      ey = x * s + y * c;
      @(negedge clk);
      checks += 2;
      if (fabs(real'(xr) - ex) > 3.0) begin failures++; $display("x: got %0d expected %f", xr, ex); end
      if (fabs(real'(yr) - ey) > 3.0) begin failures++; $display("y: got %0d expected %f", yr, ey); end
      if (fabs(real'(xr) - ex) > maxerr) maxerr = fabs(real'(xr) - ex);
    end
    $display("largest error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
