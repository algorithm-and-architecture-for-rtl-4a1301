// tb_dmsm: self-checking test of the row/column shift memory (N = 8).
// Writes a random matrix row by row through the shift port, reads every row
// and every column back by rotation (checking that a rotation leaves the
// contents unchanged), overwrites one column and checks the whole matrix, and
// shifts one row while reading another (the two ports at once).
module tb_dmsm;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0;
  dmsm_req_t req = DMSM_IDLE;
  word_t dout;
  word_t ref_m [N][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dmsm #(.N(N)) dut (.clk, .req, .data_out(dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic read_all();
    // rows
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        req = DMSM_IDLE; req.shift_en = 1; req.in_sel = 1; req.vert = 0;
        req.out_sel = idx_t'(r); req.shift_sel = idx_t'(r);
        #1 check(dout, ref_m[r][N-1-k], $sformatf("row %0d col %0d", r, N-1-k));
      end
    // columns
    for (int c = 0; c < N; c++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        req = DMSM_IDLE; req.shift_en = 1; req.in_sel = 1; req.vert = 1;
        req.out_sel = idx_t'(c); req.shift_sel = idx_t'(c);
        #1 check(dout, ref_m[N-1-k][c], $sformatf("col %0d row %0d", c, N-1-k));
      end
    @(negedge clk); req = DMSM_IDLE;
  endtask

  initial begin
    foreach (ref_m[r, c]) ref_m[r][c] = word_t'($urandom);
    // write rows: the first word written ends in column N-1
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        req = DMSM_IDLE; req.shift_en = 1; req.in_sel = 0; req.vert = 0;
        req.shift_sel = idx_t'(r); req.din = ref_m[r][N-1-k];
      end
    @(negedge clk); req = DMSM_IDLE;
    read_all();
    // overwrite column 3 through the vertical shift
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      req = DMSM_IDLE; req.shift_en = 1; req.vert = 1; req.shift_sel = 3;
      ref_m[N-1-k][3] = word_t'($urandom);
      req.din = ref_m[N-1-k][3];
    end
    @(negedge clk); req = DMSM_IDLE;
    read_all();
    // dual port: read row 5's end word while row 2 shifts
    @(negedge clk);
    req = DMSM_IDLE; req.shift_en = 1; req.vert = 0; req.shift_sel = 2; req.out_sel = 5; req.din = 16'sd1234;
    #1 check(dout, ref_m[5][N-1], "dual-port read");
    for (int c = N - 1; c > 0; c--) ref_m[2][c] = ref_m[2][c-1];
    ref_m[2][0] = 16'sd1234;
    @(negedge clk); req = DMSM_IDLE;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
