// dmsm: dual-port multiple row/column shift memory holding one n x n matrix.
//
// Every cell is a register with load enable whose input is taken either from
// its left neighbour (row operation) or from the neighbour above (column
// operation). A shift on row r moves every word of that row one column to the
// right, the word at column n-1 leaves, and the input word enters at column 0;
// a column shift does the same downwards. The input word is data_in
// (in_sel=0) or the memory's own data_out (in_sel=1), so n shifts with
// in_sel=1 rotate a row or column back to where it started while every word
// passes the output: the memory's read, write, shift and rotate primitives.
// data_out is the end word of the row (column n-1) or column (row n-1)
// addressed by out_sel, through one n-to-1 multiplexer. Reads (out_sel) and
// shifts (shift_sel) use separate addresses: the two ports of the memory.
//
// Timing: data_out is combinational from out_sel/vert and the cell contents;
// a shift takes effect at the clock edge. Streaming a row with rotate gives the
// words of columns n-1, n-2, ..., 0 in that order; writing n words by shifting
// leaves the first word written in column n-1.
// The cell, the row/column select, the dual addressing and the 1-bit
// horizontal/vertical select follow the reference memory. The explicit
// shift_en strobe and the meaning of the 1-bit input select (external word or
// recirculated output) are this design's choices. The cells have no reset;
// controllers write every word before it is read.
module dmsm
  import sd_pkg::*;
#(
  parameter int N = 256            // matrix order, n <= 2**IDX_W
)(
  input  logic      clk,
  input  dmsm_req_t req,
  output word_t     data_out
);
  word_t mem [N][N];
  word_t din;
  // Row/column selects cut to the width the array needs (N a power of two).
  localparam int LOGN = $clog2(N);
  logic [LOGN-1:0] osel, ssel;
  assign osel = req.out_sel[LOGN-1:0];
  assign ssel = req.shift_sel[LOGN-1:0];

  initial assert (N >= 2 && N <= (1 << IDX_W) && (1 << LOGN) == N) else $fatal(1, "dmsm: N out of range");

  always_comb begin
    if (req.vert) data_out = mem[N-1][osel];
    else          data_out = mem[osel][N-1];
  end

  assign din = req.in_sel ? data_out : req.din;

  always_ff @(posedge clk) begin
    if (req.shift_en) begin
      if (!req.vert) begin
        for (int c = N - 1; c > 0; c--) mem[ssel][c] <= mem[ssel][c-1];
        mem[ssel][0] <= din;
      end else begin
        for (int r = N - 1; r > 0; r--) mem[r][ssel] <= mem[r-1][ssel];
        mem[0][ssel] <= din;
      end
    end
  end
endmodule
