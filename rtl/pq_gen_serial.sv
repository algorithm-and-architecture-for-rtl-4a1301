// pq_gen_serial: look-up-table based serial generator of the Jacobi index
// pairs (P, Q).
//
// A single table of depth n(n-1)/2 holds the pairs in cyclic-by-rows order,
//     (0,1), (0,2), ..., (0,n-1), (1,2), ..., (n-2,n-1),
// the order of the sweep loop "for p, for q > p" of the algorithm. A linear
// address counter, cleared by clr and advanced by inc, reads the table; last
// flags the final pair of a sweep and the counter wraps to 0 after it.
// The table is filled at start-up from that rule (entry {p, q}, 8 bits
// each), which is what the LUT of the reference design holds; p and q are
// combinational from the address register.
module pq_gen_serial
  import sd_pkg::*;
#(
  parameter int N = 256
)(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic inc,
  output idx_t p,
  output idx_t q,
  output logic last
);
  localparam int NP = N * (N - 1) / 2;
  localparam int AW = $clog2(NP + 1);
  // table contents, written once at start-up (a ROM after synthesis)
  logic [2*IDX_W-1:0] lut [NP];
  initial begin
    automatic int a = 0;
    for (int i = 0; i < N - 1; i++)
      for (int j = i + 1; j < N; j++) begin
        lut[a] = {idx_t'(i), idx_t'(j)};
        a++;
      end
  end

  logic [AW-1:0] addr;

  assign {p, q} = lut[addr];
  assign last   = (addr == AW'(NP - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (clr) addr <= '0;
    else if (inc) addr <= last ? '0 : addr + 1'b1;
  end
endmodule
