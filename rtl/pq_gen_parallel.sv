// pq_gen_parallel: look-up-table based parallel generator of Jacobi index
// pairs. n/2 tables of depth n-1 share one address counter; at address s the
// n/2 tables give the n/2 pairs of transform set s, which touch every index
// exactly once and can be rotated in parallel. The n-1 sets together cover all
// n(n-1)/2 pairs once.
//
// The sets follow the round-robin ("circle") ordering: index 0 is fixed and
// indices 1..n-1 rotate, set s holding (0, 1+s) and, for k = 1..n/2-1,
//     ( 1 + (s+k) mod (n-1),  1 + (s-k) mod (n-1) ),  smaller index first.
// For n = 4 this gives {(0,1),(2,3)}, {(0,2),(1,3)}, {(0,3),(1,2)}.
// clr clears the address, inc advances it; last flags set n-2 and the counter
// wraps to 0 after it. Outputs are combinational from the address register.
// The n/2 tables with one shared counter are the reference arrangement; the
// particular ordering is this design's choice of a valid parallel ordering.
module pq_gen_parallel
  import sd_pkg::*;
#(
  parameter int N = 256
)(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic inc,
  output idx_t p [N/2],
  output idx_t q [N/2],
  output logic last
);
  localparam int NS = N - 1;
  localparam int AW = $clog2(NS + 1);
  typedef logic [2*IDX_W-1:0] lut_t [NS];

  function automatic lut_t build_lut(input int k);
    lut_t t;
    int a, b;
    for (int s = 0; s < NS; s++) begin
      if (k == 0) begin a = 0; b = 1 + s; end
      else begin
        a = 1 + (s + k) % NS;
        b = 1 + (s - k + NS) % NS;
      end
      t[s] = (a < b) ? {idx_t'(a), idx_t'(b)} : {idx_t'(b), idx_t'(a)};
    end
    return t;
  endfunction

  logic [AW-1:0] addr;
  assign last = (addr == AW'(NS - 1));

  for (genvar k = 0; k < N / 2; k++) begin : g_lut
    localparam lut_t LUT = build_lut(k);
    assign {p[k], q[k]} = LUT[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (clr) addr <= '0;
    else if (inc) addr <= last ? '0 : addr + 1'b1;
  end
endmodule
