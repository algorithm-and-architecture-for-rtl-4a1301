// pe_chain: R cascaded CORDIC processing elements, one row of the parallel
// diagonalization array. PE number i performs CORDIC iteration i (shift 2^-i),
// so the chain completes one simultaneous Jacobi rotation of the two 2x2
// (p,q) blocks it is given and records the R rotation directions.
//
// Input: eight 16-bit words on in_valid/in_data (a1pp, a1pq, a1qp, a1qq, a2pp,
// a2pq, a2qp, a2qq), widened to PE_W bits with GUARD fractional guard bits.
// Output: dir_neg[i] is the direction chosen by PE i (1 = negative); the
// rotated blocks leave the last PE on out_valid/out_data (PE_W bits, still
// carrying the guard bits and the uncompensated CORDIC gain); done pulses when
// the last PE has finished. Latency is 13 clocks per PE after the first word,
// plus 9.
// Cascading one PE per CORDIC iteration is the reference arrangement; the
// guard bits are this design's choice.
// Lint note: only the last PE's done is needed; the per-stage done outputs
// (pe_done) are collected but unused, and the tools report them.
module pe_chain
  import sd_pkg::*;
#(
  parameter int R     = 20,
  parameter int GUARD = 8
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  word_t        in_data,
  output logic         out_valid,
  output peword_t      out_data,
  output logic [R-1:0] dir_neg,
  output logic         done
);
  logic    v    [R+1];
  peword_t d    [R+1];
  logic    dn   [R];

  assign v[0] = in_valid;
  assign d[0] = peword_t'(in_data) <<< GUARD;

  for (genvar i = 0; i < R; i++) begin : g_pe
    logic pe_done;
    cordic_pe #(.SHIFT(i)) u_pe (
      .clk, .rst_n, .in_valid(v[i]), .in_data(d[i]),
      .out_valid(v[i+1]), .out_data(d[i+1]), .dir_neg(dn[i]), .done(pe_done));
    assign dir_neg[i] = dn[i];
    if (i == R - 1) begin : g_last
      assign done = pe_done;
    end
  end

  assign out_valid = v[R];
  assign out_data  = d[R];
endmodule
