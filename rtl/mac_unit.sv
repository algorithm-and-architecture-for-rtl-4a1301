// mac_unit: multiply-and-accumulate unit used for every matrix product and
// for the autocorrelation sums of the speech processor.
//
// data_in0 * data_in1 is registered in a product pipeline register; one clock
// later the product is added to the accumulator. Asserting acc_clr together
// with the first operand pair of a sum makes that product start a new sum (the
// accumulator feedback is cleared synchronously), so back-to-back sums need no
// idle cycle. Latency: the sum including the pair presented in cycle t is on
// acc_out after the clock edge ending cycle t+1 (two register stages).
// The structure (multiplier, Z^-1 register, adder, accumulator with
// synchronous reset) follows the reference MAC; widths are this design's:
// 16x16 -> 32-bit product, 40-bit accumulator.
module mac_unit
  import sd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,   // operands valid this cycle
  input  logic  acc_clr,    // first pair of a new sum
  input  word_t data_in0,
  input  word_t data_in1,
  output acc_t  acc_out,
  output logic  out_valid   // acc_out was updated by the last edge
);
  logic signed [2*W-1:0] prod_q;
  logic                  prod_v, prod_clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q    <= '0;
      prod_v    <= 1'b0;
      prod_clr  <= 1'b0;
      acc_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      prod_q    <= data_in0 * data_in1;
      prod_v    <= in_valid;
      prod_clr  <= acc_clr;
      out_valid <= prod_v;
      if (prod_v) acc_out <= (prod_clr ? acc_t'(0) : acc_out) + acc_t'(prod_q);
    end
  end
endmodule
