// vec_rotator: applies a recorded simultaneous Jacobi rotation to one pair of
// matrix elements.
//
// A Jacobi rotation (p,q) changes the whole rows and columns p and q of both
// matrices and the columns p and q of the eigenvector matrix, not only the 2x2
// blocks the PE chain works on. After the chain has chosen the R directions,
// every element pair (x, y) = (element of line p, element of line q) is passed
// through this combinational unit:
//     for i = 0..R-1:  x <- x - d_i 2^-i y ;  y <- y + d_i 2^-i x
// (the same shift-and-add iteration as the PEs, with GUARD extra fractional
// bits), then both results are multiplied by the constant
// K = prod 1/sqrt(1+2^-2i) (Q1.15, 0.6073 for R = 20) to undo the CORDIC gain,
// rounded and saturated to 16 bits. A row step followed by a column step with
// this unit equals J^T A J with a gain-free J. The constant scaling is a
// fixed-coefficient product (shifts and adds after synthesis).
// The shift-and-add rotation is the reference algorithm; applying it to full
// rows and columns through this separate unit and compensating the gain once
// per rotation side are this design's choices (see the README).
module vec_rotator
  import sd_pkg::*;
#(
  parameter int R     = 20,
  parameter int GUARD = 8
)(
  input  word_t        x,
  input  word_t        y,
  input  logic [R-1:0] dir_neg,
  output word_t        xr,
  output word_t        yr
);
  localparam int                 KQ15 = cordic_gain_q15(R);
  localparam logic signed [63:0] KC   = 64'(KQ15);

  always_comb begin
    peword_t a, b, ta, tb;
    logic signed [63:0] pa, pb;
    a = peword_t'(x) <<< GUARD;
    b = peword_t'(y) <<< GUARD;
    for (int i = 0; i < R; i++) begin
      ta = a >>> i;
      tb = b >>> i;
      if (dir_neg[i]) begin a = a + tb; b = b - ta; end
      else            begin a = a - tb; b = b + ta; end
    end
    pa = (64'(a) * KC + (64'sd1 <<< (FRAC + GUARD - 1))) >>> (FRAC + GUARD);
    pb = (64'(b) * KC + (64'sd1 <<< (FRAC + GUARD - 1))) >>> (FRAC + GUARD);
    xr = sat_w(pa);
    yr = sat_w(pb);
  end
endmodule
