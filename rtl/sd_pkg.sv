// sd_pkg: shared types, constants and helper functions of the subspace
// speech enhancement processor.
//
// All datapath words are 16-bit two's complement fixed point (Q1.15 unless a
// port says otherwise), as in the 16-bit data path of the reference design.
// Matrix indices are carried on 8-bit buses, enough for the 256 x 256
// matrices of the full-band configuration (log2(256) = 8 address bits).
// The DMSM request bundle (dmsm_req_t) is the control/address/data port of one
// dual-port row/column shift memory; every controller that drives a DMSM
// produces one of these and the top level selects the active one.
// Lint note: linted on its own, the package reports FRAC, DMSM_IDLE and ONE_Q15
// as unused; the modules and testbenches that import it use them.
package sd_pkg;

  localparam int W      = 16;        // data path width
  localparam int IDX_W  = 8;         // row/column index width (n <= 256)
  localparam int PE_W   = 32;        // internal CORDIC PE word width
  localparam int ACC_W  = 40;        // MAC accumulator width
  localparam int FRAC   = 15;        // fractional bits of a Q1.15 word

  typedef logic signed [W-1:0]     word_t;
  typedef logic [IDX_W-1:0]        idx_t;
  typedef logic signed [PE_W-1:0]  peword_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // One DMSM access: shift_en shifts the row (vert=0) or column (vert=1)
  // addressed by shift_sel by one place; the word entering it is din
  // (in_sel=0) or the memory's own output (in_sel=1, rotate). out_sel
  // addresses the row/column whose end word is on data_out.
  typedef struct packed {
    logic  shift_en;
    logic  vert;
    logic  in_sel;
    idx_t  out_sel;
    idx_t  shift_sel;
    word_t din;
  } dmsm_req_t;

  localparam dmsm_req_t DMSM_IDLE = '{shift_en: 1'b0, vert: 1'b0, in_sel: 1'b0,
                                      out_sel: '0, shift_sel: '0, din: '0};

  // Memory controller modes (value of the Mode status register).
  typedef enum logic [2:0] {
    MODE_IDLE  = 3'd0,
    MODE_LOAD  = 3'd5,   // Toeplitz build of DMSM A and B
    MODE_I     = 3'd1,   // simultaneous diagonalization
    MODE_II    = 3'd2,   // gain computation
    MODE_III   = 3'd3,   // Tmp = V.G and G = V^T.Y
    MODE_IV    = 3'd4    // output = Tmp.G, overlap-add
  } mem_mode_e;

  // Q1.15 value 1.0 saturated to the largest positive word.
  localparam word_t ONE_Q15 = 16'sh7FFF;

  // Saturate a wide signed value to a 16-bit word.
  function automatic word_t sat_w(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sh7FFF;
    else if (v < -64'sd32768) return 16'sh8000;
    else                      return word_t'(v[W-1:0]);
  endfunction

  // Constant of the gain compensation applied after R CORDIC iterations:
  // round(2^15 * prod_{i=0}^{R-1} 1/sqrt(1+2^-2i)), for one side of a rotation.
  function automatic int cordic_gain_q15(input int r);
    real g;
    g = 1.0;
    for (int i = 0; i < r; i++) g = g / $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return int'(g * 32768.0 + 0.5);
  endfunction

endpackage
