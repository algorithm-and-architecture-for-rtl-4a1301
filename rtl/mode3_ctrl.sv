// mode3_ctrl: memory controller Mode III, the two products that prepare the
// filtering of the frame.
//
// Step 1, Tmp <- V.G: for every column j, column j of DMSM V is rotated once
// (N clocks) and each word v_ij is multiplied in the MAC by g_j, the j-th
// word of FIFO G (a new sum per word); two clocks later the Q1.15 product
// enters column j of DMSM Tmp through its shift port, so Tmp's column j is
// written in the order V's was read. Step 2, G <- V^T.Y: FIFO G is cleared;
// for every column j, column j of V is rotated again while FIFO Y is read
// from its newest word backwards (the rotation delivers rows N-1 .. 0), the
// MAC sums v_ij y_i over the column, and the Q1.15 result z_j is written to
// FIFO G. Each column takes N+2 clocks, so the mode takes 2N(N+2)+2 clocks.
// done pulses at the end.
// The two products, their operands and destinations follow the reference
// flow chart; operand order and scaling (results >> 15, saturated) are this
// design's.
module mode3_ctrl
  import sd_pkg::*;
#(
  parameter int N = 256
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      done,
  output dmsm_req_t req_v,
  output dmsm_req_t req_t,
  input  word_t     dout_v,
  // FIFO G
  output logic      g_clear,
  output logic      g_wr,
  output word_t     g_data,
  output logic      g_rd_start,
  output logic      g_rd_rev,
  output logic      g_rd_next,
  input  word_t     g_rd_data,
  // FIFO Y
  output logic      y_rd_start,
  output logic      y_rd_rev,
  output logic      y_rd_next,
  input  word_t     y_rd_data,
  // MAC
  output logic      mac_valid,
  output logic      mac_clr,
  output word_t     mac_d0,
  output word_t     mac_d1,
  input  acc_t      mac_acc
);
  localparam int KW = $clog2(N + 3);
  typedef enum logic [2:0] {T_IDLE, T_VG, T_CLR, T_VY, T_DONE} m3state_e;
  m3state_e      st;
  logic [KW-1:0] j, k;
  word_t         prod;

  assign prod = sat_w(64'(mac_acc >>> FRAC));

  assign g_rd_rev   = 1'b0;
  assign g_rd_start = (st == T_IDLE) && start;
  assign g_rd_next  = (st == T_VG) && (k == KW'(N + 1));
  assign g_clear    = (st == T_CLR);
  assign g_wr       = (st == T_VY) && (k == KW'(N + 1));
  assign g_data     = prod;
  assign y_rd_rev   = 1'b1;
  assign y_rd_start = (st == T_CLR) || ((st == T_VY) && (k == KW'(N + 1)));
  assign y_rd_next  = (st == T_VY) && (k < KW'(N));

  assign mac_valid = ((st == T_VG) || (st == T_VY)) && (k < KW'(N));
  assign mac_clr   = (st == T_VG) || (k == '0);
  assign mac_d0    = dout_v;
  assign mac_d1    = (st == T_VG) ? g_rd_data : y_rd_data;

  always_comb begin
    req_v = DMSM_IDLE;
    req_v.shift_en  = mac_valid;
    req_v.vert      = 1'b1;
    req_v.in_sel    = 1'b1;
    req_v.out_sel   = idx_t'(j);
    req_v.shift_sel = idx_t'(j);
    req_t = DMSM_IDLE;
    req_t.shift_en  = (st == T_VG) && (k >= KW'(2));
    req_t.vert      = 1'b1;
    req_t.in_sel    = 1'b0;
    req_t.shift_sel = idx_t'(j);
    req_t.out_sel   = idx_t'(j);
    req_t.din       = prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; j <= '0; k <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        T_IDLE: if (start) begin j <= '0; k <= '0; st <= T_VG; end
        T_VG: if (k == KW'(N + 1)) begin
          k <= '0;
          if (j == KW'(N - 1)) begin j <= '0; st <= T_CLR; end
          else j <= j + 1'b1;
        end else k <= k + 1'b1;
        T_CLR: st <= T_VY;
        T_VY: if (k == KW'(N + 1)) begin
          k <= '0;
          if (j == KW'(N - 1)) st <= T_DONE;
          else j <= j + 1'b1;
        end else k <= k + 1'b1;
        T_DONE: begin done <= 1'b1; st <= T_IDLE; end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
