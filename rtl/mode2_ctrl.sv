// mode2_ctrl: memory controller Mode II, computation of the gain matrix.
//
// For i = 0..N-1 it rotates row i of DMSM A and of DMSM B once (N clocks,
// contents unchanged) and picks the diagonal words a_ii and b_ii as they pass
// the output (clock N-1-i of the rotation). Each pair is handed to the gain
// unit with a valid/ready handshake. The gain unit returns the N gains of the
// diagonal gain matrix after the last pair; each is written into FIFO G,
// which is cleared when the mode starts. done pulses after the gain unit's
// done. Time: about N*(N+36) + 36*N clocks.
// The sequence (load the gain unit with the eigenvalues from the DMSM, compute
// the gain matrix, store it in FIFO G) follows the reference flow chart; the
// diagonal read by row rotation is this design's.
module mode2_ctrl
  import sd_pkg::*;
#(
  parameter int N = 256
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      done,
  output dmsm_req_t req_a,
  output dmsm_req_t req_b,
  input  word_t     dout_a,
  input  word_t     dout_b,
  // gain unit
  output logic      gu_start,
  output logic      gu_valid,
  input  logic      gu_ready,
  output word_t     gu_d1,
  output word_t     gu_d2,
  input  logic      gu_out_valid,
  input  word_t     gu_g,
  input  logic      gu_done,
  // FIFO G
  output logic      g_clear,
  output logic      g_wr,
  output word_t     g_data
);
  localparam int KW = $clog2(N + 1);
  typedef enum logic [2:0] {M_IDLE, M_RD, M_SEND, M_WAIT, M_DONE} m2state_e;
  m2state_e      st;
  logic [KW-1:0] i, k;

  assign gu_start = (st == M_IDLE) && start;
  assign g_clear  = gu_start;
  assign gu_valid = (st == M_SEND);
  assign g_wr     = gu_out_valid;
  assign g_data   = gu_g;

  always_comb begin
    req_a = DMSM_IDLE;
    req_a.shift_en  = (st == M_RD);
    req_a.in_sel    = 1'b1;
    req_a.out_sel   = idx_t'(i);
    req_a.shift_sel = idx_t'(i);
    req_b = req_a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; i <= '0; k <= '0; gu_d1 <= '0; gu_d2 <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        M_IDLE: if (start) begin i <= '0; k <= '0; st <= M_RD; end
        M_RD: begin
          if (k == KW'(N - 1) - i) begin gu_d1 <= dout_a; gu_d2 <= dout_b; end
          if (k == KW'(N - 1)) begin k <= '0; st <= M_SEND; end
          else k <= k + 1'b1;
        end
        M_SEND: if (gu_ready) begin
          if (i == KW'(N - 1)) st <= M_WAIT;
          else begin i <= i + 1'b1; st <= M_RD; end
        end
        M_WAIT: if (gu_done) st <= M_DONE;
        M_DONE: begin done <= 1'b1; st <= M_IDLE; end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
