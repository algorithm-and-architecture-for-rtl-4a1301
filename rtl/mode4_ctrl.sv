// mode4_ctrl: memory controller Mode IV, the enhanced frame and the
// overlap-add.
//
// For every row i, row i of DMSM Tmp is rotated once (N clocks, columns
// N-1..0) while FIFO G, which holds z = V^T.Y, is read from its newest word
// backwards; the MAC forms x_i = sum_j tmp_ij z_j, available two clocks after
// the row. The frame is combined with the previous one by overlap-add with
// OV = N*OVERLAP_PCT/100 overlapping samples: for i < N-OV the output
// x_i + tail_i (tail_i = 0 for i >= OV) leaves on out_valid/out_data; the last
// OV samples are kept as the tail for the next frame. Each row takes N+3
// clocks; done pulses at the end of the frame, N-OV samples having been sent.
// The product Tmp.G and the overlap-add with the previous frame follow the
// reference flow chart; the frame bookkeeping (each input frame of N samples
// starts N-OV samples after the previous one) is this design's reading.
module mode4_ctrl
  import sd_pkg::*;
#(
  parameter int N           = 256,
  parameter int OVERLAP_PCT = 25
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      done,
  output dmsm_req_t req_t,
  input  word_t     dout_t,
  // FIFO G
  output logic      g_rd_start,
  output logic      g_rd_rev,
  output logic      g_rd_next,
  input  word_t     g_rd_data,
  // MAC
  output logic      mac_valid,
  output logic      mac_clr,
  output word_t     mac_d0,
  output word_t     mac_d1,
  input  acc_t      mac_acc,
  // enhanced speech
  output logic      out_valid,
  output word_t     out_data
);
  localparam int OV = N * OVERLAP_PCT / 100;
  localparam int H  = N - OV;
  localparam int KW = $clog2(N + 3);
  localparam int TW = (OV > 1) ? $clog2(OV) : 1;
  typedef enum logic [1:0] {F_IDLE, F_ROW, F_DONE} m4state_e;
  m4state_e      st;
  logic [KW-1:0] i, k;
  word_t         tail [OV > 0 ? OV : 1];
  word_t         x;

  assign x          = sat_w(64'(mac_acc >>> FRAC));
  assign g_rd_rev   = 1'b1;
  assign g_rd_start = ((st == F_IDLE) && start) || ((st == F_ROW) && (k == KW'(N + 2)));
  assign g_rd_next  = (st == F_ROW) && (k < KW'(N));
  assign mac_valid  = (st == F_ROW) && (k < KW'(N));
  assign mac_clr    = (k == '0);
  assign mac_d0     = dout_t;
  assign mac_d1     = g_rd_data;

  always_comb begin
    req_t = DMSM_IDLE;
    req_t.shift_en  = mac_valid;
    req_t.vert      = 1'b0;
    req_t.in_sel    = 1'b1;
    req_t.out_sel   = idx_t'(i);
    req_t.shift_sel = idx_t'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; i <= '0; k <= '0; done <= 1'b0; out_valid <= 1'b0; out_data <= '0;
      for (int t = 0; t < (OV > 0 ? OV : 1); t++) tail[t] <= '0;
    end else begin
      done      <= 1'b0;
      out_valid <= 1'b0;
      case (st)
        F_IDLE: if (start) begin i <= '0; k <= '0; st <= F_ROW; end
        F_ROW: if (k == KW'(N + 2)) begin
          k <= '0;
          if (i < KW'(H)) begin
            out_valid <= 1'b1;
            if (OV > 0 && i < KW'(OV)) out_data <= sat_w(64'(x) + 64'(tail[TW'(i)]));
            else                       out_data <= x;
          end else if (OV > 0) begin
            tail[TW'(i - KW'(H))] <= x;
          end
          if (i == KW'(N - 1)) st <= F_DONE;
          else i <= i + 1'b1;
        end else k <= k + 1'b1;
        F_DONE: begin done <= 1'b1; st <= F_IDLE; end
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
