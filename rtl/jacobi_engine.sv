// jacobi_engine: simultaneous diagonalization unit with its memory controller
// (Mode I). It diagonalizes the two symmetric n x n matrices held in DMSM A
// (noisy-speech autocorrelation) and DMSM B (noise autocorrelation) with one
// common sequence of Jacobi rotations, in place, and accumulates the product
// of the rotations, the common eigenvector matrix, in DMSM V.
//
// Algorithm: V is first set to the identity (n rows written through the shift
// port). Then NSWEEP sweeps are made over all index pairs (p,q), taken from
// the serial pair table (pair_order = 0, cyclic by rows) or from the parallel
// pair tables (pair_order = 1, the n/2 non-conflicting pairs of each set
// processed one after another). For each pair:
//   1. rows p and q of A and B are rotated out of the DMSMs (n clocks each,
//      contents unchanged) into line buffers X (row p) and Y (row q);
//   2. the 2x2 blocks of A and B are sent to the R-PE CORDIC chain, which
//      picks the R rotation directions from sign(sum(aqq-app))*sign(sum(apq));
//   3. rows p and q are rewritten (n clocks each) with the pairs (X[k], Y[k])
//      passed through the gain-compensated rotator;
//   4. the same read/rewrite is done on columns p and q of A, B and V
//      (the column step), completing A <- J^T A J, B <- J^T B J, V <- V J.
// Cost per pair: 8n + 13R + 12 clocks (8n for the four line transfers of
// each step, 13R + 9 for the chain including its 8 input words, 3 of
// control); V set-up takes n^2 clocks.
// Interface: start pulse, busy, done pulse; three DMSM request bundles and
// their data outputs; the current pair (cur_p, cur_q) for the status
// registers; counters of rotations and of completed sweeps.
// From the reference design: CORDIC Jacobi rotations with directions chosen
// from the summed 2x2 blocks of both matrices, a fixed number R of CORDIC
// iterations and of Jacobi sweeps, serial and parallel pair tables, DMSM
// storage of A, B and V, rows/columns accessed through the shift memories.
// This design's choices: one rotation at a time (one PE row), the
// line-buffer read/rewrite schedule, and the gain compensation in the rotator.
// Lint note: kp/kq carry one spare top bit so a loop can count to n; only the
// low bits index the memories, so that bit is reported unused.
module jacobi_engine
  import sd_pkg::*;
#(
  parameter int N      = 256,
  parameter int R      = 20,
  parameter int NSWEEP = 40
)(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      pair_order,
  output logic      busy,
  output logic      done,
  output dmsm_req_t req_a,
  output dmsm_req_t req_b,
  output dmsm_req_t req_v,
  input  word_t     dout_a,
  input  word_t     dout_b,
  input  word_t     dout_v,
  output idx_t      cur_p,
  output idx_t      cur_q,
  output logic [31:0] rot_count,
  output logic [15:0] sweep_count
);
  localparam int KW = $clog2(N + 1);
  localparam int HW = (N > 2) ? $clog2(N / 2) : 1;
  localparam int KI = $clog2(N);

  typedef enum logic [3:0] {
    J_IDLE, J_VINIT, J_PAIR, J_RDP, J_RDQ, J_PELOAD, J_PEWAIT, J_WRP, J_WRQ, J_NEXT, J_DONE
  } jstate_e;

  jstate_e        st;
  logic           col_phase;     // 0: row step, 1: column step
  logic [KW-1:0]  k;             // position within a line
  logic [KW-1:0]  vrow;          // row being written during V set-up
  logic [HW-1:0]  lane;          // lane of the parallel table
  logic [3:0]     w;             // PE word counter
  logic [R-1:0]   dirs;
  word_t          xa [N], ya [N], xb [N], yb [N], xv [N], yv [N];
  word_t          rxa, rya, rxb, ryb, rxv, ryv;
  word_t          pe_word;
  logic           pe_valid, chain_done, chain_ov;
  logic [R-1:0]   chain_dirs;
  peword_t        chain_od;
  idx_t           sp, sq, pp [N/2], pq [N/2];
  logic           s_last, p_last, s_inc, p_inc, gen_clr;
  logic           sweep_end;
  logic [KI-1:0]  ki;            // k as a buffer index
  logic [KW-1:0]  kp, kq;        // buffer positions of columns p and q

  pq_gen_serial   #(.N(N)) u_pq_ser (.clk, .rst_n, .clr(gen_clr), .inc(s_inc), .p(sp), .q(sq), .last(s_last));
  pq_gen_parallel #(.N(N)) u_pq_par (.clk, .rst_n, .clr(gen_clr), .inc(p_inc), .p(pp), .q(pq), .last(p_last));

  pe_chain #(.R(R)) u_chain (
    .clk, .rst_n, .in_valid(pe_valid), .in_data(pe_word),
    .out_valid(chain_ov), .out_data(chain_od), .dir_neg(chain_dirs), .done(chain_done));

  vec_rotator #(.R(R)) u_rot_a (.x(xa[ki]), .y(ya[ki]), .dir_neg(dirs), .xr(rxa), .yr(rya));
  vec_rotator #(.R(R)) u_rot_b (.x(xb[ki]), .y(yb[ki]), .dir_neg(dirs), .xr(rxb), .yr(ryb));
  vec_rotator #(.R(R)) u_rot_v (.x(xv[ki]), .y(yv[ki]), .dir_neg(dirs), .xr(rxv), .yr(ryv));

  assign busy      = (st != J_IDLE);
  assign gen_clr   = (st == J_IDLE) && start;
  assign sweep_end = pair_order ? (p_last && lane == HW'(N/2 - 1)) : s_last;
  assign s_inc     = (st == J_NEXT) && !pair_order;
  assign p_inc     = (st == J_NEXT) && pair_order && (lane == HW'(N/2 - 1));
  assign ki        = k[KI-1:0];
  assign kp        = KW'(N - 1) - KW'(cur_p);
  assign kq        = KW'(N - 1) - KW'(cur_q);

  // words for the PE chain: 2x2 blocks of A then B
  always_comb begin
    case (w)
      4'd0: pe_word = xa[kp[KI-1:0]];
      4'd1: pe_word = xa[kq[KI-1:0]];
      4'd2: pe_word = ya[kp[KI-1:0]];
      4'd3: pe_word = ya[kq[KI-1:0]];
      4'd4: pe_word = xb[kp[KI-1:0]];
      4'd5: pe_word = xb[kq[KI-1:0]];
      4'd6: pe_word = yb[kp[KI-1:0]];
      default: pe_word = yb[kq[KI-1:0]];
    endcase
  end
  assign pe_valid = (st == J_PELOAD);

  // DMSM requests
  always_comb begin
    logic rd, wr, line_q;
    rd     = (st == J_RDP) || (st == J_RDQ);
    wr     = (st == J_WRP) || (st == J_WRQ);
    line_q = (st == J_RDQ) || (st == J_WRQ);
    req_a = DMSM_IDLE;
    req_a.shift_en  = rd || wr;
    req_a.vert      = col_phase;
    req_a.in_sel    = rd;
    req_a.out_sel   = line_q ? cur_q : cur_p;
    req_a.shift_sel = line_q ? cur_q : cur_p;
    req_b = req_a;
    req_a.din = line_q ? rya : rxa;
    req_b.din = line_q ? ryb : rxb;
    req_v = req_a;
    req_v.shift_en = (rd || wr) && col_phase;
    req_v.din      = line_q ? ryv : rxv;
    if (st == J_VINIT) begin
      req_v.shift_en  = 1'b1;
      req_v.vert      = 1'b0;
      req_v.in_sel    = 1'b0;
      req_v.shift_sel = idx_t'(vrow);
      req_v.out_sel   = idx_t'(vrow);
      req_v.din       = (KW'(N - 1) - k == vrow) ? ONE_Q15 : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (st == J_RDP) begin xa[ki] <= dout_a; xb[ki] <= dout_b; xv[ki] <= dout_v; end
    if (st == J_RDQ) begin ya[ki] <= dout_a; yb[ki] <= dout_b; yv[ki] <= dout_v; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= J_IDLE; col_phase <= 1'b0; k <= '0; vrow <= '0; lane <= '0; w <= '0;
      dirs <= '0; cur_p <= '0; cur_q <= '0; rot_count <= '0; sweep_count <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        J_IDLE: if (start) begin
          k <= '0; vrow <= '0; lane <= '0; rot_count <= '0; sweep_count <= '0;
          st <= J_VINIT;
        end
        J_VINIT: begin
          if (k == KW'(N - 1)) begin
            k <= '0;
            if (vrow == KW'(N - 1)) st <= (NSWEEP == 0) ? J_DONE : J_PAIR;
            else vrow <= vrow + 1'b1;
          end else k <= k + 1'b1;
        end
        J_PAIR: begin
          cur_p <= pair_order ? pp[lane] : sp;
          cur_q <= pair_order ? pq[lane] : sq;
          col_phase <= 1'b0; k <= '0; st <= J_RDP;
        end
        J_RDP: if (k == KW'(N - 1)) begin k <= '0; st <= J_RDQ; end else k <= k + 1'b1;
        J_RDQ: if (k == KW'(N - 1)) begin
          k <= '0;
          if (col_phase) st <= J_WRP;
          else begin w <= '0; st <= J_PELOAD; end
        end else k <= k + 1'b1;
        J_PELOAD: begin
          w <= w + 1'b1;
          if (w == 4'd7) st <= J_PEWAIT;
        end
        J_PEWAIT: if (chain_done) begin dirs <= chain_dirs; st <= J_WRP; end
        J_WRP: if (k == KW'(N - 1)) begin k <= '0; st <= J_WRQ; end else k <= k + 1'b1;
        J_WRQ: if (k == KW'(N - 1)) begin
          k <= '0;
          if (!col_phase) begin col_phase <= 1'b1; st <= J_RDP; end
          else st <= J_NEXT;
        end else k <= k + 1'b1;
        J_NEXT: begin
          rot_count <= rot_count + 1;
          lane <= (pair_order && lane != HW'(N/2 - 1)) ? lane + 1'b1 : '0;
          if (sweep_end) begin
            sweep_count <= sweep_count + 1'b1;
            st <= (sweep_count == 16'(NSWEEP - 1)) ? J_DONE : J_PAIR;
          end else st <= J_PAIR;
        end
        J_DONE: begin done <= 1'b1; st <= J_IDLE; end
        default: st <= J_IDLE;
      endcase
    end
  end

  // the rotated 2x2 blocks leaving the chain are not needed: the rows and
  // columns are rewritten through the rotators
  logic unused_chain;
  assign unused_chain = ^{chain_ov, chain_od};
endmodule
