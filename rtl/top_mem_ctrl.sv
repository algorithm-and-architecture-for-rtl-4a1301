// top_mem_ctrl: top memory controller of the speech processor.
//
// It keeps the latest autocorrelation coefficients of a speech-dominant frame
// (rs) and of a noise-dominant frame (rn), written from the autocorrelation
// unit's output (r_valid, r_lag, r_data, r_is_noise). On start it runs, one
// after the other:
//   LOAD  build the Toeplitz matrices A(i,c) = rs(|i-c|) in DMSM A and
//         B(i,c) = rn(|i-c|) in DMSM B, one row of N shifts at a time
//         (N^2 clocks);
//   I     simultaneous diagonalization (jacobi_engine);
//   II    gain matrix (mode2_ctrl);
//   III   Tmp = V.G, G = V^T.Y (mode3_ctrl);
//   IV    enhanced frame and overlap-add (mode4_ctrl);
// starting each with a one-clock pulse and waiting for its done, then pulses
// done. mode tells which sub-controller owns the memories and the MAC.
// Status registers are read through reg_addr/reg_rdata: 00 P, 01 Q (the
// current Jacobi pair), 10 n (frame length), 11 Mode.
// At reset rn holds a small white-noise estimate (NOISE_FLOOR at lag 0) so the
// first frames have a well-conditioned noise matrix; rs is zero.
// Following the reference: the sub-controllers Mode I to IV run in sequence
// under one top controller, the internal registers P, Q, n, Mode and their
// addresses. This design's choices: the coefficient registers, the Toeplitz
// build by the controller, read-only registers, and the reset contents.
// Lint note: the lag counter lagd has one spare top bit so it can count to n;
// that bit is reported unused.
module top_mem_ctrl
  import sd_pkg::*;
#(
  parameter int    N           = 256,
  parameter word_t NOISE_FLOOR = 16'sd64
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output mem_mode_e   mode,
  // autocorrelation coefficients
  input  logic        r_valid,
  input  idx_t        r_lag,
  input  word_t       r_data,
  input  logic        r_is_noise,
  // Toeplitz build
  output dmsm_req_t   req_a,
  output dmsm_req_t   req_b,
  // sub-controllers
  output logic        m1_start,
  input  logic        m1_done,
  output logic        m2_start,
  input  logic        m2_done,
  output logic        m3_start,
  input  logic        m3_done,
  output logic        m4_start,
  input  logic        m4_done,
  // status registers
  input  idx_t        cur_p,
  input  idx_t        cur_q,
  input  logic [1:0]  reg_addr,
  output logic [15:0] reg_rdata
);
  localparam int KW = $clog2(N + 1);
  localparam int KI = $clog2(N);
  typedef enum logic [3:0] {C_IDLE, C_LOAD, C_S1, C_W1, C_S2, C_W2, C_S3, C_W3, C_S4, C_W4, C_DONE} cstate_e;

  cstate_e       st;
  word_t         rs [N];
  word_t         rn [N];
  logic [KW-1:0] row, k;
  logic [KW-1:0] col, lagd;

  // Toeplitz element of row `row` for the column entering now (column N-1-k)
  assign col  = KW'(N - 1) - k;
  assign lagd = (row > col) ? row - col : col - row;

  always_comb begin
    req_a = DMSM_IDLE;
    req_a.shift_en  = (st == C_LOAD);
    req_a.shift_sel = idx_t'(row);
    req_a.out_sel   = idx_t'(row);
    req_b = req_a;
    req_a.din = rs[lagd[KI-1:0]];
    req_b.din = rn[lagd[KI-1:0]];
  end

  assign m1_start = (st == C_S1);
  assign m2_start = (st == C_S2);
  assign m3_start = (st == C_S3);
  assign m4_start = (st == C_S4);

  always_comb begin
    case (st)
      C_LOAD:       mode = MODE_LOAD;
      C_S1, C_W1:   mode = MODE_I;
      C_S2, C_W2:   mode = MODE_II;
      C_S3, C_W3:   mode = MODE_III;
      C_S4, C_W4:   mode = MODE_IV;
      default:      mode = MODE_IDLE;
    endcase
  end

  always_comb begin
    case (reg_addr)
      2'b00:   reg_rdata = 16'(cur_p);
      2'b01:   reg_rdata = 16'(cur_q);
      2'b10:   reg_rdata = 16'(N);
      default: reg_rdata = 16'(mode);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        rs[i] <= '0;
        rn[i] <= (i == 0) ? NOISE_FLOOR : '0;
      end
    end else if (r_valid) begin
      if (r_is_noise) rn[r_lag[KI-1:0]] <= r_data;
      else            rs[r_lag[KI-1:0]] <= r_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; row <= '0; k <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        C_IDLE: if (start) begin row <= '0; k <= '0; st <= C_LOAD; end
        C_LOAD: if (k == KW'(N - 1)) begin
          k <= '0;
          if (row == KW'(N - 1)) st <= C_S1;
          else row <= row + 1'b1;
        end else k <= k + 1'b1;
        C_S1: st <= C_W1;
        C_W1: if (m1_done) st <= C_S2;
        C_S2: st <= C_W2;
        C_W2: if (m2_done) st <= C_S3;
        C_S3: st <= C_W3;
        C_W3: if (m3_done) st <= C_S4;
        C_S4: st <= C_W4;
        C_W4: if (m4_done) st <= C_DONE;
        C_DONE: begin done <= 1'b1; st <= C_IDLE; end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
