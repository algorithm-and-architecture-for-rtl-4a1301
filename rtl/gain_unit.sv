// gain_unit: eigen-domain filter gain calculation unit.
//
// For every eigen-direction i it receives the two diagonal entries left by the
// simultaneous diagonalization, d1_i (noisy-speech matrix) and d2_i (noise
// matrix), and forms the generalized eigenvalue
//     lambda_i = max(d1_i - d2_i, 0) / d2_i            (unsigned Q8.8)
//     (lambda_i = 0 when d2_i <= 0, which rounding can produce for a small noise eigenvalue)
// which is the eigenvalue of the clean-speech matrix once the common basis is
// scaled so that the noise matrix becomes the identity. The lambdas are kept
// in a frame-length buffer and summed; after N inputs the frame SNR estimate is
// the mean, obtained by a right shift of log2(N), and the Lagrange parameter is
//     mu = max(mu0 - SNR, 0)                            (Q8.8)
// Then each gain  g_i = lambda_i / (lambda_i + mu)  (Q1.15, at most 32767) is
// produced in order i = 0..N-1 with out_valid. Both divisions use one serial
// shift-and-subtract divider, so each takes about 34 clocks.
// Interface: load mu0 with mu0_load; start opens a frame; inputs use a
// valid/ready handshake; done pulses after the last gain.
// Following the reference unit: the threshold register mu0 (4.0 by default),
// the accumulate-then-shift SNR, mu = mu0 - SNR and g = lambda/(lambda+mu)
// computed serially with a divide unit. This design's choices: lambda as the
// ratio above, the Q8.8 formats, the linear (not dB) SNR and the clamp of mu
// at zero.
// Lint note: the divider remainder (div_rem) is not needed and is left unused.
module gain_unit
  import sd_pkg::*;
#(
  parameter int N          = 256,
  parameter int LAM_FRAC   = 8,
  parameter logic [15:0] MU0_RESET = 16'd1024   // 4.0 in Q8.8
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mu0_load,
  input  logic [15:0] mu0_in,      // threshold mu0, unsigned Q8.8
  input  logic        start,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       d1,
  input  word_t       d2,
  output logic        out_valid,
  output word_t       g,
  output logic [15:0] mu,          // Lagrange parameter of this frame, Q8.8
  output logic        done
);
  localparam int LOGN = $clog2(N);
  localparam int CW   = $clog2(N + 1);
  typedef enum logic [2:0] {G_IDLE, G_ACCEPT, G_LDIV, G_MU, G_GSTART, G_GDIV, G_DONE} gstate_e;

  gstate_e            st;
  logic [15:0]        mu0_q;
  logic [15:0]        lam [N];
  logic [16+LOGN:0]   sum;
  logic [CW-1:0]      cnt;
  logic               div_start, div_done, div_busy;
  logic [31:0]        div_num, div_q;
  logic [23:0]        div_den;
  logic [24:0]        div_rem;
  logic [15:0]        lam_sat;
  logic [16:0]        g_den;

  initial assert (N == (1 << LOGN)) else $fatal(1, "gain_unit: N must be a power of two");

  serial_divider #(.NUM_W(32), .DEN_W(24)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_num), .divisor(div_den),
    .quotient(div_q), .remainder(div_rem), .busy(div_busy), .done(div_done));

  assign in_ready = (st == G_ACCEPT) && !div_busy;
  assign lam_sat  = (div_q > 32'hFFFF) ? 16'hFFFF : div_q[15:0];
  assign g_den    = {1'b0, lam[cnt[LOGN-1:0]]} + {1'b0, mu};

  // Operands of the divider, chosen by state (the unit's input multiplexer).
  always_comb begin
    div_start = 1'b0;
    div_num   = '0;
    div_den   = '0;
    if (st == G_ACCEPT && in_valid && !div_busy) begin
      div_start = 1'b1;
      div_num   = (d1 > d2 && d2 > 0) ? 32'(unsigned'(32'(d1) - 32'(d2))) << LAM_FRAC : '0;
      div_den   = (d2 > 0)  ? 24'(unsigned'(d2)) : 24'd1;   // lambda = 0 when d2 <= 0
    end else if (st == G_GSTART) begin
      div_start = 1'b1;
      div_num   = 32'(lam[cnt[LOGN-1:0]]) << FRAC;
      div_den   = 24'(g_den);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; mu0_q <= MU0_RESET; sum <= '0; cnt <= '0; mu <= '0;
      out_valid <= 1'b0; g <= '0; done <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (mu0_load) mu0_q <= mu0_in;
      case (st)
        G_IDLE:   if (start) begin sum <= '0; cnt <= '0; st <= G_ACCEPT; end
        G_ACCEPT: if (div_start) st <= G_LDIV;
        G_LDIV:   if (div_done) begin
          // a zero noise diagonal gives the largest lambda (divider rule)
          lam[cnt[LOGN-1:0]] <= lam_sat;
          sum <= sum + (17+LOGN)'(lam_sat);
          if (cnt == CW'(N - 1)) begin cnt <= '0; st <= G_MU; end
          else begin cnt <= cnt + 1'b1; st <= G_ACCEPT; end
        end
        G_MU: begin
          if ((sum >> LOGN) >= (17+LOGN)'(mu0_q)) mu <= '0;
          else mu <= mu0_q - 16'(sum >> LOGN);
          st <= G_GSTART;
        end
        G_GSTART: st <= G_GDIV;
        G_GDIV: if (div_done) begin
          out_valid <= 1'b1;
          if (g_den == '0) g <= '0;
          else g <= (div_q > 32'd32767) ? ONE_Q15 : word_t'(div_q[15:0]);
          if (cnt == CW'(N - 1)) st <= G_DONE;
          else begin cnt <= cnt + 1'b1; st <= G_GSTART; end
        end
        G_DONE: begin done <= 1'b1; st <= G_IDLE; end
        default: st <= G_IDLE;
      endcase
    end
  end
endmodule
