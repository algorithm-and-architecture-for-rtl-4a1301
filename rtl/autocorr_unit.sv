// autocorr_unit: computes the autocorrelation coefficients of one frame,
//     r(m) = sum_{k=m}^{N-1} x(k) x(k-m),   m = 0 .. N-1,
// with two frame-length FIFOs and the shared MAC unit.
//
// Load: start opens a frame and the next N samples (x_valid) enter FIFO-A and
// FIFO-B through their input multiplexers. Compute: for each lag the FIFOs
// circulate once, N clocks, feeding the MAC with their head words. FIFO-A
// feeds back directly and so presents x(0..N-1) on every pass; FIFO-B feeds
// back through a one-word delay register that is cleared after every pass, so
// each pass shifts FIFO-B's contents one place further with a zero entering:
// on pass m it presents 0 (m times) then x(0..N-1-m). The MAC therefore sums
// x(k) x(k-m) over the pass. Two clocks after a pass the sum is complete and
// r(m), scaled to Q1.15 as sum / 2^(15+RSH) with saturation, is output with
// r_valid and its lag r_lag. done pulses after r(N-1). One frame takes
// N + N*(N+3) + 1 clocks.
// The two FIFOs, the 2-to-1 input multiplexers, the delay element in FIFO-B's
// return path and the shared MAC follow the reference unit; the controller's
// state sequence and the output scaling (default 1/N, RSH = log2 N) are this
// design's.
module autocorr_unit
  import sd_pkg::*;
#(
  parameter int N   = 256,
  parameter int RSH = $clog2(N)
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  x_valid,
  input  word_t x_in,
  output logic  busy,
  // shared MAC unit
  output logic  mac_valid,
  output logic  mac_clr,
  output word_t mac_d0,
  output word_t mac_d1,
  input  acc_t  mac_acc,
  // results
  output logic  r_valid,
  output word_t r_data,
  output idx_t  r_lag,
  output logic  done
);
  localparam int CW = $clog2(N + 1);
  typedef enum logic [2:0] {A_IDLE, A_LOAD, A_PASS, A_WAIT1, A_WAIT2, A_EMIT, A_DONE} astate_e;

  astate_e        st;
  word_t          fifo_a [N];
  word_t          fifo_b [N];
  word_t          dly;
  logic [CW-1:0]  p_cnt;   // words loaded / words of the current pass
  logic [CW-1:0]  z_lag;   // current lag
  logic           shift_a, shift_b, sel_in;
  word_t          in_a, in_b;

  assign busy    = (st != A_IDLE);
  assign sel_in  = (st == A_LOAD);
  assign shift_a = (st == A_LOAD && x_valid) || (st == A_PASS);
  assign shift_b = shift_a;
  // input multiplexers: 1 = new sample, 0 = return path
  assign in_a    = sel_in ? x_in : fifo_a[0];
  assign in_b    = sel_in ? x_in : dly;

  assign mac_valid = (st == A_PASS);
  assign mac_clr   = (st == A_PASS) && (p_cnt == '0);
  assign mac_d0    = fifo_a[0];
  assign mac_d1    = fifo_b[0];

  always_ff @(posedge clk) begin
    if (shift_a) begin
      for (int i = 0; i < N - 1; i++) fifo_a[i] <= fifo_a[i+1];
      fifo_a[N-1] <= in_a;
    end
    if (shift_b) begin
      for (int i = 0; i < N - 1; i++) fifo_b[i] <= fifo_b[i+1];
      fifo_b[N-1] <= in_b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; p_cnt <= '0; z_lag <= '0; dly <= '0;
      r_valid <= 1'b0; r_data <= '0; r_lag <= '0; done <= 1'b0;
    end else begin
      r_valid <= 1'b0;
      done    <= 1'b0;
      case (st)
        A_IDLE: if (start) begin p_cnt <= '0; z_lag <= '0; dly <= '0; st <= A_LOAD; end
        A_LOAD: if (x_valid) begin
          if (p_cnt == CW'(N - 1)) begin p_cnt <= '0; st <= A_PASS; end
          else p_cnt <= p_cnt + 1'b1;
        end
        A_PASS: begin
          dly <= fifo_b[0];
          if (p_cnt == CW'(N - 1)) begin p_cnt <= '0; st <= A_WAIT1; end
          else p_cnt <= p_cnt + 1'b1;
        end
        A_WAIT1: begin dly <= '0; st <= A_WAIT2; end   // delay element reset
        A_WAIT2: st <= A_EMIT;
        A_EMIT: begin
          r_valid <= 1'b1;
          r_data  <= sat_w(64'(mac_acc >>> (FRAC + RSH)));
          r_lag   <= idx_t'(z_lag);
          if (z_lag == CW'(N - 1)) st <= A_DONE;
          else begin z_lag <= z_lag + 1'b1; st <= A_PASS; end
        end
        A_DONE: begin done <= 1'b1; st <= A_IDLE; end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
