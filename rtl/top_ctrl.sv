// top_ctrl: TOP controller of the speech processor; it runs one frame.
//
// On frame_start it clears FIFO Y and starts the autocorrelation unit; the
// next N input samples are accepted (x_ready) into both. While the
// autocorrelation coefficients come out, the frame is classified from its
// energy r(0): it is noise-dominant if it is the first frame after reset or if
// r(0) < 2^VAD_SHIFT times the energy of the last noise-dominant frame, and
// speech-dominant otherwise. r_is_noise tells the memory controller which
// coefficient set to update. When the autocorrelation is done the memory
// controller is started; frame_done pulses when it is done. frame_is_noise
// holds the decision of the last frame.
// Following the reference: one frame at a time under a top controller that
// starts the autocorrelation and the memory controller; speech/pause decision
// by comparing the frame energy with that of past frames. The exact rule
// (first frame is noise, factor 2^VAD_SHIFT against the last noise frame) is
// this design's.
module top_ctrl
  import sd_pkg::*;
#(
  parameter int N         = 256,
  parameter int VAD_SHIFT = 1
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  frame_start,
  output logic  busy,
  output logic  frame_done,
  input  logic  x_valid,
  output logic  x_ready,
  output logic  y_clear,
  // autocorrelation unit
  output logic  ac_start,
  input  logic  ac_done,
  input  logic  r_valid,
  input  idx_t  r_lag,
  input  word_t r_data,
  output logic  r_is_noise,
  output logic  frame_is_noise,
  // memory controller
  output logic  mc_start,
  input  logic  mc_done
);
  localparam int KW = $clog2(N + 1);
  typedef enum logic [2:0] {P_IDLE, P_IN, P_AC, P_MEM, P_DONE} pstate_e;
  pstate_e       st;
  logic [KW-1:0] n_in;
  logic          first_frame;
  word_t         e_noise;
  logic          noise_now;

  assign busy     = (st != P_IDLE);
  assign ac_start = (st == P_IDLE) && frame_start;
  assign y_clear  = ac_start;
  assign x_ready  = (st == P_IN);
  assign noise_now = first_frame ||
                     (32'(signed'(r_data)) < (32'(signed'(e_noise)) <<< VAD_SHIFT));
  assign r_is_noise = (r_valid && r_lag == '0) ? noise_now : frame_is_noise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; n_in <= '0; first_frame <= 1'b1; e_noise <= '0;
      frame_is_noise <= 1'b0; mc_start <= 1'b0; frame_done <= 1'b0;
    end else begin
      mc_start   <= 1'b0;
      frame_done <= 1'b0;
      if (r_valid && r_lag == '0) begin
        frame_is_noise <= noise_now;
        if (noise_now) e_noise <= r_data;
        first_frame <= 1'b0;
      end
      case (st)
        P_IDLE: if (frame_start) begin n_in <= '0; st <= P_IN; end
        P_IN: if (x_valid) begin
          if (n_in == KW'(N - 1)) st <= P_AC;
          n_in <= n_in + 1'b1;
        end
        P_AC: if (ac_done) begin mc_start <= 1'b1; st <= P_MEM; end
        P_MEM: if (mc_done) st <= P_DONE;
        P_DONE: begin frame_done <= 1'b1; st <= P_IDLE; end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
