// speech_processor: full-band subspace speech enhancement processor built
// around a multiplier-free CORDIC engine that diagonalizes the noisy-speech
// and noise autocorrelation matrices simultaneously.
//
// Per frame of N samples (frame_start, then N samples on x_valid/x_in while
// x_ready): the autocorrelation unit computes r(0..N-1) with the shared MAC;
// the TOP controller classifies the frame as noise- or speech-dominant and the
// coefficients update the matching set; the top memory controller builds the
// Toeplitz matrices in DMSM A (speech) and DMSM B (noise), diagonalizes them
// with one set of Jacobi rotations (eigenvectors in DMSM V), computes the
// gains g_i = lambda_i/(lambda_i+mu) into FIFO G, forms Tmp = V.G and
// z = V^T.y, and finally x = Tmp.z, which after overlap-add with the previous
// frame leaves as N-OV enhanced samples on y_valid/y_out (OV = 25 % of N).
// frame_done pulses at the end of the frame.
// Memories: four DMSMs (A, B, V, Tmp) of N x N words, FIFO Y and FIFO G of N
// words, the autocorrelation FIFOs and the gain unit's buffer. One multiplier
// (the MAC) is shared by the autocorrelation unit and Modes III and IV; the
// diagonalization itself uses only shifts and adds.
// Other ports: mu0_load/mu0_in set the gain threshold (default 4.0, Q8.8);
// pair_order selects the serial (0) or the parallel (1) Jacobi pair order;
// reg_addr/reg_rdata read the memory controller registers P, Q, n, Mode;
// frame_is_noise, mode, rot_count and sweep_count report progress.
// Defaults are the reference full-band configuration: N = 256, R = 20 CORDIC
// iterations, 40 Jacobi sweeps, 16-bit data path, 25 % overlap. It computes
// one Jacobi rotation at a time rather than 16 in parallel (see the README).
module speech_processor
  import sd_pkg::*;
#(
  parameter int N           = 256,
  parameter int R           = 20,
  parameter int NSWEEP      = 40,
  parameter int OVERLAP_PCT = 25
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        x_valid,
  input  word_t       x_in,
  output logic        x_ready,
  input  logic        mu0_load,
  input  logic [15:0] mu0_in,
  input  logic        pair_order,
  output logic        y_valid,
  output word_t       y_out,
  output logic        frame_done,
  output logic        busy,
  output logic        frame_is_noise,
  output mem_mode_e   mode,
  output logic [31:0] rot_count,
  output logic [15:0] sweep_count,
  input  logic [1:0]  reg_addr,
  output logic [15:0] reg_rdata
);
  // ---------------- controllers ----------------
  logic ac_start, ac_busy, ac_done, r_valid, r_is_noise, y_clear, mc_start, mc_done;
  idx_t r_lag;
  word_t r_data;
  logic m1_start, m1_done, m2_start, m2_done, m3_start, m3_done, m4_start, m4_done;
  idx_t cur_p, cur_q;

  top_ctrl #(.N(N)) u_top_ctrl (
    .clk, .rst_n, .frame_start, .busy, .frame_done, .x_valid, .x_ready, .y_clear,
    .ac_start, .ac_done, .r_valid, .r_lag, .r_data, .r_is_noise, .frame_is_noise,
    .mc_start, .mc_done);

  dmsm_req_t ld_req_a, ld_req_b;
  top_mem_ctrl #(.N(N)) u_mem_ctrl (
    .clk, .rst_n, .start(mc_start), .done(mc_done), .mode,
    .r_valid, .r_lag, .r_data, .r_is_noise, .req_a(ld_req_a), .req_b(ld_req_b),
    .m1_start, .m1_done, .m2_start, .m2_done, .m3_start, .m3_done, .m4_start, .m4_done,
    .cur_p, .cur_q, .reg_addr, .reg_rdata);

  // ---------------- shared MAC ----------------
  logic  mac_valid, mac_clr, ac_mac_valid, ac_mac_clr, m3_mac_valid, m3_mac_clr, m4_mac_valid, m4_mac_clr;
  word_t mac_d0, mac_d1, ac_d0, ac_d1, m3_d0, m3_d1, m4_d0, m4_d1;
  acc_t  mac_acc;
  logic  mac_ov;

  always_comb begin
    case (mode)
      MODE_III: begin mac_valid = m3_mac_valid; mac_clr = m3_mac_clr; mac_d0 = m3_d0; mac_d1 = m3_d1; end
      MODE_IV:  begin mac_valid = m4_mac_valid; mac_clr = m4_mac_clr; mac_d0 = m4_d0; mac_d1 = m4_d1; end
      default:  begin mac_valid = ac_mac_valid; mac_clr = ac_mac_clr; mac_d0 = ac_d0; mac_d1 = ac_d1; end
    endcase
  end

  mac_unit u_mac (.clk, .rst_n, .in_valid(mac_valid), .acc_clr(mac_clr),
                  .data_in0(mac_d0), .data_in1(mac_d1), .acc_out(mac_acc), .out_valid(mac_ov));

  // ---------------- autocorrelation ----------------
  logic x_take;
  assign x_take = x_valid && x_ready;

  autocorr_unit #(.N(N)) u_ac (
    .clk, .rst_n, .start(ac_start), .x_valid(x_take), .x_in, .busy(ac_busy),
    .mac_valid(ac_mac_valid), .mac_clr(ac_mac_clr), .mac_d0(ac_d0), .mac_d1(ac_d1),
    .mac_acc, .r_valid, .r_data, .r_lag, .done(ac_done));

  // ---------------- DMSMs ----------------
  dmsm_req_t req_a, req_b, req_v, req_t;
  dmsm_req_t m1_req_a, m1_req_b, m1_req_v, m2_req_a, m2_req_b, m3_req_v, m3_req_t, m4_req_t;
  word_t dout_a, dout_b, dout_v, dout_t;

  always_comb begin
    req_a = DMSM_IDLE; req_b = DMSM_IDLE; req_v = DMSM_IDLE; req_t = DMSM_IDLE;
    case (mode)
      MODE_LOAD: begin req_a = ld_req_a; req_b = ld_req_b; end
      MODE_I:    begin req_a = m1_req_a; req_b = m1_req_b; req_v = m1_req_v; end
      MODE_II:   begin req_a = m2_req_a; req_b = m2_req_b; end
      MODE_III:  begin req_v = m3_req_v; req_t = m3_req_t; end
      MODE_IV:   begin req_t = m4_req_t; end
      default: ;
    endcase
  end

  dmsm #(.N(N)) u_dmsm_a (.clk, .req(req_a), .data_out(dout_a));
  dmsm #(.N(N)) u_dmsm_b (.clk, .req(req_b), .data_out(dout_b));
  dmsm #(.N(N)) u_dmsm_v (.clk, .req(req_v), .data_out(dout_v));
  dmsm #(.N(N)) u_dmsm_t (.clk, .req(req_t), .data_out(dout_t));

  // ---------------- Mode I: diagonalization ----------------
  logic m1_busy;
  jacobi_engine #(.N(N), .R(R), .NSWEEP(NSWEEP)) u_engine (
    .clk, .rst_n, .start(m1_start), .pair_order, .busy(m1_busy), .done(m1_done),
    .req_a(m1_req_a), .req_b(m1_req_b), .req_v(m1_req_v),
    .dout_a, .dout_b, .dout_v, .cur_p, .cur_q, .rot_count, .sweep_count);

  // ---------------- FIFOs ----------------
  logic  g_clear, g_wr, g_rd_start, g_rd_rev, g_rd_next, g_full;
  word_t g_wdata, g_rdata;
  logic  m2_g_clear, m2_g_wr, m3_g_clear, m3_g_wr;
  word_t m2_g_data, m3_g_data;
  logic  m3_g_rd_start, m3_g_rd_rev, m3_g_rd_next, m4_g_rd_start, m4_g_rd_rev, m4_g_rd_next;
  logic  y_rd_start, y_rd_rev, y_rd_next, y_full;
  word_t y_rdata;

  assign g_clear    = m2_g_clear | m3_g_clear;
  assign g_wr       = (mode == MODE_II) ? m2_g_wr : (mode == MODE_III) ? m3_g_wr : 1'b0;
  assign g_wdata    = (mode == MODE_II) ? m2_g_data : m3_g_data;
  assign g_rd_start = (mode == MODE_IV) ? m4_g_rd_start : m3_g_rd_start;
  assign g_rd_rev   = (mode == MODE_IV) ? m4_g_rd_rev   : m3_g_rd_rev;
  assign g_rd_next  = (mode == MODE_IV) ? m4_g_rd_next  : m3_g_rd_next;

  frame_fifo #(.DEPTH(N)) u_fifo_g (
    .clk, .rst_n, .clear(g_clear), .wr_en(g_wr), .wr_data(g_wdata),
    .rd_start(g_rd_start), .rd_rev(g_rd_rev), .rd_next(g_rd_next), .rd_data(g_rdata), .full(g_full));

  frame_fifo #(.DEPTH(N)) u_fifo_y (
    .clk, .rst_n, .clear(y_clear), .wr_en(x_take), .wr_data(x_in),
    .rd_start(y_rd_start), .rd_rev(y_rd_rev), .rd_next(y_rd_next), .rd_data(y_rdata), .full(y_full));

  // ---------------- Mode II: gains ----------------
  logic  gu_start, gu_valid, gu_ready, gu_out_valid, gu_done;
  word_t gu_d1, gu_d2, gu_g;
  logic [15:0] gu_mu;

  gain_unit #(.N(N)) u_gain (
    .clk, .rst_n, .mu0_load, .mu0_in, .start(gu_start), .in_valid(gu_valid), .in_ready(gu_ready),
    .d1(gu_d1), .d2(gu_d2), .out_valid(gu_out_valid), .g(gu_g), .mu(gu_mu), .done(gu_done));

  mode2_ctrl #(.N(N)) u_mode2 (
    .clk, .rst_n, .start(m2_start), .done(m2_done), .req_a(m2_req_a), .req_b(m2_req_b),
    .dout_a, .dout_b, .gu_start, .gu_valid, .gu_ready, .gu_d1, .gu_d2, .gu_out_valid, .gu_g,
    .gu_done, .g_clear(m2_g_clear), .g_wr(m2_g_wr), .g_data(m2_g_data));

  // ---------------- Mode III / IV: filtering ----------------
  mode3_ctrl #(.N(N)) u_mode3 (
    .clk, .rst_n, .start(m3_start), .done(m3_done), .req_v(m3_req_v), .req_t(m3_req_t), .dout_v,
    .g_clear(m3_g_clear), .g_wr(m3_g_wr), .g_data(m3_g_data), .g_rd_start(m3_g_rd_start),
    .g_rd_rev(m3_g_rd_rev), .g_rd_next(m3_g_rd_next), .g_rd_data(g_rdata),
    .y_rd_start, .y_rd_rev, .y_rd_next, .y_rd_data(y_rdata),
    .mac_valid(m3_mac_valid), .mac_clr(m3_mac_clr), .mac_d0(m3_d0), .mac_d1(m3_d1), .mac_acc);

  mode4_ctrl #(.N(N), .OVERLAP_PCT(OVERLAP_PCT)) u_mode4 (
    .clk, .rst_n, .start(m4_start), .done(m4_done), .req_t(m4_req_t), .dout_t,
    .g_rd_start(m4_g_rd_start), .g_rd_rev(m4_g_rd_rev), .g_rd_next(m4_g_rd_next), .g_rd_data(g_rdata),
    .mac_valid(m4_mac_valid), .mac_clr(m4_mac_clr), .mac_d0(m4_d0), .mac_d1(m4_d1), .mac_acc,
    .out_valid(y_valid), .out_data(y_out));

  // status bits not brought out
  logic unused_status;
  assign unused_status = ^{ac_busy, m1_busy, g_full, y_full, mac_ov, gu_mu};
endmodule
