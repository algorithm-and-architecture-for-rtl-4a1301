// cordic_pe: one processing element of the CORDIC Jacobi diagonalization
// engine. It performs CORDIC iteration number SHIFT of a simultaneous Jacobi
// rotation on the 2x2 (p,q) blocks of the two matrices A1 and A2.
//
// Serial I/O, one PE_W-bit word per clock: in_valid/in_data deliver eight
// words in the order a1pp, a1pq, a1qp, a1qq, a2pp, a2pq, a2qp, a2qq into an
// input shift register. Sign mode: after the eighth word the direction
//     d = sign( sum(aqq - app) ) * sign( sum(apq) )   (sign(0) = +1)
// is stored in the 1-bit sign register (dir_neg = 1 means d = -1). Execution
// mode: with s = d * 2^-SHIFT the blocks are replaced by
//     J^T A J,  J = [1 s; -s 1],
// as a row step (four pipeline registers per block) followed by a column step;
// multiplications by s are arithmetic shifts, so the PE has only adders. The
// CORDIC gain of the iteration is not compensated here. The eight results then
// leave on out_valid/out_data in the input order, so PEs cascade directly
// (Figure-4.24 style chains). done pulses after the last word.
// Timing: 8 load clocks, 1 sign clock, 2 execution clocks, 8 output clocks.
// Following the reference PE: the two operating modes (sign then transform),
// the sign register, serial data I/O, eight input words and the controller
// split into master, sign and execution controllers. This design's choices:
// the word order, sign(0) = +1, and that the eigenvector block is not carried
// through the PE (the engine rotates full columns of V with the recorded
// directions instead).
module cordic_pe
  import sd_pkg::*;
#(
  parameter int SHIFT = 0
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  peword_t in_data,
  output logic    out_valid,
  output peword_t out_data,
  output logic    dir_neg,
  output logic    done
);
  peword_t sr [8];                 // shift-in / shift-out registers
  peword_t rq [8];                 // row-step pipeline registers
  logic [3:0] w_cnt;               // words received (sign controller counter P)
  logic [3:0] o_cnt;               // words sent (execution controller counter Z)
  logic       start_s, done_s, start_e, done_e, start;
  typedef enum logic [2:0] {E_IDLE, E_ROW, E_COL, E_OUT, E_END} estate_e;
  estate_e est;
  logic       shift_en;

  pe_master_ctrl u_master (.clk, .rst_n, .start, .done, .start_s, .done_s, .start_e, .done_e);

  // a new rotation starts with its first word
  assign start    = in_valid && (w_cnt == 4'd0) && (est == E_IDLE);
  assign shift_en = in_valid || (est == E_OUT);
  assign out_data = sr[0];
  assign out_valid = (est == E_OUT);

  function automatic peword_t sh(input peword_t v, input logic neg);
    peword_t t;
    t = v >>> SHIFT;
    return neg ? -t : t;
  endfunction

  // sign controller: count the eight words, then set the sign register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_cnt <= '0; dir_neg <= 1'b0; done_s <= 1'b0;
    end else begin
      done_s <= 1'b0;
      if (in_valid && w_cnt != 4'd8) w_cnt <= w_cnt + 1'b1;
      if (start_s && w_cnt == 4'd8 && !done_s) begin
        automatic peword_t diff = (sr[3] + sr[7]) - (sr[0] + sr[4]);
        automatic peword_t pq   = sr[1] + sr[5];
        dir_neg <= diff[PE_W-1] ^ pq[PE_W-1];
        done_s  <= 1'b1;
      end
      if (done_e) w_cnt <= '0;
    end
  end

  // execution controller and datapath
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est <= E_IDLE; o_cnt <= '0; done_e <= 1'b0;
      for (int i = 0; i < 8; i++) rq[i] <= '0;
    end else begin
      done_e <= 1'b0;
      case (est)
        E_IDLE: if (start_e && !done_e) est <= E_ROW;
        E_ROW: begin
          for (int m = 0; m < 2; m++) begin
            // rows: p' = p - s q ; q' = s p + q
            rq[4*m+0] <= sr[4*m+0] - sh(sr[4*m+2], dir_neg);
            rq[4*m+1] <= sr[4*m+1] - sh(sr[4*m+3], dir_neg);
            rq[4*m+2] <= sh(sr[4*m+0], dir_neg) + sr[4*m+2];
            rq[4*m+3] <= sh(sr[4*m+1], dir_neg) + sr[4*m+3];
          end
          est <= E_COL;
        end
        E_COL: begin o_cnt <= '0; est <= E_OUT; end
        E_OUT: begin
          if (o_cnt == 4'd7) begin est <= E_END; done_e <= 1'b1; end
          o_cnt <= o_cnt + 1'b1;
        end
        E_END: est <= E_IDLE;
        default: est <= E_IDLE;
      endcase
    end
  end

  // shift register: loads serial input, takes the column-step results, shifts out
  always_ff @(posedge clk) begin
    if (est == E_COL) begin
      for (int m = 0; m < 2; m++) begin
        // columns: p' = p - s q ; q' = s p + q
        sr[4*m+0] <= rq[4*m+0] - sh(rq[4*m+1], dir_neg);
        sr[4*m+1] <= sh(rq[4*m+0], dir_neg) + rq[4*m+1];
        sr[4*m+2] <= rq[4*m+2] - sh(rq[4*m+3], dir_neg);
        sr[4*m+3] <= sh(rq[4*m+2], dir_neg) + rq[4*m+3];
      end
    end else if (shift_en) begin
      for (int i = 0; i < 7; i++) sr[i] <= sr[i+1];
      sr[7] <= in_data;
    end
  end
endmodule
