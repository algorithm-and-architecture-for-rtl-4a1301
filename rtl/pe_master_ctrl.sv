// pe_master_ctrl: master controller of one CORDIC processing element.
//
// Sequencing as in the reference controller: waits for start, then holds
// start_s (sign controller) until done_s, then holds start_e (execution
// controller) until done_e, then pulses done for one clock and returns to
// idle. start_s and start_e are levels held while their state lasts; done_s,
// done_e and done are one-clock pulses.
module pe_master_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output logic start_s,
  input  logic done_s,
  output logic start_e,
  input  logic done_e
);
  typedef enum logic [1:0] {M_IDLE, M_SIGN, M_EXEC, M_DONE} mstate_e;
  mstate_e st;

  assign start_s = (st == M_SIGN);
  assign start_e = (st == M_EXEC);
  assign done    = (st == M_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= M_IDLE;
    else case (st)
      M_IDLE: if (start)  st <= M_SIGN;
      M_SIGN: if (done_s) st <= M_EXEC;
      M_EXEC: if (done_e) st <= M_DONE;
      M_DONE: st <= M_IDLE;
      default: st <= M_IDLE;
    endcase
  end
endmodule
