// serial_divider: unsigned shift-and-subtract (restoring) divide unit with its
// controlling state machine.
//
// On start the dividend and divisor are latched; one quotient bit is produced
// per clock, most significant first, so a division takes NUM_W clocks plus one
// to finish (O(l) in the word length l, as the reference divide unit). done is
// a one-clock pulse with quotient and remainder valid from then until the next
// start. busy is high from start until done. A zero divisor returns an
// all-ones quotient (the largest value), a choice of this design.
module serial_divider #(
  parameter int NUM_W = 32,
  parameter int DEN_W = 24
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic [NUM_W-1:0] quotient,
  output logic [DEN_W:0]   remainder,
  output logic             busy,
  output logic             done
);
  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} dstate_e;
  dstate_e                 st;
  logic [NUM_W-1:0]        num_q;
  logic [DEN_W-1:0]        den_q;
  logic [$clog2(NUM_W+1)-1:0] cnt;
  logic [DEN_W:0]          trial;

  assign busy  = (st != D_IDLE);
  assign trial = {remainder[DEN_W-1:0], num_q[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; num_q <= '0; den_q <= '0; cnt <= '0;
      quotient <= '0; remainder <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        D_IDLE: if (start) begin
          num_q <= dividend; den_q <= divisor; remainder <= '0;
          quotient <= '0; cnt <= '0; st <= D_RUN;
        end
        D_RUN: begin
          if (den_q == '0) begin
            quotient <= '1; st <= D_DONE;
          end else begin
            num_q <= num_q << 1;
            if (trial >= {1'b0, den_q}) begin
              remainder <= trial - {1'b0, den_q};
              quotient  <= {quotient[NUM_W-2:0], 1'b1};
            end else begin
              remainder <= trial;
              quotient  <= {quotient[NUM_W-2:0], 1'b0};
            end
            cnt <= cnt + 1'b1;
            if (cnt == ($clog2(NUM_W+1))'(NUM_W - 1)) st <= D_DONE;
          end
        end
        D_DONE: begin done <= 1'b1; st <= D_IDLE; end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
