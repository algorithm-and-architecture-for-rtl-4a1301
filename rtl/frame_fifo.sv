// frame_fifo: frame-length buffer used as FIFO Y (noisy input frame) and
// FIFO G (gain diagonal, later the transformed vector V^T.Y).
//
// Words are written in arrival order after a clear. Reading does not consume
// data: the read pointer starts at the oldest word (rd_start with rd_rev=0) or
// at the newest (rd_start with rd_rev=1) and rd_next steps it forward or
// backward around the ring of DEPTH words, so the same frame can be read as
// many times, and in whichever order, as a matrix product needs. rd_data is
// combinational from the read pointer. The reference design calls these units
// FIFOs of frame length; the recirculating and reverse read are this design's
// way of serving the row-by-row and column-by-column matrix products.
module frame_fifo
  import sd_pkg::*;
#(
  parameter int DEPTH = 256
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,       // empty the buffer (write pointer to 0)
  input  logic  wr_en,
  input  word_t wr_data,
  input  logic  rd_start,    // set the read pointer (oldest or newest word)
  input  logic  rd_rev,      // direction for rd_start and rd_next
  input  logic  rd_next,     // step the read pointer
  output word_t rd_data,
  output logic  full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  word_t          mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    count;

  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] wrap_inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction
  function automatic logic [AW-1:0] wrap_dec(input logic [AW-1:0] a);
    return (a == '0) ? AW'(DEPTH - 1) : a - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (clear) begin
        wp <= '0; count <= '0;
      end else if (wr_en) begin
        wp <= wrap_inc(wp);
        if (!full) count <= count + 1'b1;
      end
      if (rd_start)     rp <= rd_rev ? AW'(DEPTH - 1) : '0;
      else if (rd_next) rp <= rd_rev ? wrap_dec(rp) : wrap_inc(rp);
    end
  end

  always_ff @(posedge clk) if (wr_en && !clear) mem[wp] <= wr_data;
endmodule
