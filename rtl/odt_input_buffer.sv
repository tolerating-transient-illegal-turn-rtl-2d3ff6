// odt_input_buffer: flit FIFO of one input channel (one virtual channel).
//
// A circular buffer of DEPTH flits with separate write and read pointers.
// The front flit is visible on `front` whenever `empty` is low; `rd_en` pops
// it.  A write and a read may happen in the same cycle.  Flow control is by
// credits, so the sender never writes into a full buffer; an assertion
// checks that.  The document shows the buffers but gives no depth; four
// flits, one packet, is this design's choice.
module odt_input_buffer
  import odt_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t front,
  output logic  empty,
  output logic  full
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [PW-1:0]  wp, rp;
  logic [PW:0]    count;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= incr(wp);
      if (rd_en) rp <= incr(rp);
      count <= count + (PW+1)'(wr_en) - (PW+1)'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_flit;
  end

  assign front = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
