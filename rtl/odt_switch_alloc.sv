// odt_switch_alloc: switch allocation for the five physical output links.
//
// Every cycle, each physical link (E, W, N, S, L) carries at most one flit.
// N1/N2 and S1/S2 are virtual channels sharing the N and S links, so their
// packets compete here flit by flit.  An input may take part when it holds
// its output channel, has a flit, and the downstream buffer of that channel
// has a free slot (credit).  A round-robin arbiter per link picks one.  Purely
// combinational grant; the round-robin pointers are registered.  The document
// names the SA stage without detailing it; round-robin is this design's
// choice.
module odt_switch_alloc
  import odt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NCH-1:0]     req,       // per input channel
  input  ch_e  [NCH-1:0]     req_ch,    // output channel held by that input
  input  logic [NCH-1:0]     credit_ok, // per output channel
  output logic [NCH-1:0]     gnt        // per input channel
);
  logic [NLINK-1:0][2:0] rr;
  logic [NLINK-1:0]      lk_gnt;
  logic [NLINK-1:0][2:0] lk_win;

  int i;

  always_comb begin
    i      = 0;
    gnt    = '0;
    lk_gnt = '0;
    lk_win = '0;
    for (int l = 0; l < NLINK; l++) begin
      for (int k = 1; k <= NCH; k++) begin
        i = (int'(rr[l]) + k) % NCH;
        if (!lk_gnt[l] && req[i] && ch2link(req_ch[i]) == link_e'(l) && credit_ok[req_ch[i]]) begin
          lk_gnt[l] = 1'b1;
          lk_win[l] = 3'(i);
          gnt[i]    = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else
      for (int l = 0; l < NLINK; l++)
        if (lk_gnt[l]) rr[l] <= lk_win[l];
  end
endmodule
