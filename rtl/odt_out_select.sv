// odt_out_select: output selection by congestion.
//
// Among the candidate output channels, picks the one whose downstream input
// buffer has the most free slots, as counted by the router's credit counters.
// Ties go to the lowest channel number (E, W, N1, N2, S1, S2, L).  `valid` is
// low when there is no candidate.  Choosing by free buffer slots is the
// document's congestion measure; the tie rule is this design's choice.
// Purely combinational.
module odt_out_select
  import odt_pkg::*;
#(
  parameter int CRED_W = 3
) (
  input  chmask_t                     cand,
  input  logic [NCH-1:0][CRED_W-1:0]  free,
  output logic                        valid,
  output ch_e                         sel
);
  logic [CRED_W-1:0] best;

  always_comb begin
    valid = 1'b0;
    sel   = CH_E;
    best  = '0;
    for (int c = 0; c < NCH; c++) begin
      if (cand[c] && (!valid || free[c] > best)) begin
        valid = 1'b1;
        sel   = ch_e'(c);
        best  = free[c];
      end
    end
  end
endmodule
