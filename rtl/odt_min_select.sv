// odt_min_select: the minimal, fully adaptive candidate set used while no
// fault disturbs a packet.
//
// Returns the productive output channels for a destination region:
//   L -> L; E -> E; W -> W;
//   S -> S1 if the destination lies west of the source, else S2;
//   N -> N1 if the destination lies west of the source, else N2;
//   NE -> E or N2; SE -> E or S2; SW -> W or S1; NW -> W or N1.
// The rule set is the document's; the choice between two candidates is made
// later by congestion (odt_out_select).  Purely combinational.
module odt_min_select
  import odt_pkg::*;
(
  input  pos_e               pos,
  input  logic [COORD_W-1:0] src_x,
  input  logic [COORD_W-1:0] dst_x,
  output chmask_t            cand
);
  logic dst_west_of_src;

  always_comb begin
    dst_west_of_src = dst_x < src_x;
    cand = '0;
    unique case (pos)
      POS_L:  cand[CH_L] = 1'b1;
      POS_E:  cand[CH_E] = 1'b1;
      POS_W:  cand[CH_W] = 1'b1;
      POS_S:  if (dst_west_of_src) cand[CH_S1] = 1'b1; else cand[CH_S2] = 1'b1;
      POS_N:  if (dst_west_of_src) cand[CH_N1] = 1'b1; else cand[CH_N2] = 1'b1;
      POS_NE: begin cand[CH_E] = 1'b1; cand[CH_N2] = 1'b1; end
      POS_SE: begin cand[CH_E] = 1'b1; cand[CH_S2] = 1'b1; end
      POS_SW: begin cand[CH_W] = 1'b1; cand[CH_S1] = 1'b1; end
      POS_NW: begin cand[CH_W] = 1'b1; cand[CH_N1] = 1'b1; end
      default: cand = '0;
    endcase
  end
endmodule
