// odt_spp_filter: shortest path priority of ODT.
//
// A packet that has suffered an illegal turn is steered back towards its
// shortest path instead of following any eligible non-minimal option.  The
// document describes the rule by example (turns W->N1, W->S1, N2->W, N2->S1,
// S2->N1 and the moves allowed afterwards); this design states it as:
//   1. start from the baseline-eligible outputs that exist at this node;
//   2. drop the U-turn back through the side the packet came in on;
//   3. drop the outputs that lead away in x: W, N1 and S1 (the westbound
//      channels) unless the packet is westbound, E, N2 and S2 otherwise (a
//      packet is westbound when its destination lies west, or straight
//      north or south while lying west of its source);
//   4. if nothing is left, repeat 2-3 on all existing outputs other than
//      the local one, and failing that allow any of them but the U-turn;
//   5. prefer productive (minimal) outputs, then the x step towards the
//      destination side (E, or W when the destination lies west), then any
//      remaining output.
// The congestion-based selector then picks one.  Purely combinational.
// Of the turns the document lists, N2->W is not produced here: an N2 arrival
// with a western destination has no eligible output and is spare-routed to
// S1 by the RC unit, from where W is eligible.
module odt_spp_filter
  import odt_pkg::*;
(
  input  ch_e     in_ch,
  input  pos_e    pos,
  input  chmask_t legal,
  input  chmask_t minc,
  input  chmask_t exists,
  output chmask_t cand
);
  chmask_t uturn, away, toward, m;
  logic    dst_west;

  always_comb begin
    // Westbound: destination to the west, or straight north/south of a packet
    // whose destination lies west of its source (minimal candidate N1/S1).
    dst_west = (pos inside {POS_W, POS_NW, POS_SW}) ||
               ((pos inside {POS_N, POS_S}) && (minc & (chbit(CH_N1) | chbit(CH_S1))) != '0);
    uturn = '0;
    unique case (in_ch)
      CH_E:         uturn[CH_E] = 1'b1;
      CH_W:         uturn[CH_W] = 1'b1;
      CH_N1, CH_N2: begin uturn[CH_N1] = 1'b1; uturn[CH_N2] = 1'b1; end
      CH_S1, CH_S2: begin uturn[CH_S1] = 1'b1; uturn[CH_S2] = 1'b1; end
      default: ;
    endcase
    away   = dst_west ? (chbit(CH_E) | chbit(CH_N2) | chbit(CH_S2))
                      : (chbit(CH_W) | chbit(CH_N1) | chbit(CH_S1));
    toward = dst_west ? chbit(CH_W) : chbit(CH_E);

    // The local output is only ever taken at the destination (via `legal`).
    m = legal & exists & ~uturn & ~away;
    if (m == '0) m = exists & ~chbit(CH_L) & ~uturn & ~away;
    if (m == '0) m = exists & ~chbit(CH_L) & ~uturn;

    if ((m & minc) != '0)        cand = m & minc;
    else if ((m & toward) != '0) cand = m & toward;
    else                         cand = m;
  end
endmodule
