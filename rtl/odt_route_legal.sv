// odt_route_legal: eligibility rules of the baseline non-minimal routing
// algorithm, which ODT builds on.
//
// Given the input channel a packet arrived on and the Pos of its destination,
// returns the set of output channels the baseline algorithm allows:
//   L  when Pos is L
//   E  when the input is not E and Pos is E, NE or SE
//   W  when the input is L, N1, S1 or E
//   N1 when the input is L, S1 or E
//   S1 when the input is L, N1 or E
//   N2 when the input is not N2 and Pos is N, E, NE or SE
//   S2 when the input is not S2 and Pos is S, E, NE or SE
// These rules are the document's.  Westbound traffic uses virtual channel 1 in
// y, eastbound traffic virtual channel 2, which keeps the turn set free of
// cycles.  Purely combinational.
module odt_route_legal
  import odt_pkg::*;
(
  input  ch_e     in_ch,
  input  pos_e    pos,
  output chmask_t legal
);
  logic pos_east;

  always_comb begin
    pos_east = pos inside {POS_E, POS_NE, POS_SE};
    legal = '0;
    legal[CH_L]  = (pos == POS_L);
    legal[CH_E]  = (in_ch != CH_E) && pos_east;
    legal[CH_W]  = in_ch inside {CH_L, CH_N1, CH_S1, CH_E};
    legal[CH_N1] = in_ch inside {CH_L, CH_S1, CH_E};
    legal[CH_S1] = in_ch inside {CH_L, CH_N1, CH_E};
    legal[CH_N2] = (in_ch != CH_N2) && (pos_east || pos == POS_N);
    legal[CH_S2] = (in_ch != CH_S2) && (pos_east || pos == POS_S);
  end
endmodule
