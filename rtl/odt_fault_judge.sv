// odt_fault_judge: online fault detection and classification of ODT.
//
// When a head flit is checked at an input, this unit judges whether the
// upstream router routed it correctly.  It uses three pieces of information:
// the current input channel, the input channel the flit used in the upstream
// router (a three-bit code carried in the head flit), and the Pos of the
// destination seen from the upstream router, which is recomputed here from the
// current coordinates and the side the flit arrived on.  The outcome is either
// "ignorable" (a turn the ODT routing tolerates) or "severe" (a turn it cannot
// tolerate with the baseline rules; the router then applies spare routing or
// shortest path priority).  Local-input flits are not judged.
//
// Upstream turns judged ignorable, per current input:
//   N1 (upstream sent S1): upstream input E, W, N1, N2 or L
//   S1 (upstream sent N1): upstream input E, W, S1, S2 or L
//   E  (upstream sent W):  upstream input E, N1, N2, S1 or L
//   W  (upstream sent E):  upstream input not E, upstream Pos E, NE or SE
//   N2 (upstream sent S2): upstream input not S2, upstream Pos S, E, NE or SE
//   S2 (upstream sent N2): upstream input not N2, upstream Pos N, E, NE or SE
// The first three rows are the document's fault-judgment rules; they admit the
// baseline turns plus the five turns shortest path priority adds.  For the last
// three this design uses the baseline algorithm's own eligibility condition for
// the output the upstream router took, which the document's per-port listing
// states in narrower and partly different terms.
// Purely combinational; it runs beside the route computation, off its path.
module odt_fault_judge
  import odt_pkg::*;
(
  input  logic               check,     // a head flit is being judged
  input  ch_e                in_ch,     // current input channel
  input  ch_e                up_in,     // input channel used upstream
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic               ignorable,
  output logic               severe
);
  logic [COORD_W-1:0] up_x, up_y;
  pos_e               up_pos;
  logic               ok;

  always_comb begin
    up_x = cur_x;
    up_y = cur_y;
    unique case (in_ch)
      CH_E:         up_x = cur_x + 1'b1;
      CH_W:         up_x = cur_x - 1'b1;
      CH_N1, CH_N2: up_y = cur_y + 1'b1;
      CH_S1, CH_S2: up_y = cur_y - 1'b1;
      default: ;
    endcase
  end

  odt_pos_unit u_up_pos (
    .cur_x(up_x), .cur_y(up_y), .dst_x(dst_x), .dst_y(dst_y), .pos(up_pos)
  );

  always_comb begin
    unique case (in_ch)
      CH_N1: ok = up_in inside {CH_E, CH_W, CH_N1, CH_N2, CH_L};
      CH_S1: ok = up_in inside {CH_E, CH_W, CH_S1, CH_S2, CH_L};
      CH_E:  ok = up_in inside {CH_E, CH_N1, CH_N2, CH_S1, CH_L};
      CH_W:  ok = (up_in != CH_E)  && (up_pos inside {POS_E, POS_NE, POS_SE});
      CH_N2: ok = (up_in != CH_S2) && (up_pos inside {POS_S, POS_E, POS_NE, POS_SE});
      CH_S2: ok = (up_in != CH_N2) && (up_pos inside {POS_N, POS_E, POS_NE, POS_SE});
      default: ok = 1'b1;
    endcase
    ignorable = check && (in_ch != CH_L) && ok;
    severe    = check && (in_ch != CH_L) && !ok;
  end
endmodule
