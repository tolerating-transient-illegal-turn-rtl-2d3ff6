// odt_spare_route: spare routing options of ODT.
//
// After an illegal turn upstream, a packet can sit at an input for which the
// baseline algorithm offers no output towards its destination: the W input
// with the destination west, north-west, south-west or north, the N2 input
// with it west, north-west or south-west, and the S2 input with it west,
// north-west, south-west or south.  Spare routing then supplies a fixed
// option per input:
//   S2 input -> N1,  N2 input -> S1,  W input -> N1 or S1.
// Those options are the document's.  For the W input this design takes N1 when
// the destination has a northern component, S1 when it has a southern one, and
// leaves both to the congestion-based selection when it is straight west.
// Outputs that do not exist at a mesh edge are removed.  `applies` says the
// input is one spare routing serves.  Purely combinational.
module odt_spare_route
  import odt_pkg::*;
(
  input  ch_e     in_ch,
  input  pos_e    pos,
  input  chmask_t exists,
  output logic    applies,
  output chmask_t spare
);
  always_comb begin
    spare   = '0;
    applies = 1'b1;
    unique case (in_ch)
      CH_S2: spare[CH_N1] = 1'b1;
      CH_N2: spare[CH_S1] = 1'b1;
      CH_W: begin
        if (pos inside {POS_N, POS_NW, POS_NE})      spare[CH_N1] = 1'b1;
        else if (pos inside {POS_S, POS_SW, POS_SE}) spare[CH_S1] = 1'b1;
        else begin
          spare[CH_N1] = 1'b1;
          spare[CH_S1] = 1'b1;
        end
      end
      default: applies = 1'b0;
    endcase
    spare &= exists;
  end
endmodule
