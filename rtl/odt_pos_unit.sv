// odt_pos_unit: "Pos information" of the ODT routing computation.
//
// Compares a node's coordinates with a packet's destination and names the
// region the destination lies in: the node itself (L), straight east, west,
// north or south, or one of the four quadrants NE, NW, SE, SW.  North is +y and
// east is +x.  Purely combinational.  The regions are the document's; the
// coordinate convention follows its fault-detection figure, where the north
// neighbour of (Xc,Yc) is (Xc,Yc+1).
module odt_pos_unit
  import odt_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output pos_e               pos
);
  logic east, west, north, south;

  always_comb begin
    east  = dst_x > cur_x;
    west  = dst_x < cur_x;
    north = dst_y > cur_y;
    south = dst_y < cur_y;
    unique case ({east, west, north, south})
      4'b1010: pos = POS_NE;
      4'b1001: pos = POS_SE;
      4'b0110: pos = POS_NW;
      4'b0101: pos = POS_SW;
      4'b1000: pos = POS_E;
      4'b0100: pos = POS_W;
      4'b0010: pos = POS_N;
      4'b0001: pos = POS_S;
      default: pos = POS_L;
    endcase
  end
endmodule
