// tb_odt_pos_unit: exhaustive check of the destination-region computation
// over every pair of nodes of an 8x8 mesh, against a reference that works
// from the signs of the coordinate differences.
module tb_odt_pos_unit;
  import odt_pkg::*;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  pos_e pos;
  int checks = 0, failures = 0;

  odt_pos_unit dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .pos(pos));

  function automatic pos_e ref_pos(int ddx, int ddy);
    string s;
    s = {ddy > 0 ? "N" : ddy < 0 ? "S" : "", ddx > 0 ? "E" : ddx < 0 ? "W" : ""};
    case (s)
      "":   return POS_L;   "E":  return POS_E;   "W":  return POS_W;
      "N":  return POS_N;   "S":  return POS_S;   "NE": return POS_NE;
      "NW": return POS_NW;  "SE": return POS_SE;  default: return POS_SW;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++)
    for (int c = 0; c < 8; c++) for (int d = 0; d < 8; d++) begin
      cx = 3'(a); cy = 3'(b); dx = 3'(c); dy = 3'(d);
      #1;
      checks++;
      if (pos != ref_pos(c - a, d - b)) begin
        failures++;
        if (failures < 10) $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) pos=%s", a, b, c, d, pos.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
