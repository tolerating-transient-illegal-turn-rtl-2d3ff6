// tb_odt_fault_judge: checks the ignorable/severe classification for every
// current input, every upstream input and every destination in an 8x8 mesh,
// seen from node (3,3).  The reference recomputes where the upstream router
// is and which turn it took, and applies the classification rules directly.
module tb_odt_fault_judge;
  import odt_pkg::*;
  logic check;
  ch_e in_ch, up_in;
  logic [COORD_W-1:0] dx, dy;
  logic ign, sev;
  int checks = 0, failures = 0;
  int n_ign = 0, n_sev = 0;

  odt_fault_judge dut (
    .check(check), .in_ch(in_ch), .up_in(up_in), .cur_x(3'd3), .cur_y(3'd3),
    .dst_x(dx), .dst_y(dy), .ignorable(ign), .severe(sev)
  );

  // Upstream-router view: destination has an eastern component / is
  // straight north / straight south.
  function automatic logic ref_ok(ch_e i, ch_e u, int ux, int uy, int tx, int ty);
    logic east, n_only, s_only;
    east   = tx > ux;
    n_only = tx == ux && ty > uy;
    s_only = tx == ux && ty < uy;
    case (i)
      CH_N1: return u != CH_S1 && u != CH_S2;
      CH_S1: return u != CH_N1 && u != CH_N2;
      CH_E:  return u != CH_W  && u != CH_S2;
      CH_W:  return u != CH_E  && east;
      CH_N2: return u != CH_S2 && (east || s_only);
      CH_S2: return u != CH_N2 && (east || n_only);
      default: return 1'b1;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) for (int u = 0; u < 7; u++)
    for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++) begin
      int ux, uy;
      logic ok;
      ux = 3; uy = 3;
      case (ch_e'(i))
        CH_E: ux = 4;  CH_W: ux = 2;
        CH_N1, CH_N2: uy = 4;
        CH_S1, CH_S2: uy = 2;
        default: ;
      endcase
      check = 1'b1; in_ch = ch_e'(i); up_in = ch_e'(u); dx = 3'(x); dy = 3'(y);
      #1;
      ok = ref_ok(ch_e'(i), ch_e'(u), ux, uy, x, y);
      checks++;
      if (ch_e'(i) == CH_L) begin
        if (ign || sev) begin failures++; $display("FAIL local judged"); end
      end else if (ign != ok || sev != !ok) begin
        failures++;
        if (failures < 10) $display("FAIL in=%0d up=%0d dst=(%0d,%0d) ign=%0d sev=%0d", i, u, x, y, ign, sev);
      end
      n_ign += ign; n_sev += sev;
      check = 1'b0;
      #1;
      checks++;
      if (ign || sev) begin failures++; $display("FAIL flags without check"); end
    end
    checks++;
    if (n_ign == 0 || n_sev == 0) failures++;
    $display("ignorable=%0d severe=%0d", n_ign, n_sev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
