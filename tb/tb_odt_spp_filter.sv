// tb_odt_spp_filter: checks shortest path priority on the illegal-turn
// scenarios it is meant for (the packet's next router after W->N1, W->S1,
// N2->W, N2->S1, S2->N1, N2->N1 and S2->S1 turns), then checks general
// properties over all inputs and regions: the choice exists, is never a
// U-turn, never the local output short of the destination, and never leads away in x while an option that does neither exists.
module tb_odt_spp_filter;
  import odt_pkg::*;
  ch_e in_ch;
  pos_e pos;
  chmask_t legal, minc, exists, cand;
  int checks = 0, failures = 0;

  odt_spp_filter dut (.in_ch(in_ch), .pos(pos), .legal(legal), .minc(minc), .exists(exists), .cand(cand));
  odt_route_legal u_l (.in_ch(in_ch), .pos(pos), .legal(legal));
  odt_min_select u_m (.pos(pos), .src_x(3'd0), .dst_x(pos inside {POS_W, POS_NW, POS_SW} ? 3'd0 : 3'd7), .cand(minc));

  function automatic chmask_t b(ch_e c); return chmask_t'(1) << c; endfunction

  task automatic scen(string name, ch_e i, pos_e p, chmask_t exp);
    in_ch = i; pos = p; exists = '1;
    #1;
    checks++;
    if (cand != exp) begin
      failures++;
      $display("FAIL %s: cand=%b exp=%b", name, cand, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // After W->N1 upstream the packet enters at S1 heading NE: E or N2, never W or N1.
    scen("W->N1", CH_S1, POS_NE, b(CH_E) | b(CH_N2));
    // After W->S1 upstream it enters at N1 heading SE: E or S2.
    scen("W->S1", CH_N1, POS_SE, b(CH_E) | b(CH_S2));
    // After N2->W upstream it enters at E heading SE: only S2.
    scen("N2->W", CH_E, POS_SE, b(CH_S2));
    // After N2->N1 upstream it enters at S1 heading SE: only E.
    scen("N2->N1", CH_S1, POS_SE, b(CH_E));
    // After S2->S1 upstream it enters at N1 heading NE: only E.
    scen("S2->S1", CH_N1, POS_NE, b(CH_E));
    // After S2->N1 upstream it enters at S1 heading N: N2 only (N1 forbidden).
    scen("S2->N1", CH_S1, POS_N, b(CH_N2));
    // Destination west: the westbound channels are the ones kept.
    scen("west", CH_N1, POS_SW, b(CH_W) | b(CH_S1));

    for (int e = 0; e < 2; e++)
    for (int i = 0; i < 7; i++) for (int p = 0; p < 9; p++) begin
      chmask_t uturn, away;
      in_ch = ch_e'(i); pos = pos_e'(p);
      exists = e ? 7'b1001111 : 7'b1111111;   // e=1: bottom row
      #1;
      case (in_ch)
        CH_E: uturn = b(CH_E);  CH_W: uturn = b(CH_W);
        CH_N1, CH_N2: uturn = b(CH_N1) | b(CH_N2);
        CH_S1, CH_S2: uturn = b(CH_S1) | b(CH_S2);
        default: uturn = '0;
      endcase
      away = (pos inside {POS_W, POS_NW, POS_SW}) ? (b(CH_E) | b(CH_N2) | b(CH_S2))
                                                  : (b(CH_W) | b(CH_N1) | b(CH_S1));
      checks++;
      if (cand == '0 || (cand & ~exists) != '0) begin
        failures++; $display("FAIL empty/nonexistent in=%0d pos=%0d", i, p);
      end
      checks++;
      if ((exists & ~uturn & ~away) != '0 && (cand & (uturn | away)) != '0) begin
        failures++; $display("FAIL uturn/away in=%0d pos=%0d cand=%b", i, p, cand);
      end
      checks++;
      if (cand[CH_L] && pos != POS_L) begin
        failures++; $display("FAIL local output away from destination in=%0d pos=%0d", i, p);
      end
      checks++;
      if ((cand & minc) != '0 && (cand & ~minc) != '0) begin
        failures++; $display("FAIL mixed productive in=%0d pos=%0d", i, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
