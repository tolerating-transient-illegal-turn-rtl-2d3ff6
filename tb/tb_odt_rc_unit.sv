// tb_odt_rc_unit: directed routing scenarios at node (3,3) of an 8x8 mesh
// (fault-free minimal routing with congestion choice, the three spare-routing
// inputs, shortest path priority after a U-turn upstream, fault judgment,
// fault injection) and the west-edge node (0,3), followed by random heads
// whose routes must always exist and, in normal mode, be minimal.
module tb_odt_rc_unit;
  import odt_pkg::*;
  logic check;
  ch_e in_ch, out_ch, fault_ch;
  flit_t head;
  logic [COORD_W-1:0] cx, cy;
  chmask_t exists;
  logic [NCH-1:0][2:0] free;
  logic fault_en, ign, sev;
  rmode_e mode;
  int checks = 0, failures = 0;

  odt_rc_unit #(.CRED_W(3)) dut (
    .check(check), .in_ch(in_ch), .head(head), .cur_x(cx), .cur_y(cy), .exists(exists),
    .free(free), .fault_en(fault_en), .fault_ch(fault_ch), .out_ch(out_ch),
    .mode_out(mode), .ignorable(ign), .severe(sev)
  );

  task automatic route(ch_e i, ch_e up, int sx, int dx, int dy);
    check = 1'b1; in_ch = i;
    head = '0; head.head = 1'b1; head.up_in = up;
    head.src_x = 3'(sx); head.dst_x = 3'(dx); head.dst_y = 3'(dy);
    #1;
  endtask

  task automatic expect_rt(string name, ch_e o, rmode_e m, logic e_ign, logic e_sev);
    checks++;
    if (out_ch != o || mode != m || ign != e_ign || sev != e_sev) begin
      failures++;
      $display("FAIL %s: out=%s mode=%s ign=%0d sev=%0d", name, out_ch.name(), mode.name(), ign, sev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cx = 3; cy = 3; exists = '1; fault_en = 0; fault_ch = CH_E;
    for (int c = 0; c < NCH; c++) free[c] = 3'd4;

    // Fault-free: NE destination, the emptier of E and N2 wins.
    free[CH_N2] = 3'd2;
    route(CH_L, CH_L, 3, 5, 5); expect_rt("NE prefers E", CH_E, RM_NORMAL, 0, 0);
    free[CH_N2] = 3'd4; free[CH_E] = 3'd1;
    route(CH_L, CH_L, 3, 5, 5); expect_rt("NE prefers N2", CH_N2, RM_NORMAL, 0, 0);
    free[CH_E] = 3'd4;
    route(CH_W, CH_L, 1, 3, 3); expect_rt("arrived", CH_L, RM_NORMAL, 1, 0);
    // Straight north, destination west of source: N1; east of source: N2.
    route(CH_S1, CH_N1, 6, 3, 6); expect_rt("N west spp", CH_N1, RM_SPP, 0, 1);
    route(CH_S1, CH_S1, 6, 3, 6); expect_rt("N west ok", CH_N1, RM_NORMAL, 1, 0);
    route(CH_W, CH_L, 0, 3, 6);   expect_rt("W in, N, east", CH_N2, RM_NORMAL, 1, 0);
    route(CH_N1, CH_E, 3, 3, 0);  expect_rt("S", CH_S2, RM_NORMAL, 1, 0);

    // Spare routing: W input, destination west (no baseline option).
    free[CH_N1] = 3'd2; free[CH_S1] = 3'd3;
    route(CH_W, CH_L, 0, 1, 3); expect_rt("spare W->S1", CH_S1, RM_SPARE, 0, 1);
    route(CH_W, CH_L, 0, 1, 5); expect_rt("spare W NW->N1", CH_N1, RM_SPARE, 0, 1);
    route(CH_S2, CH_S2, 0, 3, 1); expect_rt("spare S2->N1", CH_N1, RM_SPARE, 0, 1);
    route(CH_N2, CH_N2, 7, 1, 5); expect_rt("spare N2->S1", CH_S1, RM_SPARE, 0, 1);
    for (int c = 0; c < NCH; c++) free[c] = 3'd4;

    // Shortest path priority after an upstream U-turn (E input, upstream input W).
    route(CH_E, CH_W, 0, 5, 2); expect_rt("spp", CH_S2, RM_SPP, 0, 1);
    // Severe on N1 (upstream S2->S1), destination NE: E only.
    route(CH_N1, CH_S2, 0, 5, 5); expect_rt("spp N1", CH_E, RM_SPP, 0, 1);

    // Injected fault overrides the decision.
    fault_en = 1; fault_ch = CH_W;
    route(CH_L, CH_L, 3, 5, 5); expect_rt("fault", CH_W, RM_FAULT, 0, 0);
    // At the west edge the W output does not exist: the fault is ignored.
    cx = 0; exists = 7'b1111101;
    route(CH_L, CH_L, 0, 5, 5); expect_rt("fault off-mesh", CH_E, RM_NORMAL, 0, 0);
    fault_en = 0;
    // West edge, W input cannot occur; E input heading west with nothing west: SPP keeps on-mesh.
    route(CH_E, CH_W, 0, 0, 6); expect_rt("edge spp", CH_N2, RM_SPP, 0, 1);

    // Random heads: routes exist; normal-mode routes are minimal.
    for (int t = 0; t < 3000; t++) begin
      int x, y;
      x = $urandom_range(0, 7); y = $urandom_range(0, 7);
      cx = 3'(x); cy = 3'(y);
      exists = chmask_t'(((x < 7) ? 1 : 0) | ((x > 0) ? 2 : 0) | ((y < 7) ? 12 : 0) | ((y > 0) ? 48 : 0) | 64);
      for (int c = 0; c < NCH; c++) free[c] = 3'($urandom_range(0, 4));
      route(ch_e'($urandom_range(0, 6)), ch_e'($urandom_range(0, 6)),
            $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7));
      checks++;
      if (!exists[out_ch]) begin failures++; $display("FAIL off-mesh route"); end
      if (mode == RM_NORMAL) begin
        int ddx, ddy;
        ddx = int'(head.dst_x) - x; ddy = int'(head.dst_y) - y;
        checks++;
        if (!((out_ch == CH_E && ddx > 0) || (out_ch == CH_W && ddx < 0) ||
              (out_ch inside {CH_N1, CH_N2} && ddy > 0) || (out_ch inside {CH_S1, CH_S2} && ddy < 0) ||
              (out_ch == CH_L && ddx == 0 && ddy == 0))) begin
          failures++; $display("FAIL non-minimal normal route");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
