// tb_odt_min_select: checks the minimal candidate sets for every
// destination region, with the destination west and east of the source.
module tb_odt_min_select;
  import odt_pkg::*;
  pos_e pos;
  logic [COORD_W-1:0] sx, dx;
  chmask_t cand;
  int checks = 0, failures = 0;

  odt_min_select dut (.pos(pos), .src_x(sx), .dst_x(dx), .cand(cand));

  function automatic chmask_t m(string s);
    chmask_t r = '0;
    for (int k = 0; k < s.len(); k += 2)
      case (s.substr(k, k + 1))
        "E_": r[CH_E] = 1; "W_": r[CH_W] = 1; "N1": r[CH_N1] = 1; "N2": r[CH_N2] = 1;
        "S1": r[CH_S1] = 1; "S2": r[CH_S2] = 1; default: r[CH_L] = 1;
      endcase
    return r;
  endfunction

  task automatic chk(pos_e p, logic west, chmask_t exp);
    pos = p;
    sx = west ? 3'd5 : 3'd2;
    dx = 3'd3;
    #1;
    checks++;
    if (cand != exp) begin
      failures++;
      $display("FAIL pos=%s west=%0d cand=%b exp=%b", p.name(), west, cand, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++) begin
      chk(POS_L, w[0], m("L_"));
      chk(POS_E, w[0], m("E_"));
      chk(POS_W, w[0], m("W_"));
      chk(POS_NE, w[0], m("E_N2"));
      chk(POS_SE, w[0], m("E_S2"));
      chk(POS_SW, w[0], m("W_S1"));
      chk(POS_NW, w[0], m("W_N1"));
    end
    chk(POS_N, 1'b1, m("N1"));
    chk(POS_N, 1'b0, m("N2"));
    chk(POS_S, 1'b1, m("S1"));
    chk(POS_S, 1'b0, m("S2"));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
