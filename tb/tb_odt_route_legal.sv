// tb_odt_route_legal: checks the baseline eligibility rules against the
// baseline turn table: a turn marked allowed must be eligible for every
// destination region, one marked forbidden for none, and a conditional one
// for some regions but not all.  The L output must be eligible exactly when
// the destination is the node itself, and the conditional turns must follow
// the region lists of the rules.
module tb_odt_route_legal;
  import odt_pkg::*;
  ch_e in_ch;
  pos_e pos;
  chmask_t legal;
  int checks = 0, failures = 0;

  odt_route_legal dut (.in_ch(in_ch), .pos(pos), .legal(legal));

  // Rows: from E, W, N1, N2, S1, S2, L; columns: to E, W, N1, N2, S1, S2.
  // "Y" allowed, "X" forbidden, "C" conditional on the destination region.
  string table1 [7] = '{"XYYCYC", "CXXCXC", "CYXCYC", "CXXXXC",
                        "CYYCXC", "CXXCXX", "CYYCYC"};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) begin
      for (int o = 0; o < 6; o++) begin
        int n_ok;
        n_ok = 0;
        for (int p = 0; p < 9; p++) begin
          in_ch = ch_e'(i); pos = pos_e'(p);
          #1;
          n_ok += legal[o];
          // conditional turns: E needs an eastern component, N2/S2 need east or straight N/S
          if (table1[i][o] == "C") begin
            logic exp;
            case (o)
              0: exp = pos inside {POS_E, POS_NE, POS_SE};
              3: exp = pos inside {POS_N, POS_E, POS_NE, POS_SE};
              default: exp = pos inside {POS_S, POS_E, POS_NE, POS_SE};
            endcase
            checks++;
            if (legal[o] != exp) begin
              failures++;
              $display("FAIL cond in=%0d out=%0d pos=%0d", i, o, p);
            end
          end
          checks++;
          if (legal[CH_L] != (pos == POS_L)) begin
            failures++;
            $display("FAIL L in=%0d pos=%0d", i, p);
          end
        end
        checks++;
        case (table1[i][o])
          "Y": if (n_ok != 9) begin failures++; $display("FAIL Y in=%0d out=%0d", i, o); end
          "X": if (n_ok != 0) begin failures++; $display("FAIL X in=%0d out=%0d", i, o); end
          default: if (n_ok == 0 || n_ok == 9) begin failures++; $display("FAIL C in=%0d out=%0d", i, o); end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
