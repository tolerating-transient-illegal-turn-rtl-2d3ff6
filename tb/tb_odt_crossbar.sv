// tb_odt_crossbar: random one-grant-per-link patterns; every granted flit
// must appear on the link of its output channel with the right VC bit, and
// ungranted links must be idle.
module tb_odt_crossbar;
  import odt_pkg::*;
  logic [NCH-1:0] gnt;
  ch_e [NCH-1:0] sel_ch;
  flit_t [NCH-1:0] in_flit;
  logic [NLINK-1:0] out_valid, out_vc;
  flit_t [NLINK-1:0] out_flit;
  int checks = 0, failures = 0;

  odt_crossbar dut (.gnt(gnt), .sel_ch(sel_ch), .in_flit(in_flit),
                    .out_valid(out_valid), .out_vc(out_vc), .out_flit(out_flit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int owner [NLINK];
      logic [NLINK-1:0] used;
      used = '0;
      gnt = '0;
      for (int i = 0; i < NCH; i++) begin
        int l;
        sel_ch[i] = ch_e'($urandom_range(0, 6));
        in_flit[i] = flit_t'({$urandom, $urandom});
        case (sel_ch[i]) CH_E: l = 0; CH_W: l = 1; CH_N1, CH_N2: l = 2; CH_S1, CH_S2: l = 3; default: l = 4; endcase
        if (!used[l] && $urandom_range(0, 1)) begin
          used[l] = 1'b1; owner[l] = i; gnt[i] = 1'b1;
        end
      end
      #1;
      for (int l = 0; l < NLINK; l++) begin
        checks++;
        if (out_valid[l] != used[l]) begin failures++; $display("FAIL valid link %0d", l); end
        else if (used[l]) begin
          checks++;
          if (out_flit[l] != in_flit[owner[l]] ||
              out_vc[l] != (sel_ch[owner[l]] == CH_N2 || sel_ch[owner[l]] == CH_S2)) begin
            failures++; $display("FAIL data link %0d", l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
