// tb_odt_spare_route: checks the spare options for every input and region,
// and that outputs missing at a mesh edge are removed.
module tb_odt_spare_route;
  import odt_pkg::*;
  ch_e in_ch;
  pos_e pos;
  chmask_t exists, spare;
  logic applies;
  int checks = 0, failures = 0;

  odt_spare_route dut (.in_ch(in_ch), .pos(pos), .exists(exists), .applies(applies), .spare(spare));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 3; e++)
    for (int i = 0; i < 7; i++) for (int p = 0; p < 9; p++) begin
      chmask_t exp;
      logic    exp_app;
      // e=0: interior node; e=1: top row (no N1/N2); e=2: bottom row (no S1/S2)
      exists = (e == 1) ? 7'b1110011 : (e == 2) ? 7'b1001111 : 7'b1111111;
      in_ch = ch_e'(i); pos = pos_e'(p);
      #1;
      exp = '0;
      exp_app = 1'b1;
      if (in_ch == CH_S2) exp = 7'b0000100;
      else if (in_ch == CH_N2) exp = 7'b0010000;
      else if (in_ch == CH_W) begin
        if (pos == POS_N || pos == POS_NE || pos == POS_NW) exp = 7'b0000100;
        else if (pos == POS_S || pos == POS_SE || pos == POS_SW) exp = 7'b0010000;
        else exp = 7'b0010100;
      end else exp_app = 1'b0;
      exp &= exists;
      checks++;
      if (spare != exp || applies != exp_app) begin
        failures++;
        $display("FAIL e=%0d in=%0d pos=%0d spare=%b exp=%b", e, i, p, spare, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
