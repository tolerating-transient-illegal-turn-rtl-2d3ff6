// tb_odt_out_select: random candidate sets and free-slot counts; the chosen
// output must be a candidate, no candidate may have more free slots, and on
// a tie the lowest channel wins.
module tb_odt_out_select;
  import odt_pkg::*;
  chmask_t cand;
  logic [NCH-1:0][2:0] free;
  logic valid;
  ch_e sel;
  int checks = 0, failures = 0;

  odt_out_select #(.CRED_W(3)) dut (.cand(cand), .free(free), .valid(valid), .sel(sel));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      cand = chmask_t'($urandom);
      for (int c = 0; c < NCH; c++) free[c] = 3'($urandom_range(0, 4));
      #1;
      checks++;
      if (valid != (cand != '0)) begin failures++; $display("FAIL valid"); end
      if (cand != '0) begin
        checks++;
        if (!cand[sel]) begin failures++; $display("FAIL not a candidate"); end
        for (int c = 0; c < NCH; c++) if (cand[c]) begin
          checks++;
          if (free[c] > free[sel] || (free[c] == free[sel] && c < int'(sel))) begin
            failures++;
            $display("FAIL cand=%b sel=%0d c=%0d", cand, sel, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
