// tb_odt_switch_alloc: random requests; checks that each physical link gets
// at most one flit per cycle (N1/N2 and S1/S2 share a link), that a granted
// input had a request and a credit, that a link with an eligible requester is
// never left idle, and that round-robin serves every persistent requester.
module tb_odt_switch_alloc;
  import odt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] req, credit_ok, gnt;
  ch_e [NCH-1:0] req_ch;
  int checks = 0, failures = 0, shared = 0;
  int wait_cyc [NCH];

  odt_switch_alloc dut (.clk(clk), .rst_n(rst_n), .req(req), .req_ch(req_ch),
                        .credit_ok(credit_ok), .gnt(gnt));

  always #5 clk = ~clk;

  function automatic int lk(ch_e c);
    case (c) CH_E: return 0; CH_W: return 1; CH_N1, CH_N2: return 2; CH_S1, CH_S2: return 3; default: return 4; endcase
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; credit_ok = '0; req_ch = '0;
    for (int i = 0; i < NCH; i++) wait_cyc[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NCH; i++) begin
        req[i] = $urandom_range(0, 3) != 0;
        req_ch[i] = ch_e'(t < 2000 ? ((i + t / 100) % NCH) : $urandom_range(2, 5));
      end
      credit_ok = chmask_t'($urandom) | (t < 2000 ? chmask_t'('1) : '0);
      #1;
      for (int l = 0; l < NLINK; l++) begin
        int n, e, chans;
        n = 0; e = 0; chans = 0;
        for (int i = 0; i < NCH; i++) if (lk(req_ch[i]) == l) begin
          if (gnt[i]) n++;
          if (req[i] && credit_ok[req_ch[i]]) e++;
        end
        if (e > 1) shared++;
        checks++;
        if (n > 1 || (e > 0 && n == 0)) begin failures++; $display("FAIL link %0d n=%0d e=%0d", l, n, e); end
      end
      for (int i = 0; i < NCH; i++) begin
        checks++;
        if (gnt[i] && !(req[i] && credit_ok[req_ch[i]])) begin failures++; $display("FAIL bad grant"); end
        if (req[i] && credit_ok[req_ch[i]] && !gnt[i]) wait_cyc[i]++;
        if (gnt[i]) wait_cyc[i] = 0;
        if (wait_cyc[i] > 40) begin failures++; wait_cyc[i] = 0; $display("FAIL starvation %0d", i); end
      end
      @(posedge clk);
    end
    checks++;
    if (shared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
