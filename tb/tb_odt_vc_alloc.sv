// tb_odt_vc_alloc: random traffic of packet requests against a model of
// channel ownership.  Checks that a grant goes only to a requester of a free
// output channel, at most one per channel, that ownership lasts until the
// release, and that no requester waits more than 60 cycles (round-robin).
module tb_odt_vc_alloc;
  import odt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] req, release_ch, gnt, busy;
  ch_e [NCH-1:0] req_ch;
  int checks = 0, failures = 0, contended = 0;
  logic [NCH-1:0] m_busy;        // model: output owned
  int own_left [NCH];            // model: cycles until owner releases
  int wait_cyc [NCH];
  logic [NCH-1:0] g;

  odt_vc_alloc dut (.clk(clk), .rst_n(rst_n), .req(req), .req_ch(req_ch),
                    .release_ch(release_ch), .gnt(gnt), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; release_ch = '0; req_ch = '0; m_busy = '0;
    for (int o = 0; o < NCH; o++) begin own_left[o] = 0; wait_cyc[o] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // new requests from idle inputs, mostly to outputs 0..2 to create contention
      for (int i = 0; i < NCH; i++) if (!req[i] && $urandom_range(0, 3) == 0) begin
        req[i] = 1'b1;
        req_ch[i] = ch_e'($urandom_range(0, 2) == 0 ? $urandom_range(0, 6) : $urandom_range(0, 2));
        wait_cyc[i] = 0;
      end
      release_ch = '0;
      for (int o = 0; o < NCH; o++) if (m_busy[o] && own_left[o] == 0) release_ch[o] = 1'b1;
      #1;
      checks++;
      if (busy != m_busy) begin failures++; $display("FAIL busy %b model %b", busy, m_busy); end
      for (int o = 0; o < NCH; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < NCH; i++) if (gnt[i] && req_ch[i] == ch_e'(o)) n++;
        checks++;
        if (n > 1 || (n == 1 && m_busy[o])) begin failures++; $display("FAIL grant out=%0d n=%0d", o, n); end
        if (!m_busy[o]) begin
          int r;
          r = 0;
          for (int i = 0; i < NCH; i++) if (req[i] && req_ch[i] == ch_e'(o)) r++;
          if (r > 1) contended++;
          checks++;
          if (r > 0 && n != 1) begin failures++; $display("FAIL no grant to free out=%0d", o); end
        end
      end
      for (int i = 0; i < NCH; i++) begin
        checks++;
        if (gnt[i] && !req[i]) begin failures++; $display("FAIL grant without request"); end
      end
      g = gnt;
      @(posedge clk);
      #1;
      for (int o = 0; o < NCH; o++) begin
        if (release_ch[o]) m_busy[o] = 1'b0;
        else if (m_busy[o]) own_left[o]--;
      end
      for (int i = 0; i < NCH; i++) begin
        if (g[i]) begin
          m_busy[req_ch[i]] = 1'b1;
          own_left[req_ch[i]] = $urandom_range(0, 6);
          req[i] = 1'b0;
        end else if (req[i]) begin
          wait_cyc[i]++;
          if (wait_cyc[i] == 60) begin failures++; $display("FAIL starvation input %0d", i); end
        end
      end
    end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention exercised"); end
    $display("contended=%0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
