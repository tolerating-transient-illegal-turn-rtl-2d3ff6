// tb_odt_input_unit: one W input channel at node (3,3).  The testbench plays
// the upstream router (credit-based sending of 4-flit packets) and the
// allocators (grants after a random delay).  It checks the routed output
// channel and mode of each packet, that flits leave in order with the
// upstream-input field of the head rewritten to W, the routing latency
// (head visible -> VA request two cycles after the write), that spare
// routing withholds credits until the packet's tail has left, and that
// every credit comes back in the end.  The block starts once the
// spare-routed packet's tail is in the buffer.
module tb_odt_input_unit;
  import odt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, credit, fault_en, va_req, sa_req, va_gnt, sa_gnt;
  flit_t wr_flit, out_flit;
  ch_e fault_ch, req_ch;
  logic [NCH-1:0][2:0] free;
  logic ev_normal, ev_spp, ev_spare, ev_fault, ev_ign, ev_sev, ev_blocked;
  int checks = 0, failures = 0;
  int credits = 4, returned = 0, sent = 0, cyc = 0;
  int n_spare = 0, n_fault = 0, n_normal = 0, cred_while_blocked = 0;
  flit_t exp_q[$];

  odt_input_unit #(.IN_CH(CH_W), .DEPTH(4), .CRED_W(3)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_flit(wr_flit), .credit(credit),
    .cur_x(3'd3), .cur_y(3'd3), .exists('1), .free(free),
    .fault_en(fault_en), .fault_ch(fault_ch),
    .va_req(va_req), .sa_req(sa_req), .req_ch(req_ch), .va_gnt(va_gnt), .sa_gnt(sa_gnt),
    .out_flit(out_flit), .ev_normal(ev_normal), .ev_spp(ev_spp), .ev_spare(ev_spare),
    .ev_fault(ev_fault), .ev_ignorable(ev_ign), .ev_severe(ev_sev), .ev_blocked(ev_blocked)
  );

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Allocator model and output checking.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (credit) begin
      returned <= returned + 1;
      if (ev_blocked) cred_while_blocked <= cred_while_blocked + 1;
    end
    n_spare  <= n_spare + ev_spare;
    n_fault  <= n_fault + ev_fault;
    n_normal <= n_normal + ev_normal;
    if (sa_req && sa_gnt) begin
      flit_t e;
      e = exp_q.pop_front();
      if (e.head) e.up_in = CH_W;
      checks++;
      if (out_flit != e) begin failures++; $display("FAIL flit order/content"); end
    end
  end

  always @(negedge clk) begin
    va_gnt = va_req && ($urandom_range(0, 2) == 0);
    sa_gnt = sa_req && ($urandom_range(0, 1) == 0);
  end

  task automatic send_packet(int dx, int dy, ch_e up, output int wr_cycle);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      while (credits == 0) @(negedge clk);
      wr_en = 1;
      wr_flit = '0;
      wr_flit.head = (k == 0); wr_flit.tail = (k == 3);
      wr_flit.up_in = up; wr_flit.src_x = 3'd0;
      wr_flit.dst_x = 3'(dx); wr_flit.dst_y = 3'(dy);
      wr_flit.data = $urandom;
      if (k == 0) wr_cycle = cyc;
      exp_q.push_back(wr_flit);
      credits--;
      @(posedge clk);
      #1 wr_en = 0;
    end
  endtask

  always @(posedge clk) if (credit) credits <= credits + 1;

  task automatic expect_route(string name, ch_e o, int wr_cycle, logic spare);
    int t0;
    t0 = cyc;
    while (!va_req) @(posedge clk);
    checks++;
    if (req_ch != o) begin failures++; $display("FAIL %s route %s", name, req_ch.name()); end
    checks++;
    if (!spare && wr_cycle >= 0 && cyc - wr_cycle != 2) begin
      failures++; $display("FAIL %s latency %0d", name, cyc - wr_cycle);
    end
    if (spare) begin
      for (int w = 0; w < 8 && !ev_blocked; w++) @(posedge clk);
      checks++;
      if (!ev_blocked) begin failures++; $display("FAIL %s not blocked", name); end
    end
  endtask

  initial begin
    int wc;
    wr_en = 0; wr_flit = '0; fault_en = 0; fault_ch = CH_E;
    for (int c = 0; c < NCH; c++) free[c] = 3'd4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Normal: east destination.
    fork send_packet(6, 3, CH_L, wc); join_none
    #15;
    @(posedge clk); expect_route("east", CH_E, -1, 0);
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    // Spare: destination west (no baseline option on the W input).
    fork send_packet(1, 4, CH_L, wc); join_none
    @(posedge clk); expect_route("spare", CH_N1, -1, 1);
    wait (exp_q.size() == 0);
    repeat (8) @(posedge clk);
    // Fault injection forces S1.
    fault_en = 1; fault_ch = CH_S1;
    fork send_packet(6, 5, CH_L, wc); join_none
    @(posedge clk); expect_route("fault", CH_S1, -1, 0);
    fault_en = 0;
    wait (exp_q.size() == 0);
    repeat (8) @(posedge clk);
    // Latency: head written into an idle unit, VA requested 2 cycles later.
    begin
      int wcyc;
      @(negedge clk);
      wr_en = 1; wr_flit = '0; wr_flit.head = 1; wr_flit.tail = 1;
      wr_flit.up_in = CH_L; wr_flit.dst_x = 3'd6; wr_flit.dst_y = 3'd6;
      exp_q.push_back(wr_flit); credits--;
      @(posedge clk); wcyc = cyc; #1 wr_en = 0;
      while (!va_req) @(posedge clk);
      checks++;
      if (cyc - wcyc != 2) begin failures++; $display("FAIL latency %0d", cyc - wcyc); end
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    sent = 13;
    checks++;
    if (returned != sent) begin failures++; $display("FAIL credits returned %0d of %0d", returned, sent); end
    checks++;
    if (cred_while_blocked != 0) begin failures++; $display("FAIL credit while blocked"); end
    checks++;
    if (n_spare != 1 || n_fault != 1 || n_normal != 2) begin
      failures++; $display("FAIL mode counts spare=%0d fault=%0d normal=%0d", n_spare, n_fault, n_normal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
