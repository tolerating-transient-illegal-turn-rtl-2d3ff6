// tb_odt_mesh_full: the mesh at its default size (8x8, 4-flit buffers).
// Sends one packet corner to corner (head latency 4 cycles per router over
// 15 routers, body at one flit per cycle), then a transpose exchange
// (node (x,y) to (y,x)) from every off-diagonal node at once, then the same
// exchange again with transient routing faults injected; every packet must
// arrive intact at its destination.  Counts the routing mechanisms used.
module tb_odt_mesh_full;
  import odt_pkg::*;
  localparam int MX = 8, MY = 8, N = MX * MY, DEPTH = 4, PLEN = 4;

  logic clk = 0, rst_n = 0;
  logic    [N-1:0] inj_valid, inj_credit, ej_valid, ej_credit;
  flit_t   [N-1:0] inj_flit, ej_flit;
  chmask_t [N-1:0] fault_en;
  ch_e     [N-1:0][NCH-1:0] fault_ch;
  events_t [N-1:0] events;

  odt_mesh dut (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid), .inj_flit(inj_flit), .inj_credit(inj_credit),
    .ej_valid(ej_valid), .ej_flit(ej_flit), .ej_credit(ej_credit),
    .fault_en(fault_en), .fault_ch(fault_ch), .events(events)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  flit_t txq [N][$];
  int    cred [N];
  int    n_pkts = 0, n_done = 0;
  int    pkt_dst [int], pkt_got [int], pkt_t0 [int], pkt_t1 [int];
  int    cur_rx [N];
  int    fault_left [N][NCH];
  logic  inject_faults = 0;
  longint n_spp = 0, n_spare = 0, n_fault = 0, n_sev = 0;

  task automatic queue_pkt(int s, int d);
    int id;
    id = n_pkts++;
    pkt_dst[id] = d; pkt_got[id] = 0;
    for (int k = 0; k < PLEN; k++) begin
      flit_t f;
      f = '0;
      f.head = (k == 0); f.tail = (k == PLEN - 1); f.up_in = CH_L;
      f.src_x = 3'(s % MX); f.dst_x = 3'(d % MX); f.dst_y = 3'(d / MX);
      f.data = {16'(id), 16'(k)};
      txq[s].push_back(f);
    end
  endtask

  function automatic chmask_t exists_at(int r);
    int x, y;
    x = r % MX; y = r / MX;
    return chmask_t'(((x < MX - 1) ? 1 : 0) | ((x > 0) ? 2 : 0) | ((y < MY - 1) ? 12 : 0) | ((y > 0) ? 48 : 0));
  endfunction

  always @(negedge clk) begin
    inj_valid = '0; inj_flit = '0; ej_credit = '0;
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (txq[r].size() > 0 && cred[r] > 0) begin
          inj_valid[r] = 1'b1;
          inj_flit[r]  = txq[r].pop_front();
          if (inj_flit[r].head) pkt_t0[int'(inj_flit[r].data[31:16])] = cyc;
          cred[r]--;
        end
        ej_credit[r] = ej_valid[r];
        for (int c = 0; c < NCH; c++) begin
          if (fault_left[r][c] > 0) fault_left[r][c]--;
          else if (inject_faults && $urandom_range(0, 999) < 5) begin
            chmask_t e;
            int o;
            e = exists_at(r);
            do o = $urandom_range(0, 5); while (!e[o]);
            fault_ch[r][c] = ch_e'(o);
            fault_left[r][c] = $urandom_range(1, 6);
          end
          fault_en[r][c] = fault_left[r][c] > 0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int r = 0; r < N; r++) begin
      if (inj_credit[r]) cred[r]++;
      n_spp += $countones(events[r].rt_spp);
      n_spare += $countones(events[r].rt_spare);
      n_fault += $countones(events[r].rt_fault);
      n_sev += $countones(events[r].severe);
      if (ej_valid[r]) begin
        flit_t f;
        int id, k;
        f = ej_flit[r];
        id = int'(f.data[31:16]); k = int'(f.data[15:0]);
        checks++;
        if (!pkt_dst.exists(id) || pkt_dst[id] != r || k != pkt_got[id] ||
            (!f.head && cur_rx[r] != id)) begin
          failures++;
          if (failures < 10) $display("FAIL node %0d got pkt %0d flit %0d", r, id, k);
        end else begin
          if (f.head) cur_rx[r] = id;
          pkt_got[id]++;
          if (f.tail) begin n_done++; pkt_t1[id] = cyc; end
        end
      end
    end
  end

  task automatic drain(int max_cyc);
    for (int t = 0; t < max_cyc && n_done < n_pkts; t++) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  task automatic transpose();
    for (int s = 0; s < N; s++) begin
      int d;
      d = (s % MX) * MX + s / MX;
      if (d != s) queue_pkt(s, d);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog: done=%0d of %0d", n_done, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inj_valid = '0; inj_flit = '0; ej_credit = '0; fault_en = '0; fault_ch = '0;
    for (int r = 0; r < N; r++) begin
      cred[r] = DEPTH; cur_rx[r] = -1;
      for (int c = 0; c < NCH; c++) fault_left[r][c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    queue_pkt(0, N - 1);
    drain(1000);
    checks++;
    if (n_done != 1 || pkt_t1[0] - pkt_t0[0] != 4 * (MX + MY - 1) + PLEN - 1) begin
      failures++; $display("FAIL corner-to-corner latency %0d", pkt_t1[0] - pkt_t0[0]);
    end

    for (int rep = 0; rep < 4; rep++) transpose();
    drain(20000);
    checks++;
    if (n_done != n_pkts) begin failures++; $display("FAIL transpose delivered %0d of %0d", n_done, n_pkts); end
    checks++;
    if (n_spp + n_spare + n_fault + n_sev != 0) begin failures++; $display("FAIL fault-free run left normal routing"); end

    inject_faults = 1;
    for (int rep = 0; rep < 4; rep++) transpose();
    drain(20000);
    inject_faults = 0;
    drain(20000);
    checks++;
    if (n_done != n_pkts) begin failures++; $display("FAIL with faults delivered %0d of %0d", n_done, n_pkts); end
    checks++;
    if (n_fault == 0) begin failures++; $display("FAIL no fault injected"); end
    $display("packets=%0d delivered=%0d faults=%0d severe=%0d spp=%0d spare=%0d cycles=%0d",
             n_pkts, n_done, n_fault, n_sev, n_spp, n_spare, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
