// tb_odt_mesh: end-to-end test of a 4x4 ODT mesh.
//   Phase 1: one packet from corner (0,0) to corner (3,3); the head must
//            take 4 cycles per router (7 routers) and the body follow at one
//            flit per cycle.
//   Phase 2: fault-free uniform random traffic from every node; every packet
//            must arrive intact at its destination and only normal routing
//            may be used.
//   Phase 3: the same traffic with transient routing faults injected into
//            random input channels of random routers (a forced, possibly
//            illegal, output for a few cycles).  Every packet must still
//            arrive intact at its destination.
// Each mechanism the routers implement must show up at least once: normal
// routing, spare routing, shortest path priority, injected faults, ignorable
// and severe fault judgments, VC allocation waits, switch/credit waits and
// spare-routing input blocks.
module tb_odt_mesh;
  import odt_pkg::*;
  localparam int MX = 4, MY = 4, N = MX * MY, DEPTH = 4, PLEN = 4;

  logic clk = 0, rst_n = 0;
  logic    [N-1:0] inj_valid, inj_credit, ej_valid, ej_credit;
  flit_t   [N-1:0] inj_flit, ej_flit;
  chmask_t [N-1:0] fault_en;
  ch_e     [N-1:0][NCH-1:0] fault_ch;
  events_t [N-1:0] events;

  odt_mesh #(.MESH_X(MX), .MESH_Y(MY), .DEPTH(DEPTH)) dut (
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
  longint ev_cnt [9];
  string  ev_name [9] = '{"normal", "spp", "spare", "fault", "ignorable", "severe",
                          "va_wait", "sa_wait", "blocked"};

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

  // Injection, credit return and fault injection, all driven at the falling edge.
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
        ej_credit[r] = ej_valid[r];   // the node consumes each flit at once
        for (int c = 0; c < NCH; c++) begin
          if (fault_left[r][c] > 0) fault_left[r][c]--;
          else if (inject_faults && $urandom_range(0, 999) < 3) begin
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
      ev_cnt[0] += $countones(events[r].rt_normal);
      ev_cnt[1] += $countones(events[r].rt_spp);
      ev_cnt[2] += $countones(events[r].rt_spare);
      ev_cnt[3] += $countones(events[r].rt_fault);
      ev_cnt[4] += $countones(events[r].ignorable);
      ev_cnt[5] += $countones(events[r].severe);
      ev_cnt[6] += $countones(events[r].va_wait);
      ev_cnt[7] += $countones(events[r].sa_wait);
      ev_cnt[8] += $countones(events[r].blocked);
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

  task automatic random_traffic(int cycles, int pct);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      for (int s = 0; s < N; s++)
        if ($urandom_range(0, 99) < pct && txq[s].size() < 4 * PLEN) begin
          int d;
          do d = $urandom_range(0, N - 1); while (d == s);
          queue_pkt(s, d);
        end
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog: done=%0d of %0d", n_done, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint base_nonnormal;
    inj_valid = '0; inj_flit = '0; ej_credit = '0; fault_en = '0; fault_ch = '0;
    for (int r = 0; r < N; r++) begin
      cred[r] = DEPTH; cur_rx[r] = -1;
      for (int c = 0; c < NCH; c++) fault_left[r][c] = 0;
    end
    for (int e = 0; e < 9; e++) ev_cnt[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Phase 1: latency of a lone packet across the mesh.
    queue_pkt(0, N - 1);
    drain(500);
    checks++;
    if (n_done != 1 || pkt_t1[0] - pkt_t0[0] != 4 * (MX + MY - 1) + PLEN - 1) begin
      failures++;
      $display("FAIL corner-to-corner latency %0d", pkt_t1[0] - pkt_t0[0]);
    end

    // Phase 2: fault-free random traffic.
    random_traffic(2000, 4);
    drain(20000);
    checks++;
    if (n_done != n_pkts) begin failures++; $display("FAIL fault-free delivered %0d of %0d", n_done, n_pkts); end
    checks++;
    base_nonnormal = ev_cnt[1] + ev_cnt[2] + ev_cnt[3] + ev_cnt[5];
    if (base_nonnormal != 0) begin failures++; $display("FAIL fault-free traffic left normal routing"); end
    $display("fault-free: %0d packets", n_pkts);

    // Phase 3: traffic with transient routing faults.
    inject_faults = 1;
    random_traffic(4000, 3);
    inject_faults = 0;
    drain(40000);
    checks++;
    if (n_done != n_pkts) begin failures++; $display("FAIL with faults delivered %0d of %0d", n_done, n_pkts); end
    $display("with faults: %0d packets in total, %0d delivered", n_pkts, n_done);

    for (int e = 0; e < 9; e++) begin
      $display("mechanism %-9s %0d", ev_name[e], ev_cnt[e]);
      checks++;
      if (ev_cnt[e] == 0) begin failures++; $display("FAIL mechanism %s never happened", ev_name[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
