// tb_odt_traffic: the mesh at its default size (8x8) under the four synthetic
// traffic patterns used to evaluate the scheme, each at three routing-fault
// levels (0 %, 2 % and 4 % of the routing-computation modules).
//
// Patterns (node (x,y), id = y*8+x):
//   uniform    : random destination other than the source
//   transpose1 : (x,y) -> (7-y, 7-x)
//   transpose2 : (x,y) -> (y, x)
//   shuffle    : id rotated left by one bit (6-bit ids)
// The two transpose orientations are this bench's reading; nodes that map to
// themselves stay silent.  Every node offers 4-flit packets at random with a
// fixed rate; latency runs from packet creation to tail delivery.
//
// Fault model: during injection the faulty set is redrawn every PAT_CYC
// cycles (a sequence of fault patterns, as in a dynamic fault campaign).  The
// number of faulty modules is the percentage of 864 routing modules, the
// network size the evaluation counts; they are drawn from the input channels
// that exist in this mesh, and each forces every head flit it routes to one
// random existing output other than Local.  Faults stop when injection stops;
// the mesh is then drained.  A packet that is still in the network at the end
// counts as lost (not delivered); the mesh is reset before the next run.
//
// Checks: every delivered flit reaches its own destination, in order, without
// interleaving; the fault-free runs deliver every packet; the faulty runs
// deliver at least 10 % of theirs (a floor that only shows the network keeps
// moving: a forced turn can close a cycle of waiting packets that never
// clears, and every packet queued behind it is then lost; the printed
// delivery rates are the measurement); faults, severe judgements, spare
// routing and shortest-path priority each happen at least once.
module tb_odt_traffic;
  import odt_pkg::*;
  localparam int MX = 8, MY = 8, N = MX * MY, DEPTH = 4, PLEN = 4;
  localparam int RATE_PM = 15;        // packets per node per 1000 cycles
  localparam int T_INJ = 1500, T_DRAIN = 4000, PAT_CYC = 100;
  localparam int RC_MODULES = 864;

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
  int    n_pkts, n_done;
  int    pkt_dst [int], pkt_got [int], pkt_t0 [int];
  int    cur_rx [N];
  longint lat_sum;
  logic  gen_on = 0;
  int    pattern = 0;
  longint n_spp = 0, n_spare = 0, n_fault = 0, n_sev = 0, n_ign = 0;

  function automatic chmask_t exists_at(int r);
    int x, y;
    x = r % MX; y = r / MX;
    return chmask_t'(((x < MX - 1) ? 1 : 0) | ((x > 0) ? 2 : 0) | ((y < MY - 1) ? 12 : 0) |
                     ((y > 0) ? 48 : 0) | 64);
  endfunction

  function automatic int dest_of(int s);
    int x, y;
    x = s % MX; y = s / MX;
    case (pattern)
      0: begin
        int d;
        do d = $urandom_range(0, N - 1); while (d == s);
        return d;
      end
      1: return (MX - 1 - x) * MX + (MY - 1 - y);
      2: return x * MX + y;
      default: return ((s << 1) | (s >> 5)) & (N - 1);
    endcase
  endfunction

  task automatic queue_pkt(int s, int d);
    int id;
    id = n_pkts++;
    pkt_dst[id] = d; pkt_got[id] = 0; pkt_t0[id] = cyc;
    for (int k = 0; k < PLEN; k++) begin
      flit_t f;
      f = '0;
      f.head = (k == 0); f.tail = (k == PLEN - 1); f.up_in = CH_L;
      f.src_x = 3'(s % MX); f.dst_x = 3'(d % MX); f.dst_y = 3'(d / MX);
      f.data = {16'(id), 16'(k)};
      txq[s].push_back(f);
    end
  endtask

  // drive inputs away from the sampling edge
  always @(negedge clk) begin
    inj_valid = '0; inj_flit = '0; ej_credit = '0;
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (gen_on && $urandom_range(0, 999) < RATE_PM) begin
          int d;
          d = dest_of(r);
          if (d != r) queue_pkt(r, d);
        end
        if (txq[r].size() > 0 && cred[r] > 0) begin
          inj_valid[r] = 1'b1;
          inj_flit[r]  = txq[r].pop_front();
          cred[r]--;
        end
        ej_credit[r] = ej_valid[r];
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int r = 0; r < N; r++) begin
      if (inj_credit[r]) cred[r]++;
      n_spp   += $countones(events[r].rt_spp);
      n_spare += $countones(events[r].rt_spare);
      n_fault += $countones(events[r].rt_fault);
      n_sev   += $countones(events[r].severe);
      n_ign   += $countones(events[r].ignorable);
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
          if (f.tail) begin n_done++; lat_sum += longint'(cyc - pkt_t0[id]); end
        end
      end
    end
  end

  // draw a fresh fault pattern with nf faulty routing modules
  task automatic draw_faults(int nf);
    fault_en = '0;
    for (int i = 0; i < nf; i++) begin
      int r, c, o;
      chmask_t e;
      r = $urandom_range(0, N - 1);
      e = exists_at(r);
      do c = $urandom_range(0, NCH - 1); while (!e[c]);
      do o = $urandom_range(0, 5); while (!e[o]);
      fault_en[r][c] = 1'b1;
      fault_ch[r][c] = ch_e'(o);
    end
  endtask

  task automatic run(int pat, int pct);
    int nf;
    string pname [4] = '{"uniform", "transpose1", "transpose2", "shuffle"};
    rst_n = 0;
    repeat (2) @(posedge clk);
    pattern = pat; n_pkts = 0; n_done = 0; lat_sum = 0;
    pkt_dst.delete(); pkt_got.delete(); pkt_t0.delete();
    for (int r = 0; r < N; r++) begin txq[r].delete(); cred[r] = DEPTH; cur_rx[r] = -1; end
    fault_en = '0;
    @(negedge clk) rst_n = 1;
    nf = (pct * RC_MODULES + 50) / 100;
    gen_on = 1;
    for (int t = 0; t < T_INJ; t++) begin
      if (pct > 0 && t % PAT_CYC == 0) draw_faults(nf);
      @(posedge clk);
    end
    gen_on = 0;
    fault_en = '0;
    for (int t = 0; t < T_DRAIN && n_done < n_pkts; t++) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("%-10s faults %0d%% (%0d modules): packets %0d delivered %0d (%0d%%) mean latency %0d",
             pname[pat], pct, nf, n_pkts, n_done, (n_pkts > 0) ? 100 * n_done / n_pkts : 0,
             (n_done > 0) ? int'(lat_sum / longint'(n_done)) : 0);
    checks++;
    if (pct == 0 ? (n_done != n_pkts) : (10 * n_done < n_pkts)) begin
      failures++;
      $display("FAIL %s at %0d%%: delivered %0d of %0d", pname[pat], pct, n_done, n_pkts);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inj_valid = '0; inj_flit = '0; ej_credit = '0; fault_en = '0; fault_ch = '0;
    for (int p = 0; p < 4; p++)
      for (int pct = 0; pct <= 4; pct += 2) run(p, pct);
    checks += 4;
    if (n_fault == 0) begin failures++; $display("FAIL no fault took effect"); end
    if (n_sev == 0)   begin failures++; $display("FAIL no severe fault judged"); end
    if (n_spare == 0) begin failures++; $display("FAIL spare routing never used"); end
    if (n_spp == 0)   begin failures++; $display("FAIL shortest path priority never used"); end
    $display("mechanisms: faults=%0d severe=%0d ignorable=%0d spare=%0d spp=%0d",
             n_fault, n_sev, n_ign, n_spare, n_spp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
