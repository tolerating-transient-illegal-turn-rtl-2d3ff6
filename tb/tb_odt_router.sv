// tb_odt_router: one router at (1,1) of a 3x3 mesh, so all seven channels
// exist; the testbench plays the four neighbours and the local node.  It sends
// 4-flit packets under credit flow control and receives on every output
// channel, returning credits.  Checks:
//   * a lone packet: head leaves 4 cycles after it arrives, body flits follow
//     one per cycle, head's upstream-input field is rewritten;
//   * directed routes: minimal routing, spare routing (W input, destination
//     west), shortest path priority (E input after an upstream U-turn),
//     injected faults;
//   * random traffic on all inputs: every packet leaves intact, its flits
//     contiguous on one output channel, on a minimal output when fault-free;
//   * N1/N2 share the north link flit by flit; a withheld credit stalls an
//     output and the traffic resumes when credits return.
module tb_odt_router;
  import odt_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic  [NLINK-1:0] in_valid, in_vc, out_valid, out_vc;
  flit_t [NLINK-1:0] in_flit, out_flit;
  logic  [NCH-1:0]   crd_out, crd_in, fault_en;
  ch_e   [NCH-1:0]   fault_ch;
  events_t           ev;

  odt_router #(.MESH_X(3), .MESH_Y(3), .MY_X(1), .MY_Y(1), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_vc(in_vc), .in_flit(in_flit),
    .crd_out(crd_out), .out_valid(out_valid), .out_vc(out_vc), .out_flit(out_flit),
    .crd_in(crd_in), .fault_en(fault_en), .fault_ch(fault_ch), .events(ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  flit_t   txq [NCH][$];       // flits waiting to be sent per input channel
  int      cred [NCH];         // testbench's credits towards each input channel
  logic    hold [NCH];         // testbench withholds credits for this output
  int      pend [NCH];         // credits owed to the router per output channel
  int      exp_out [int];      // packet id -> expected output channel (-1: minimal)
  int      in_of [int];        // packet id -> input channel
  int      got [int];          // packet id -> flits received
  int      cur_pkt [NCH];      // packet in progress per output channel
  int      out_of [int];       // packet id -> output channel used
  int      t_in [int], t_head [int];
  int      n_pkts = 0, n_vc_switch = 0, n_stall = 0, last_n_vc = -1;
  int      n_spare = 0, n_spp = 0, n_fault = 0, n_sev = 0, n_ign = 0;
  logic [COORD_W-1:0] pdx [int], pdy [int];

  function automatic int lk(ch_e c);
    case (c) CH_E: return LK_E; CH_W: return LK_W; CH_N1, CH_N2: return LK_N;
             CH_S1, CH_S2: return LK_S; default: return LK_L; endcase
  endfunction

  task automatic queue_pkt(ch_e i, int dx, int dy, int sx, ch_e up, int e_out);
    int id;
    id = n_pkts++;
    exp_out[id] = e_out; in_of[id] = i; got[id] = 0;
    pdx[id] = 3'(dx); pdy[id] = 3'(dy);
    for (int k = 0; k < 4; k++) begin
      flit_t f;
      f = '0;
      f.head = (k == 0); f.tail = (k == 3); f.up_in = up;
      f.src_x = 3'(sx); f.dst_x = 3'(dx); f.dst_y = 3'(dy);
      f.data = {16'(id), 16'(k)};
      txq[i].push_back(f);
    end
  endtask

  // Driver: one flit per physical link per cycle; N/S links alternate VCs.
  logic alt = 0;
  always @(negedge clk) begin
    in_valid = '0; in_vc = '0; in_flit = '0;
    if (rst_n) begin
      alt = ~alt;
      for (int c = 0; c < NCH; c++) begin
        ch_e ch;
        ch = ch_e'(c);
        if (ch inside {CH_N2, CH_S2} && in_valid[lk(ch)] == 1'b1) continue;
        if (ch inside {CH_N1, CH_S1} && alt && txq[c+1].size() > 0 && cred[c+1] > 0) continue;
        if (txq[c].size() > 0 && cred[c] > 0) begin
          flit_t f;
          f = txq[c].pop_front();
          in_valid[lk(ch)] = 1'b1;
          in_vc[lk(ch)]    = ch inside {CH_N2, CH_S2};
          in_flit[lk(ch)]  = f;
          cred[c]--;
          if (f.head) t_in[int'(f.data[31:16])] = cyc;
        end
      end
    end
  end

  // Monitor and credit return.
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int c = 0; c < NCH; c++) if (crd_out[c]) cred[c]++;
      n_spare += $countones(ev.rt_spare); n_spp += $countones(ev.rt_spp);
      n_fault += $countones(ev.rt_fault); n_sev += $countones(ev.severe);
      n_ign += $countones(ev.ignorable);
      if (out_valid[LK_N]) begin
        if (last_n_vc >= 0 && last_n_vc != int'(out_vc[LK_N])) n_vc_switch++;
        last_n_vc = out_vc[LK_N];
      end
      for (int l = 0; l < NLINK; l++) if (out_valid[l]) begin
        ch_e oc;
        int id, k;
        flit_t f;
        f = out_flit[l];
        case (l)
          LK_E: oc = CH_E; LK_W: oc = CH_W; LK_N: oc = out_vc[l] ? CH_N2 : CH_N1;
          LK_S: oc = out_vc[l] ? CH_S2 : CH_S1; default: oc = CH_L;
        endcase
        id = int'(f.data[31:16]); k = int'(f.data[15:0]);
        checks++;
        if (f.head) begin
          cur_pkt[oc] = id; out_of[id] = oc; t_head[id] = cyc;
          if (f.up_in != ch_e'(in_of[id])) begin failures++; $display("FAIL up_in rewrite pkt %0d", id); end
        end else if (cur_pkt[oc] != id) begin
          failures++; $display("FAIL interleaved packets on %s", oc.name());
        end
        if (k != got[id] || f.dst_x != pdx[id] || f.dst_y != pdy[id]) begin
          failures++; $display("FAIL flit order pkt %0d k=%0d got=%0d", id, k, got[id]);
        end
        got[id]++;
        pend[oc]++;
      end
    end
  end

  always @(negedge clk) begin
    crd_in = '0;
    for (int c = 0; c < NCH; c++)
      if (pend[c] > 0 && !hold[c]) begin crd_in[c] = 1'b1; pend[c]--; end
      else if (hold[c] && ev.sa_wait != '0) n_stall++;
  end

  task automatic drain(int max_cyc);
    int t;
    t = 0;
    while (t < max_cyc) begin
      int done;
      done = 1;
      for (int c = 0; c < NCH; c++) if (txq[c].size() > 0) done = 0;
      foreach (got[id]) if (got[id] != 4) done = 0;
      if (done) break;
      @(posedge clk); t++;
    end
    repeat (3) @(posedge clk);
  endtask

  task automatic check_routes(int first, int last);
    for (int id = first; id < last; id++) begin
      checks++;
      if (got[id] != 4) begin failures++; $display("FAIL pkt %0d got %0d flits", id, got[id]); end
      else if (exp_out[id] >= 0 && out_of[id] != exp_out[id]) begin
        failures++; $display("FAIL pkt %0d out %0d exp %0d", id, out_of[id], exp_out[id]);
      end else if (exp_out[id] == -1) begin
        int dx, dy;
        ch_e o;
        o = ch_e'(out_of[id]);
        dx = int'(pdx[id]) - 1; dy = int'(pdy[id]) - 1;
        if (!((o == CH_E && dx > 0) || (o == CH_W && dx < 0) || (o inside {CH_N1, CH_N2} && dy > 0) ||
              (o inside {CH_S1, CH_S2} && dy < 0) || (o == CH_L && dx == 0 && dy == 0))) begin
          failures++; $display("FAIL pkt %0d non-minimal out %0d", id, out_of[id]);
        end
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base;
    in_valid = '0; in_vc = '0; in_flit = '0; crd_in = '0; fault_en = '0; fault_ch = '0;
    for (int c = 0; c < NCH; c++) begin cred[c] = DEPTH; hold[c] = 0; pend[c] = 0; cur_pkt[c] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Lone packet, latency and rate.
    queue_pkt(CH_L, 2, 1, 1, CH_L, CH_E);
    drain(100);
    check_routes(0, 1);
    checks++;
    if (t_head[0] - t_in[0] != 4) begin failures++; $display("FAIL head latency %0d", t_head[0] - t_in[0]); end

    // 2. Directed routes.
    base = n_pkts;
    queue_pkt(CH_W, 2, 2, 0, CH_L, CH_E);      // fault-free NE; E and N2 equally free -> E
    queue_pkt(CH_S1, 1, 2, 2, CH_S1, CH_N1);   // straight north, westbound -> N1
    queue_pkt(CH_N2, 1, 0, 0, CH_W, CH_S2);    // straight south, eastbound -> S2
    queue_pkt(CH_W, 0, 1, 2, CH_L, -2);        // spare routing: W input, destination west
    queue_pkt(CH_E, 2, 0, 0, CH_W, CH_S2);     // shortest path priority after U-turn upstream
    queue_pkt(CH_L, 1, 1, 1, CH_L, CH_L);      // for this node
    drain(400);
    check_routes(base, n_pkts);
    checks++;
    if (!(out_of[base + 3] inside {CH_N1, CH_S1})) begin failures++; $display("FAIL spare route"); end
    checks++;
    if (n_spare != 1 || n_spp != 1 || n_sev < 2) begin
      failures++; $display("FAIL mode counts spare=%0d spp=%0d severe=%0d", n_spare, n_spp, n_sev);
    end

    // 3. Injected fault on the L input forces W for a packet going east.
    base = n_pkts;
    fault_en[CH_L] = 1'b1; fault_ch[CH_L] = CH_W;
    queue_pkt(CH_L, 2, 1, 1, CH_L, CH_W);
    drain(100);
    fault_en = '0;
    check_routes(base, n_pkts);
    checks++;
    if (n_fault != 1) begin failures++; $display("FAIL fault count %0d", n_fault); end

    // 4. N1 and N2 at once share the north link.
    base = n_pkts;
    queue_pkt(CH_S1, 1, 2, 2, CH_S1, CH_N1);
    queue_pkt(CH_S2, 1, 2, 0, CH_S2, CH_N2);
    queue_pkt(CH_S1, 1, 2, 2, CH_S1, CH_N1);
    queue_pkt(CH_S2, 1, 2, 0, CH_S2, CH_N2);
    drain(400);
    check_routes(base, n_pkts);
    checks++;
    if (n_vc_switch < 4) begin failures++; $display("FAIL no VC interleaving (%0d)", n_vc_switch); end

    // 5. Credit stall on E, then release.
    base = n_pkts;
    hold[CH_E] = 1;
    queue_pkt(CH_L, 2, 1, 1, CH_L, CH_E);
    queue_pkt(CH_W, 2, 1, 0, CH_W, CH_E);
    repeat (40) @(posedge clk);
    checks++;
    if (got[base] + got[base + 1] != DEPTH) begin
      failures++; $display("FAIL stall let %0d flits through", got[base] + got[base + 1]);
    end
    hold[CH_E] = 0;
    drain(400);
    check_routes(base, n_pkts);

    // 6. Random fault-free traffic from all inputs.
    base = n_pkts;
    for (int p = 0; p < 300; p++) begin
      ch_e i;
      int dx, dy;
      i = ch_e'($urandom_range(0, 6));
      dx = $urandom_range(0, 2); dy = $urandom_range(0, 2);
      // keep arrivals legal for the side and virtual channel they come in on
      if (i == CH_E || i == CH_N1 || i == CH_S1) dx = $urandom_range(0, 1);
      if (i == CH_W || i == CH_N2 || i == CH_S2) dx = $urandom_range(1, 2);
      if (i inside {CH_N1, CH_N2}) dy = $urandom_range(0, 1);
      if (i inside {CH_S1, CH_S2}) dy = $urandom_range(1, 2);
      queue_pkt(i, dx, dy, (i inside {CH_N1, CH_S1}) ? 2 : (i inside {CH_N2, CH_S2}) ? 0 : 1,
                (i == CH_L) ? CH_L : i, -1);
    end
    drain(20000);
    check_routes(base, n_pkts);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no credit stall seen"); end
    $display("packets=%0d spare=%0d spp=%0d fault=%0d severe=%0d ignorable=%0d vc_switch=%0d stall=%0d",
             n_pkts, n_spare, n_spp, n_fault, n_sev, n_ign, n_vc_switch, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
