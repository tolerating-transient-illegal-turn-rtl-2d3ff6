// odt_router: the ODT fault-tolerant mesh router.
//
// Seven input channels (E, W, N1, N2, S1, S2, L), each with its own buffer and
// routing computation unit with online fault detection, feed a VC allocator,
// a switch allocator, a crossbar and a registered link stage.  The routing is
// the illegal-turn-resilient algorithm: minimal adaptive selection while the
// packet is on track, spare routing or shortest path priority after an
// illegal turn upstream.
//
// Links: five physical links (E, W, N, S, L), each a flit with valid and a
// virtual-channel bit (N and S links carry N1/N2 and S1/S2).  Flow control
// is credit based per channel: `crd_out[c]` pulses when input channel c
// frees a slot, `crd_in[c]` when the router downstream of output channel c
// does.  The credit counters double as the congestion measure (free slots
// downstream) the output selection uses; they start at DEPTH.
//
// Timing of a head flit through one router with no contention: written into
// the buffer (cycle 0), routed (1), output channel granted (2), switched into
// the link register (3), on the output link (4).  Body flits follow one per
// cycle.  The document lists the RC, VA, SA, crossbar and link stages; the
// cycle split is this design's.
//
// `fault_en[c]`/`fault_ch[c]` force the routing decision of input c's next
// head flit, modelling a transient control-path fault that makes a packet
// take an arbitrary (possibly illegal) turn.  Outputs that leave the mesh
// (decided by MY_X, MY_Y, MESH_X, MESH_Y) are never chosen.
module odt_router
  import odt_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8,
  parameter int MY_X   = 0,
  parameter int MY_Y   = 0,
  parameter int DEPTH  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic  [NLINK-1:0]       in_valid,
  input  logic  [NLINK-1:0]       in_vc,
  input  flit_t [NLINK-1:0]       in_flit,
  output logic  [NCH-1:0]         crd_out,
  output logic  [NLINK-1:0]       out_valid,
  output logic  [NLINK-1:0]       out_vc,
  output flit_t [NLINK-1:0]       out_flit,
  input  logic  [NCH-1:0]         crd_in,
  input  logic  [NCH-1:0]         fault_en,
  input  ch_e   [NCH-1:0]         fault_ch,
  output events_t                 events
);
  localparam int CRED_W = $clog2(DEPTH + 1);

  localparam chmask_t EXISTS = chmask_t'(
      ((MY_X < MESH_X - 1) ? (1 << CH_E) : 0) |
      ((MY_X > 0)          ? (1 << CH_W) : 0) |
      ((MY_Y < MESH_Y - 1) ? ((1 << CH_N1) | (1 << CH_N2)) : 0) |
      ((MY_Y > 0)          ? ((1 << CH_S1) | (1 << CH_S2)) : 0) |
      (1 << CH_L));

  logic [COORD_W-1:0]         cur_x, cur_y;
  logic [NCH-1:0]             wr_en;
  flit_t [NCH-1:0]            wr_flit;
  logic [NCH-1:0][CRED_W-1:0] cred;
  logic [NCH-1:0]             va_req, sa_req, va_gnt, sa_gnt, credit_ok, release_ch;
  ch_e  [NCH-1:0]             req_ch;
  flit_t [NCH-1:0]            sw_flit;
  logic [NCH-1:0]             va_busy;
  logic [NLINK-1:0]           xb_valid, xb_vc;
  flit_t [NLINK-1:0]          xb_flit;

  assign cur_x = COORD_W'(MY_X);
  assign cur_y = COORD_W'(MY_Y);

  // Physical link -> input channel.
  always_comb begin
    wr_en   = '0;
    wr_flit = '0;
    wr_en[CH_E]  = in_valid[LK_E];
    wr_en[CH_W]  = in_valid[LK_W];
    wr_en[CH_N1] = in_valid[LK_N] && !in_vc[LK_N];
    wr_en[CH_N2] = in_valid[LK_N] &&  in_vc[LK_N];
    wr_en[CH_S1] = in_valid[LK_S] && !in_vc[LK_S];
    wr_en[CH_S2] = in_valid[LK_S] &&  in_vc[LK_S];
    wr_en[CH_L]  = in_valid[LK_L];
    for (int c = 0; c < NCH; c++) wr_flit[c] = in_flit[ch2link(ch_e'(c))];
  end

  for (genvar c = 0; c < NCH; c++) begin : g_in
    odt_input_unit #(.IN_CH(ch_e'(c)), .DEPTH(DEPTH), .CRED_W(CRED_W)) u_in (
      .clk(clk), .rst_n(rst_n),
      .wr_en(wr_en[c]), .wr_flit(wr_flit[c]), .credit(crd_out[c]),
      .cur_x(cur_x), .cur_y(cur_y), .exists(EXISTS), .free(cred),
      .fault_en(fault_en[c]), .fault_ch(fault_ch[c]),
      .va_req(va_req[c]), .sa_req(sa_req[c]), .req_ch(req_ch[c]),
      .va_gnt(va_gnt[c]), .sa_gnt(sa_gnt[c]), .out_flit(sw_flit[c]),
      .ev_normal(events.rt_normal[c]), .ev_spp(events.rt_spp[c]),
      .ev_spare(events.rt_spare[c]), .ev_fault(events.rt_fault[c]),
      .ev_ignorable(events.ignorable[c]), .ev_severe(events.severe[c]),
      .ev_blocked(events.blocked[c])
    );
  end

  odt_vc_alloc u_va (
    .clk(clk), .rst_n(rst_n), .req(va_req), .req_ch(req_ch),
    .release_ch(release_ch), .gnt(va_gnt), .busy(va_busy)
  );

  always_comb begin
    for (int c = 0; c < NCH; c++) credit_ok[c] = (cred[c] != '0);
    release_ch = '0;
    for (int i = 0; i < NCH; i++)
      if (sa_gnt[i] && sw_flit[i].tail) release_ch[req_ch[i]] = 1'b1;
    events.va_wait = va_req & ~va_gnt;
    events.sa_wait = sa_req & ~sa_gnt;
  end

  odt_switch_alloc u_sa (
    .clk(clk), .rst_n(rst_n), .req(sa_req), .req_ch(req_ch),
    .credit_ok(credit_ok), .gnt(sa_gnt)
  );

  odt_crossbar u_xb (
    .gnt(sa_gnt), .sel_ch(req_ch), .in_flit(sw_flit),
    .out_valid(xb_valid), .out_vc(xb_vc), .out_flit(xb_flit)
  );

  // Credit counters, one per output channel: one credit is spent for each
  // flit switched into the channel and regained for each credit pulse.
  chmask_t sent_ch;
  always_comb begin
    sent_ch = '0;
    for (int i = 0; i < NCH; i++)
      if (sa_gnt[i]) sent_ch[req_ch[i]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) cred[c] <= CRED_W'(DEPTH);
    end else begin
      for (int c = 0; c < NCH; c++)
        cred[c] <= cred[c] - CRED_W'(sent_ch[c]) + CRED_W'(crd_in[c]);
    end
  end

  // Link transmission stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_vc    <= '0;
      out_flit  <= '0;
    end else begin
      out_valid <= xb_valid;
      out_vc    <= xb_vc;
      out_flit  <= xb_flit;
    end
  end

  // A flit only crosses the switch on an output channel its packet holds, and
  // no credit counter exceeds the downstream buffer depth.
  for (genvar i = 0; i < NCH; i++) begin : g_chk
    a_sa_owns: assert property (@(posedge clk) disable iff (!rst_n)
      sa_gnt[i] |-> va_busy[req_ch[i]]);
    a_cred_max: assert property (@(posedge clk) disable iff (!rst_n)
      cred[i] <= CRED_W'(DEPTH));
  end
endmodule
