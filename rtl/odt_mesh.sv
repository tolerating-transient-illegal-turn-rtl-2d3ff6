// odt_mesh: a MESH_X x MESH_Y 2D mesh of ODT routers (the design's top).
//
// Router (x,y) sits at index y*MESH_X + x; north is +y, east is +x.  Each
// router's E link feeds the W input of its east neighbour, its N link the S
// input of its north neighbour (and so on), and credits flow back per
// channel: an N1 flit lands in the neighbour's S1 buffer, whose freed slots
// return as N1 credits.  Links that would leave the mesh are tied off; the
// routers never route onto them.  Each router's local link is brought out:
// `inj_*` injects flits into its L input (respect `inj_credit`, DEPTH credits
// after reset), `ej_*` delivers flits for that node (return one `ej_credit`
// pulse per flit consumed).  `fault_en`/`fault_ch` inject transient
// routing faults per router and input channel; `events` reports what each
// router's inputs did every cycle.  The 8x8 mesh with wormhole switching is
// the document's evaluated configuration.
module odt_mesh
  import odt_pkg::*;
#(
  parameter int MESH_X = 8,
  parameter int MESH_Y = 8,
  parameter int DEPTH  = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic    [MESH_X*MESH_Y-1:0]       inj_valid,
  input  flit_t   [MESH_X*MESH_Y-1:0]       inj_flit,
  output logic    [MESH_X*MESH_Y-1:0]       inj_credit,
  output logic    [MESH_X*MESH_Y-1:0]       ej_valid,
  output flit_t   [MESH_X*MESH_Y-1:0]       ej_flit,
  input  logic    [MESH_X*MESH_Y-1:0]       ej_credit,
  input  chmask_t [MESH_X*MESH_Y-1:0]       fault_en,
  input  ch_e     [MESH_X*MESH_Y-1:0][NCH-1:0] fault_ch,
  output events_t [MESH_X*MESH_Y-1:0]       events
);
  localparam int N = MESH_X * MESH_Y;

  logic  [N-1:0][NLINK-1:0] o_valid, o_vc, i_valid, i_vc;
  flit_t [N-1:0][NLINK-1:0] o_flit, i_flit;
  logic  [N-1:0][NCH-1:0]   c_out, c_in;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int ID = y * MESH_X + x;

      // Incoming links; links at the mesh edge are tied off.
      if (x < MESH_X - 1) begin : g_e   // from the east neighbour's W link
        assign i_valid[ID][LK_E] = o_valid[ID+1][LK_W];
        assign i_flit[ID][LK_E]  = o_flit[ID+1][LK_W];
        assign c_in[ID][CH_E]    = c_out[ID+1][CH_W];
      end else begin : g_e0
        assign i_valid[ID][LK_E] = 1'b0;
        assign i_flit[ID][LK_E]  = '0;
        assign c_in[ID][CH_E]    = 1'b0;
      end
      assign i_vc[ID][LK_E] = 1'b0;

      if (x > 0) begin : g_w            // from the west neighbour's E link
        assign i_valid[ID][LK_W] = o_valid[ID-1][LK_E];
        assign i_flit[ID][LK_W]  = o_flit[ID-1][LK_E];
        assign c_in[ID][CH_W]    = c_out[ID-1][CH_E];
      end else begin : g_w0
        assign i_valid[ID][LK_W] = 1'b0;
        assign i_flit[ID][LK_W]  = '0;
        assign c_in[ID][CH_W]    = 1'b0;
      end
      assign i_vc[ID][LK_W] = 1'b0;

      if (y < MESH_Y - 1) begin : g_n   // from the north neighbour's S link
        assign i_valid[ID][LK_N] = o_valid[ID+MESH_X][LK_S];
        assign i_vc[ID][LK_N]    = o_vc[ID+MESH_X][LK_S];
        assign i_flit[ID][LK_N]  = o_flit[ID+MESH_X][LK_S];
        assign c_in[ID][CH_N1]   = c_out[ID+MESH_X][CH_S1];
        assign c_in[ID][CH_N2]   = c_out[ID+MESH_X][CH_S2];
      end else begin : g_n0
        assign i_valid[ID][LK_N] = 1'b0;
        assign i_vc[ID][LK_N]    = 1'b0;
        assign i_flit[ID][LK_N]  = '0;
        assign c_in[ID][CH_N1]   = 1'b0;
        assign c_in[ID][CH_N2]   = 1'b0;
      end

      if (y > 0) begin : g_s            // from the south neighbour's N link
        assign i_valid[ID][LK_S] = o_valid[ID-MESH_X][LK_N];
        assign i_vc[ID][LK_S]    = o_vc[ID-MESH_X][LK_N];
        assign i_flit[ID][LK_S]  = o_flit[ID-MESH_X][LK_N];
        assign c_in[ID][CH_S1]   = c_out[ID-MESH_X][CH_N1];
        assign c_in[ID][CH_S2]   = c_out[ID-MESH_X][CH_N2];
      end else begin : g_s0
        assign i_valid[ID][LK_S] = 1'b0;
        assign i_vc[ID][LK_S]    = 1'b0;
        assign i_flit[ID][LK_S]  = '0;
        assign c_in[ID][CH_S1]   = 1'b0;
        assign c_in[ID][CH_S2]   = 1'b0;
      end

      assign i_valid[ID][LK_L] = inj_valid[ID];
      assign i_vc[ID][LK_L]    = 1'b0;
      assign i_flit[ID][LK_L]  = inj_flit[ID];
      assign c_in[ID][CH_L]    = ej_credit[ID];

      odt_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(x), .MY_Y(y), .DEPTH(DEPTH)
      ) u_router (
        .clk(clk), .rst_n(rst_n),
        .in_valid(i_valid[ID]), .in_vc(i_vc[ID]), .in_flit(i_flit[ID]),
        .crd_out(c_out[ID]),
        .out_valid(o_valid[ID]), .out_vc(o_vc[ID]), .out_flit(o_flit[ID]),
        .crd_in(c_in[ID]),
        .fault_en(fault_en[ID]), .fault_ch(fault_ch[ID]),
        .events(events[ID])
      );

      assign inj_credit[ID] = c_out[ID][CH_L];
      assign ej_valid[ID]   = o_valid[ID][LK_L];
      assign ej_flit[ID]    = o_flit[ID][LK_L];
    end
  end
endmodule
