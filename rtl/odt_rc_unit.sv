// odt_rc_unit: routing computation of one input channel of an ODT router.
//
// For the head flit at the front of an input buffer it computes, in one
// combinational pass:
//   * Pos, the destination's region relative to this node;
//   * the baseline non-minimal eligible outputs and the minimal candidates;
//   * the fault judgment of the upstream turn (ignorable or severe), in
//     parallel with the output selection so it is not on its path;
//   * the route:
//       NORMAL - a minimal candidate that is also eligible, when one exists and
//                no severe fault was judged;
//       SPARE  - otherwise, on the W, N2 and S2 inputs, the spare option;
//       SPP    - otherwise, shortest path priority;
//       FAULT  - an injected control-path fault forces `fault_ch` (used to
//                model a transient fault in this RC unit; ignored if that
//                output does not exist at this node).
//     Among several candidates the one with the most free downstream slots
//     wins.
// `exists` masks outputs that leave the mesh.  The modes and their rules come
// from the document; the order of precedence between them is this design's
// reading of it.
module odt_rc_unit
  import odt_pkg::*;
#(
  parameter int CRED_W = 3
) (
  input  logic                        check,      // head flit present
  input  ch_e                         in_ch,
  input  flit_t                       head,
  input  logic [COORD_W-1:0]          cur_x,
  input  logic [COORD_W-1:0]          cur_y,
  input  chmask_t                     exists,
  input  logic [NCH-1:0][CRED_W-1:0]  free,
  input  logic                        fault_en,
  input  ch_e                         fault_ch,
  output ch_e                         out_ch,
  output rmode_e                      mode_out,
  output logic                        ignorable,
  output logic                        severe
);
  pos_e    pos;
  rmode_e  mode;
  chmask_t legal, minc, spare, spp, ml, cand;
  logic    spare_applies, sel_valid;
  ch_e     sel;

  odt_pos_unit u_pos (
    .cur_x(cur_x), .cur_y(cur_y), .dst_x(head.dst_x), .dst_y(head.dst_y), .pos(pos)
  );

  odt_route_legal u_legal (.in_ch(in_ch), .pos(pos), .legal(legal));

  odt_min_select u_min (
    .pos(pos), .src_x(head.src_x), .dst_x(head.dst_x), .cand(minc)
  );

  odt_fault_judge u_judge (
    .check(check), .in_ch(in_ch), .up_in(head.up_in),
    .cur_x(cur_x), .cur_y(cur_y), .dst_x(head.dst_x), .dst_y(head.dst_y),
    .ignorable(ignorable), .severe(severe)
  );

  odt_spare_route u_spare (
    .in_ch(in_ch), .pos(pos), .exists(exists), .applies(spare_applies), .spare(spare)
  );

  odt_spp_filter u_spp (
    .in_ch(in_ch), .pos(pos), .legal(legal), .minc(minc), .exists(exists), .cand(spp)
  );

  always_comb begin
    ml = minc & legal & exists;
    if (ml != '0 && !severe) begin
      mode = RM_NORMAL;
      cand = ml;
    end else if (spare_applies && spare != '0) begin
      mode = RM_SPARE;
      cand = spare;
    end else begin
      mode = RM_SPP;
      cand = spp;
    end
  end

  odt_out_select #(.CRED_W(CRED_W)) u_sel (
    .cand(cand), .free(free), .valid(sel_valid), .sel(sel)
  );

  always_comb begin
    if (fault_en && exists[fault_ch]) out_ch = fault_ch;
    else if (sel_valid)               out_ch = sel;
    else                              out_ch = CH_L;
  end

  // Reported mode: a forced route overrides the computed one.
  assign mode_out = (fault_en && exists[fault_ch]) ? RM_FAULT : mode;
endmodule
