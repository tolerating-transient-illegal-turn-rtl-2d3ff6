// odt_crossbar: 7-input, 5-link crossbar of the ODT router.
//
// Routes each granted input channel's flit to the physical link of the output
// channel it holds, and marks the virtual channel on the N and S links
// (vc = 1 for N2 and S2).  The switch allocator guarantees at most one grant
// per link.  Purely combinational; the link register follows in the router.
module odt_crossbar
  import odt_pkg::*;
(
  input  logic  [NCH-1:0]   gnt,
  input  ch_e   [NCH-1:0]   sel_ch,
  input  flit_t [NCH-1:0]   in_flit,
  output logic  [NLINK-1:0] out_valid,
  output logic  [NLINK-1:0] out_vc,
  output flit_t [NLINK-1:0] out_flit
);
  always_comb begin
    out_valid = '0;
    out_vc    = '0;
    out_flit  = '0;
    for (int i = 0; i < NCH; i++) begin
      if (gnt[i]) begin
        out_valid[ch2link(sel_ch[i])] = 1'b1;
        out_vc[ch2link(sel_ch[i])]    = sel_ch[i] inside {CH_N2, CH_S2};
        out_flit[ch2link(sel_ch[i])]  = in_flit[i];
      end
    end
  end
endmodule
