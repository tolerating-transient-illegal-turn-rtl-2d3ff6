// odt_vc_alloc: output channel (virtual channel) allocation.
//
// Each of the seven output channels (E, W, N1, N2, S1, S2, L) is held by at
// most one packet at a time, from the grant of its head flit until its tail
// flit has been sent; this is what keeps wormhole packets from interleaving
// on a channel.  Inputs in the VA state request the channel their routing
// computation chose.  For every free output channel a round-robin arbiter
// grants one requester; the grant is combinational, the ownership is
// registered and is released by `release_ch` (tail sent on that channel).
// The document names the VA stage without detailing it; round-robin is this
// design's choice.
module odt_vc_alloc
  import odt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NCH-1:0]     req,       // per input channel
  input  ch_e  [NCH-1:0]     req_ch,    // requested output channel
  input  logic [NCH-1:0]     release_ch,// per output channel
  output logic [NCH-1:0]     gnt,       // per input channel
  output logic [NCH-1:0]     busy       // per output channel
);
  logic [NCH-1:0][2:0] rr;   // last granted input per output channel
  logic [NCH-1:0]      out_gnt;
  logic [NCH-1:0][2:0] out_win;

  int i;

  always_comb begin
    i       = 0;
    gnt     = '0;
    out_gnt = '0;
    out_win = '0;
    for (int o = 0; o < NCH; o++) begin
      if (!busy[o]) begin
        for (int k = 1; k <= NCH; k++) begin
          i = (int'(rr[o]) + k) % NCH;
          if (!out_gnt[o] && req[i] && req_ch[i] == ch_e'(o)) begin
            out_gnt[o] = 1'b1;
            out_win[o] = 3'(i);
            gnt[i]     = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      rr   <= '0;
    end else begin
      for (int o = 0; o < NCH; o++) begin
        if (out_gnt[o]) begin
          busy[o] <= 1'b1;
          rr[o]   <= out_win[o];
        end else if (release_ch[o]) begin
          busy[o] <= 1'b0;
        end
      end
    end
  end

  a_release_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (release_ch & ~busy) == '0);
endmodule
