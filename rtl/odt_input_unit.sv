// odt_input_unit: one input channel of an ODT router.
//
// Holds the channel's flit buffer and its routing computation unit and keeps
// the per-packet state of wormhole switching:
//   IDLE   - when a head flit reaches the buffer front, the RC unit routes it
//            (including the fault judgment of the upstream turn) and the
//            result is registered;
//   VA     - the packet requests its output channel from the VC allocator;
//   ACTIVE - each flit requests the switch; a granted flit is popped and sent
//            with its upstream-input field rewritten to this channel; the
//            tail returns the unit to IDLE.
// Spare routing blocks the input: once a packet has been spare-routed and its
// tail flit is in the buffer, the credits of freed slots are withheld from the
// upstream router until that tail has left, so no new packet can follow it in;
// the credits are then returned one per cycle.  Credits the spare-routed
// packet still needs for its own flits are never withheld, which would
// deadlock it.  (The document says the input port is blocked while such a
// packet completes its turn; withholding credits is this design's way of
// doing it.)  Credits are returned one cycle after a pop.
module odt_input_unit
  import odt_pkg::*;
#(
  parameter ch_e IN_CH  = CH_E,
  parameter int  DEPTH  = 4,
  parameter int  CRED_W = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // link side
  input  logic                        wr_en,
  input  flit_t                       wr_flit,
  output logic                        credit,     // one freed slot returned upstream
  // router position and output state
  input  logic [COORD_W-1:0]          cur_x,
  input  logic [COORD_W-1:0]          cur_y,
  input  chmask_t                     exists,
  input  logic [NCH-1:0][CRED_W-1:0]  free,
  // transient RC fault injection
  input  logic                        fault_en,
  input  ch_e                         fault_ch,
  // allocators
  output logic                        va_req,
  output logic                        sa_req,
  output ch_e                         req_ch,
  input  logic                        va_gnt,
  input  logic                        sa_gnt,
  output flit_t                       out_flit,
  // observation
  output logic                        ev_normal,
  output logic                        ev_spp,
  output logic                        ev_spare,
  output logic                        ev_fault,
  output logic                        ev_ignorable,
  output logic                        ev_severe,
  output logic                        ev_blocked
);
  typedef enum logic [1:0] {S_IDLE, S_VA, S_ACTIVE} state_e;

  localparam int PCW = $clog2(DEPTH + 1);

  state_e         state;
  ch_e            route;
  logic           blocked;
  logic [PCW-1:0] pend;
  logic [PCW-1:0] tails;     // tail flits in the buffer
  flit_t          front;
  logic           empty, full, pop, do_route, hold;
  ch_e            rc_ch;
  rmode_e         rc_mode;
  logic           rc_ign, rc_sev;

  odt_input_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_flit(wr_flit),
    .rd_en(pop), .front(front), .empty(empty), .full(full)
  );

  assign do_route = (state == S_IDLE) && !empty && front.head;

  odt_rc_unit #(.CRED_W(CRED_W)) u_rc (
    .check(do_route), .in_ch(IN_CH), .head(front), .cur_x(cur_x), .cur_y(cur_y),
    .exists(exists), .free(free), .fault_en(fault_en), .fault_ch(fault_ch),
    .out_ch(rc_ch), .mode_out(rc_mode), .ignorable(rc_ign), .severe(rc_sev)
  );

  assign va_req = (state == S_VA);
  assign sa_req = (state == S_ACTIVE) && !empty;
  assign req_ch = route;
  assign pop    = sa_req && sa_gnt;

  always_comb begin
    out_flit = front;
    if (front.head) out_flit.up_in = IN_CH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      route   <= CH_L;
      blocked <= 1'b0;
      pend    <= '0;
      tails   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (do_route) begin
          route <= rc_ch;
          state <= S_VA;
          if (rc_mode == RM_SPARE) blocked <= 1'b1;
        end
        S_VA:     if (va_gnt) state <= S_ACTIVE;
        S_ACTIVE: if (pop && front.tail) begin
          state   <= S_IDLE;
          blocked <= 1'b0;
        end
        default:  state <= S_IDLE;
      endcase
      pend  <= pend + PCW'(pop) - PCW'(credit);
      tails <= tails + PCW'(wr_en && wr_flit.tail) - PCW'(pop && front.tail);
    end
  end

  // The packet at the front is the spare-routed one, so any tail in the
  // buffer means its tail has arrived.
  assign hold   = blocked && (tails != '0);
  assign credit = !hold && (pend != '0);

  assign ev_normal    = do_route && rc_mode == RM_NORMAL;
  assign ev_spp       = do_route && rc_mode == RM_SPP;
  assign ev_spare     = do_route && rc_mode == RM_SPARE;
  assign ev_fault     = do_route && rc_mode == RM_FAULT;
  assign ev_ignorable = rc_ign;
  assign ev_severe    = rc_sev;
  assign ev_blocked   = hold;

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && full && !pop));
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && !empty) |-> front.head);
endmodule
