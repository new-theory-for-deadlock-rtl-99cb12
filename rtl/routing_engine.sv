// routing_engine: routing engine E_n of one router input port, with the
// hold/release tagging of multicast requests.
//
// Routing (one flit per cycle, when the routing stage is free): the flit at
// the head of the input queue is moved into the routing stage register
// together with its request vector r_{n,1:5}:
//   header   : r = f_RSM(target address); T(Id) <- r OR T(Id)
//   response : r = f_RSM(target address)            (single-flit, no table use)
//   databody : r = T(Id)
//   tail     : r = T(Id); T(Id) <- empty
// A header carries only its own branch direction; the union built in T(Id)
// by all header flits of a packet is what its databody and tail flits follow,
// so they are replicated to every branch (tree-based multicast).
//
// Hold/release tagging: each cycle the output arbiters return the grant
// vector a_{n,1:5}. Requests not granted are tagged 1*, granted ones 1-. If
// any request is still ungranted, the flit is held in the stage and the
// granted requests are removed (r(t+1) = r(t) AND NOT a(t)), so a branch is
// never served twice. When every outstanding request is granted (all tags
// 1+), the flit is released and, in the same cycle, the next flit of the
// queue is routed. The grant of a released flit is the switch traversal.
//
// Timing: head flit -> stage register (1 cycle); requests are registered,
// grants arrive combinationally in the following cycle(s).
//
// Following the document: the three table operations, the hold/release
// rule and the reserved Id N_SLOT-1. This design's choices: the table is
// not written for headers carrying the reserved Id N_SLOT-1 (their
// databody/tail flits were dropped upstream), and a databody or tail flit
// whose table entry is empty has nowhere to go and is discarded.
module routing_engine
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  coord_t   my_x,
  input  coord_t   my_y,
  // head of the input queue
  input  logic     head_valid,
  input  flit_t    head,
  output logic     pop,
  // towards the output ports
  output portvec_t req,        // r_{n,1:5}(t)
  output flit_t    flit,       // flit in the routing stage
  input  portvec_t grant,      // a_{n,1:5}(t)
  // observation
  output logic     held,       // stage flit held this cycle (some 1* tag)
  output logic     released,   // stage flit released this cycle (all 1+)
  output logic     multicast,  // flit routed this cycle requests >1 output
  output logic     discarded   // flit routed this cycle had no direction
);

  logic     stage_valid;
  flit_t    stage_flit;
  portvec_t pending;

  portvec_t rsm_dir, rrt_dir, route;
  logic     take;
  logic     rrt_wr_en, rrt_wr_clear;

  routing_state_machine u_rsm (
    .my_x  (my_x),
    .my_y  (my_y),
    .dst_x (hdr_dst_x(head.word)),
    .dst_y (hdr_dst_y(head.word)),
    .r_dir (rsm_dir)
  );

  routing_reservation_table #(.N_SLOT(N_SLOT)) u_rrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_id    (head.id),
    .rd_dir   (rrt_dir),
    .wr_en    (rrt_wr_en),
    .wr_clear (rrt_wr_clear),
    .wr_id    (head.id),
    .wr_dir   (rsm_dir)
  );

  // Algorithm 1: routing direction of the head flit.
  always_comb begin
    route        = '0;
    rrt_wr_en    = 1'b0;
    rrt_wr_clear = 1'b0;
    unique case (head.ftype)
      FT_HEADER: begin
        route     = rsm_dir;
        rrt_wr_en = take && (int'(head.id) != N_SLOT - 1);
      end
      FT_RESPONSE: route = rsm_dir;
      FT_DATABODY: route = rrt_dir;
      FT_TAIL: begin
        route        = rrt_dir;
        rrt_wr_en    = take;
        rrt_wr_clear = 1'b1;
      end
      default: route = '0;
    endcase
  end

  // Tagged matrix row: release when no request stays ungranted.
  assign released = stage_valid && ((pending & ~grant) == '0);
  assign held     = stage_valid && !released;
  assign take     = head_valid && (!stage_valid || released);
  assign pop      = take;

  assign req       = stage_valid ? pending : '0;
  assign flit      = stage_flit;
  // more than one requested output
  always_comb begin
    int unsigned n_req;
    n_req = 0;
    for (int m = 0; m < N_PORTS; m++) n_req += int'(route[m]);
    multicast = take && (n_req > 1);
  end
  assign discarded = take && (route == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_valid <= 1'b0;
      stage_flit  <= '0;
      pending     <= '0;
    end else if (take) begin
      stage_valid <= (route != '0);
      stage_flit  <= head;
      pending     <= route;
    end else if (released) begin
      stage_valid <= 1'b0;
      pending     <= '0;
    end else begin
      pending     <= pending & ~grant;   // drop the 1- (granted) requests
    end
  end

  // A grant is only given to an outstanding request.
  a_grant_subset: assert property (@(posedge clk) disable iff (!rst_n)
                                   (grant & ~req) == '0);

endmodule
