// mesh_noc: 2D MESH_X x MESH_Y mesh network-on-chip of Id-tag multicast
// routers (top level).
//
// Node (x, y) has index y*MESH_X + x. Neighbouring routers are joined by a
// pair of one-directional links: East output of (x, y) to West input of
// (x+1, y), North output of (x, y) to South input of (x, y+1), and back.
// Each link carries N_SLOT local Id slots. The Local port of every router is
// brought out: a processing element injects flits on local_in_* and receives
// flits on local_out_* (it may stall the network with local_out_full).
// Unicast and multicast packets use the same XY routing; a multicast packet
// is one packet with one header flit per destination.
//
// Mesh-edge ports have no neighbour: their inputs are idle and their outputs
// are never full (XY routing never sends a flit there for an address inside
// the mesh). status[i] exposes the router event flags of node i.
//
// Defaults: a 4x4 mesh with 16 Id slots per link. 16 slots leave 15 usable
// slots, the NM-1 the document asks of the Local output for all-to-one
// traffic in a 4x4 mesh; it is also the per-link figure it reports for an
// 8x10 mesh. The mesh size and the queue depth are this design's choices.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned N_SLOT     = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned NODES     = MESH_X * MESH_Y
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           local_in_valid  [NODES],
  input  flit_t          local_in_flit   [NODES],
  output logic           local_in_full   [NODES],
  output logic           local_out_valid [NODES],
  output flit_t          local_out_flit  [NODES],
  input  logic           local_out_full  [NODES],
  output router_status_t status          [NODES]
);

  logic  r_in_valid  [NODES][N_PORTS];
  flit_t r_in_flit   [NODES][N_PORTS];
  logic  r_in_full   [NODES][N_PORTS];
  logic  r_out_valid [NODES][N_PORTS];
  flit_t r_out_flit  [NODES][N_PORTS];
  logic  r_out_full  [NODES][N_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned I = y * MESH_X + x;

      // East input <- West output of (x+1, y); East output -> its West input.
      if (x < MESH_X - 1) begin : g_e
        assign r_in_valid[I][P_EAST] = r_out_valid[I+1][P_WEST];
        assign r_in_flit [I][P_EAST] = r_out_flit [I+1][P_WEST];
        assign r_out_full[I][P_EAST] = r_in_full  [I+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_valid[I][P_EAST] = 1'b0;
        assign r_in_flit [I][P_EAST] = '0;
        assign r_out_full[I][P_EAST] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[I][P_WEST] = r_out_valid[I-1][P_EAST];
        assign r_in_flit [I][P_WEST] = r_out_flit [I-1][P_EAST];
        assign r_out_full[I][P_WEST] = r_in_full  [I-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_valid[I][P_WEST] = 1'b0;
        assign r_in_flit [I][P_WEST] = '0;
        assign r_out_full[I][P_WEST] = 1'b0;
      end
      if (y < MESH_Y - 1) begin : g_n
        assign r_in_valid[I][P_NORTH] = r_out_valid[I+MESH_X][P_SOUTH];
        assign r_in_flit [I][P_NORTH] = r_out_flit [I+MESH_X][P_SOUTH];
        assign r_out_full[I][P_NORTH] = r_in_full  [I+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[I][P_NORTH] = 1'b0;
        assign r_in_flit [I][P_NORTH] = '0;
        assign r_out_full[I][P_NORTH] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[I][P_SOUTH] = r_out_valid[I-MESH_X][P_NORTH];
        assign r_in_flit [I][P_SOUTH] = r_out_flit [I-MESH_X][P_NORTH];
        assign r_out_full[I][P_SOUTH] = r_in_full  [I-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[I][P_SOUTH] = 1'b0;
        assign r_in_flit [I][P_SOUTH] = '0;
        assign r_out_full[I][P_SOUTH] = 1'b0;
      end

      assign r_in_valid[I][P_LOCAL] = local_in_valid[I];
      assign r_in_flit [I][P_LOCAL] = local_in_flit[I];
      assign local_in_full[I]       = r_in_full[I][P_LOCAL];
      assign local_out_valid[I]     = r_out_valid[I][P_LOCAL];
      assign local_out_flit[I]      = r_out_flit[I][P_LOCAL];
      assign r_out_full[I][P_LOCAL] = local_out_full[I];

      router #(.N_SLOT(N_SLOT), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .my_x      (coord_t'(x)),
        .my_y      (coord_t'(y)),
        .in_valid  (r_in_valid[I]),
        .in_flit   (r_in_flit[I]),
        .in_full   (r_in_full[I]),
        .out_valid (r_out_valid[I]),
        .out_flit  (r_out_flit[I]),
        .out_full  (r_out_full[I]),
        .status    (status[I])
      );
    end
  end

  initial begin
    assert (MESH_X <= 2**COORD_W && MESH_Y <= 2**COORD_W)
      else $error("mesh larger than the address fields allow");
  end

endmodule
