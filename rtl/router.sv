// router: five-port wormhole router without virtual channels that
// multicasts by Id-tagged flit interleaving and hold/release tagging.
//
// Ports 0..4 are East, North, West, South and Local. Each input port has a
// queue and a routing engine (routing state machine plus routing
// reservation table); each output port has a rotating flit-by-flit arbiter,
// a multiplexer of the crossbar and an Id management unit (ID slot table).
// The request matrix R(t) (req[n][m]) runs from the inputs to the outputs,
// the arbitration matrix A(t) (gnt[n][m]) back. Flits of different packets
// share a link flit by flit; each carries a per-link Id-tag that tells the
// next router which table entry routes it.
//
// Link interface per port: in_valid/in_flit/in_full (flit accepted when
// in_valid and not in_full) and out_valid/out_flit/out_full (flit taken by
// the neighbour when out_valid and not out_full). A flit crosses an idle
// router in 3 cycles: queue write, routing stage, link register.
// The module structure follows the document's five-port switch; the three
// pipeline stages are this design's choice (the document allows any depth).
module router
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT     = 16,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  coord_t         my_x,
  input  coord_t         my_y,
  input  logic           in_valid  [N_PORTS],
  input  flit_t          in_flit   [N_PORTS],
  output logic           in_full   [N_PORTS],
  output logic           out_valid [N_PORTS],
  output flit_t          out_flit  [N_PORTS],
  input  logic           out_full  [N_PORTS],
  output router_status_t status
);

  portvec_t req   [N_PORTS];   // req[n][m] = r_{n,m}
  portvec_t gnt   [N_PORTS];   // gnt[n][m] = a_{n,m}
  portvec_t req_t [N_PORTS];   // req_t[m][n] = r_{n,m}
  portvec_t gnt_t [N_PORTS];   // gnt_t[m][n] = a_{n,m}
  flit_t    stage_flit [N_PORTS];

  always_comb begin
    for (int n = 0; n < N_PORTS; n++)
      for (int m = 0; m < N_PORTS; m++) begin
        req_t[m][n] = req[n][m];
        gnt[n][m]   = gnt_t[m][n];
      end
  end

  for (genvar n = 0; n < N_PORTS; n++) begin : g_in
    input_port #(.N_SLOT(N_SLOT), .FIFO_DEPTH(FIFO_DEPTH)) u_in (
      .clk       (clk),
      .rst_n     (rst_n),
      .my_x      (my_x),
      .my_y      (my_y),
      .in_valid  (in_valid[n]),
      .in_flit   (in_flit[n]),
      .in_full   (in_full[n]),
      .req       (req[n]),
      .flit      (stage_flit[n]),
      .grant     (gnt[n]),
      .held      (status.held[n]),
      .multicast (status.multicast[n])
    );
  end

  for (genvar m = 0; m < N_PORTS; m++) begin : g_out
    logic [TAG_W:0] n_free;
    output_port #(.N_SLOT(N_SLOT)) u_out (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_col    (req_t[m]),
      .in_flits   (stage_flit),
      .gnt_col    (gnt_t[m]),
      .out_valid  (out_valid[m]),
      .out_flit   (out_flit[m]),
      .down_full  (out_full[m]),
      .contention (status.contention[m]),
      .runout     (status.runout[m]),
      .dropped    (status.dropped[m]),
      .allocated  (status.allocated[m]),
      .n_free     (n_free)
    );
  end

endmodule
