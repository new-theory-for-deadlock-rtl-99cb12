// input_port: one input port n of the router: input queue and routing
// engine.
//
// Flits arriving on the link (in_valid, in_flit) are written into the queue
// when it is not full; in_full is the back-pressure seen by the upstream
// output port. The routing engine takes the queue head, computes its request
// vector r_{n,1:5}, holds the flit until all requests are granted and then
// releases it (see routing_engine). Queue depth and the routing engine's
// table size are parameters.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT     = 16,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  coord_t   my_x,
  input  coord_t   my_y,
  input  logic     in_valid,
  input  flit_t    in_flit,
  output logic     in_full,
  output portvec_t req,
  output flit_t    flit,
  input  portvec_t grant,
  output logic     held,
  output logic     multicast
);

  logic  fifo_empty, fifo_pop;
  flit_t fifo_head;
  logic  released, discarded;

  input_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (in_valid),
    .din   (in_flit),
    .full  (in_full),
    .pop   (fifo_pop),
    .head  (fifo_head),
    .empty (fifo_empty)
  );

  routing_engine #(.N_SLOT(N_SLOT)) u_re (
    .clk        (clk),
    .rst_n      (rst_n),
    .my_x       (my_x),
    .my_y       (my_y),
    .head_valid (!fifo_empty),
    .head       (fifo_head),
    .pop        (fifo_pop),
    .req        (req),
    .flit       (flit),
    .grant      (grant),
    .held       (held),
    .released   (released),
    .multicast  (multicast),
    .discarded  (discarded)
  );

endmodule
