// output_port: one output port m of the router: rotating arbiter, crossbar
// multiplexer, Id-tag management and the link register.
//
// The arbiter sees column m of the request matrix, r_{1:5,m}, and grants one
// input per cycle (a_{1:5,m}) whenever the link register can take a flit:
// it is empty, or it is being emptied into the downstream queue this cycle
// (the downstream queue is not full). The granted input's flit passes the
// multiplexer and the Id management unit, which gives it its Id-tag for this
// link or drops it; a kept flit is loaded into the link register.
//
// Link interface: out_valid/out_flit from the register; the flit is taken
// by the neighbour in any cycle with out_valid high and down_full low.
// Latency: grant cycle -> flit on the link the next cycle (link traversal).
// Structure follows the document's output-port units; the single link
// register and the full/valid flow control are this design's choices.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  portvec_t req_col,               // r_{n,m}, n = 0..4
  input  flit_t    in_flits [N_PORTS],    // routing-stage flit of each input
  output portvec_t gnt_col,               // a_{n,m}
  output logic     out_valid,
  output flit_t    out_flit,
  input  logic     down_full,
  // observation
  output logic     contention,            // more than one input requests m
  output logic     runout,
  output logic     dropped,
  output logic     allocated,
  output logic [TAG_W:0] n_free
);

  logic  link_ready;
  port_t sel;
  flit_t mux_flit, mim_flit;
  logic  granted, keep;

  assign link_ready = !out_valid || !down_full;

  rotating_arbiter #(.N(N_PORTS)) u_arb (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (link_ready),
    .req   (req_col),
    .gnt   (gnt_col)
  );

  always_comb begin
    sel = '0;
    for (int n = 0; n < N_PORTS; n++) if (gnt_col[n]) sel = port_t'(n);
  end

  assign granted  = (gnt_col != '0);
  assign mux_flit = in_flits[sel];

  id_management_unit #(.N_SLOT(N_SLOT)) u_mim (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (granted),
    .in_flit   (mux_flit),
    .in_from   (sel),
    .out_flit  (mim_flit),
    .out_keep  (keep),
    .dropped   (dropped),
    .runout    (runout),
    .allocated (allocated),
    .n_free    (n_free)
  );

  always_comb begin
    int unsigned n_req;
    n_req = 0;
    for (int n = 0; n < N_PORTS; n++) n_req += int'(req_col[n]);
    contention = (n_req > 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else if (keep) begin
      out_valid <= 1'b1;
      out_flit  <= mim_flit;
    end else if (!down_full) begin
      out_valid <= 1'b0;
    end
  end

endmodule
