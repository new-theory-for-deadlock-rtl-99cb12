// rotating_arbiter: rotating flit-by-flit arbiter of one output port.
//
// Each cycle in which the output can accept a flit (en high) and at least
// one input requests it, exactly one requesting input is granted. The search
// runs downwards in port number, starting just below the input granted
// last and wrapping around, so the selection circulates among the active
// inputs only: with N requesters each is served once every N grants (the
// rotating arbitration time T_{s,m} = N^req_{s,m}). After reset the
// search starts at the highest-numbered input.
//
// Interface: req[n] = r_{n,m}, gnt[n] = a_{n,m} (one-hot or zero),
// combinational from req and en; the rotation pointer advances on a grant.
// The downward search order and its starting point follow the document's
// arbitration algorithm; the pointer register is this design's rendering.
module rotating_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  // Index at which the next downward search starts.
  logic [IDX_W-1:0] start_q;
  logic [IDX_W-1:0] sel;
  logic             found;

  always_comb begin
    int unsigned idx;
    found = 1'b0;
    sel   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = (int'(start_q) >= int'(i)) ? int'(start_q) - i : int'(start_q) + N - i;
      if (!found && req[idx]) begin
        found = 1'b1;
        sel   = IDX_W'(idx);
      end
    end
    gnt = '0;
    if (en && found) gnt[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= IDX_W'(N - 1);
    end else if (en && found) begin
      start_q <= (sel == '0) ? IDX_W'(N - 1) : sel - 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) (gnt & (gnt - 1'b1)) == '0);
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
