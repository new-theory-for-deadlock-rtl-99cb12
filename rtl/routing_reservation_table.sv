// routing_reservation_table: the table T(k) of one router input port.
//
// The table has one entry per local Id slot k of the incoming link. Each
// entry is a set of output directions (one bit per port). A header flit
// with Id-tag k adds its direction to entry k (T(k) <- r_dir OR T(k)), so
// the several header flits of a multicast packet build up the union of all
// branch directions. Databody flits read entry k; a tail flit reads it and
// clears it, which frees the entry for the next packet on that slot.
//
// Interface: a combinational read port (rd_id -> rd_dir) and one write
// operation per cycle, selected by op: OP_UNION merges wr_dir into entry
// wr_id, OP_CLEAR empties it. Writes take effect at the next clock edge.
// Reset empties all entries (this design's choice; the document does not
// discuss reset).
module routing_reservation_table
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  tag_t     rd_id,
  output portvec_t rd_dir,
  input  logic     wr_en,
  input  logic     wr_clear,   // 1: T(wr_id) <- empty, 0: T(wr_id) <- T(wr_id) | wr_dir
  input  tag_t     wr_id,
  input  portvec_t wr_dir
);

  portvec_t table_q [N_SLOT];

  assign rd_dir = (int'(rd_id) < N_SLOT) ? table_q[rd_id] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_SLOT; k++) table_q[k] <= '0;
    end else if (wr_en && int'(wr_id) < N_SLOT) begin
      if (wr_clear) table_q[wr_id] <= '0;
      else          table_q[wr_id] <= table_q[wr_id] | wr_dir;
    end
  end

  initial begin
    assert (N_SLOT >= 2 && N_SLOT <= 2**TAG_W)
      else $error("N_SLOT must be between 2 and 2**TAG_W");
  end

endmodule
