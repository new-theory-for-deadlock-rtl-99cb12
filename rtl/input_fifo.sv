// input_fifo: first-in first-out flit queue of a router input port.
//
// This is the input buffering stage of the router. A flit is written when
// push is high and the queue is not full; the oldest flit is always visible
// on head (valid when empty is low) and is removed by pop. Push and pop may
// happen in the same cycle. A flit is taken only while full is low, even if
// a pop frees a place in the same cycle: full is the back-pressure the
// upstream output port sees ("the next queue is full") and a flit moves on
// a link exactly when valid is high and full is low. full depends only on
// the queue's registered occupancy.
//
// The document asks only for a standard FIFO; its depth is not given, and
// DEPTH = 4 is this design's choice. Storage is a register array with
// read and write pointers and an occupancy counter; reset empties it.
module input_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  output logic  full,
  input  logic  pop,
  output flit_t head,
  output logic  empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [PTR_W-1:0]   rd_ptr, wr_ptr;
  logic [PTR_W:0]     count;

  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PTR_W+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && !full;
  assign head    = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] ptr_inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= ptr_inc(wr_ptr);
      if (do_pop)  rd_ptr <= ptr_inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A flit is never written into a full queue.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) full |-> !do_push);

endmodule
