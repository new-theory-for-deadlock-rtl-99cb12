// id_management_unit: local Id-tag management of one router output port
// (the ID Slot Table S and the Id-tag update function f_IDM).
//
// Every link has N_SLOT local Id slots. Slots 0..N_SLOT-2 are handed out to
// packets; slot N_SLOT-1 is reserved for single-flit traffic (responses and
// headers that found no free slot). Entry k of the table holds the state
// "used" and the pair (Id_old, from port) of the packet occupying it. For a
// flit switched to this output (in_valid) the new Id-tag is:
//   header   : Id_old = N_SLOT-1 -> N_SLOT-1;
//              a used slot already holds (Id_old, from) -> that slot
//              (a further header of the same multicast packet);
//              else the lowest free slot k, which is marked used and
//              loaded with (Id_old, from);
//              no free slot -> N_SLOT-1 (Id run-out, reported on runout)
//   databody : the used slot holding (Id_old, from); none -> flit dropped
//   tail     : as databody, and the slot is freed; none -> flit dropped
//   response : N_SLOT-1
// The result is combinational (out_flit, out_keep); the table is updated at
// the clock edge. n_free counts the free usable slots (N_freeId).
//
// The slot search, the reserved slot and dropping follow the document. Reusing
// the slot of a packet's earlier header for its further headers is this
// design's reading: it keeps all flits of one packet on one Id slot per link,
// which the correctness argument requires.
module id_management_unit
  import noc_pkg::*;
#(
  parameter int unsigned N_SLOT = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  flit_t  in_flit,
  input  port_t  in_from,
  output flit_t  out_flit,
  output logic   out_keep,     // flit goes onto the link
  output logic   dropped,      // databody/tail without a slot: dropped
  output logic   runout,       // header found no free slot
  output logic   allocated,    // header took a new slot
  output logic [TAG_W:0] n_free
);

  localparam int unsigned N_USE = N_SLOT - 1;      // usable slots
  localparam tag_t        RESV  = tag_t'(N_SLOT - 1);

  logic  used    [N_USE];
  tag_t  old_id  [N_USE];
  port_t from_pt [N_USE];

  logic  match_found, free_found;
  tag_t  match_k, free_k;

  // Slot lookups: the slot holding (Id_old, from) and the lowest free slot.
  always_comb begin
    match_found = 1'b0;
    match_k     = '0;
    free_found  = 1'b0;
    free_k      = '0;
    for (int k = 0; k < N_USE; k++) begin
      if (!match_found && used[k] && old_id[k] == in_flit.id && from_pt[k] == in_from) begin
        match_found = 1'b1;
        match_k     = tag_t'(k);
      end
      if (!free_found && !used[k]) begin
        free_found = 1'b1;
        free_k     = tag_t'(k);
      end
    end
  end

  logic do_alloc, do_free;

  always_comb begin
    out_flit  = in_flit;
    out_keep  = in_valid;
    dropped   = 1'b0;
    runout    = 1'b0;
    do_alloc  = 1'b0;
    do_free   = 1'b0;
    unique case (in_flit.ftype)
      FT_HEADER: begin
        if (in_flit.id == RESV) begin
          out_flit.id = RESV;
        end else if (match_found) begin
          out_flit.id = match_k;
        end else if (free_found) begin
          out_flit.id = free_k;
          do_alloc    = in_valid;
        end else begin
          out_flit.id = RESV;
          runout      = in_valid;
        end
      end
      FT_DATABODY, FT_TAIL: begin
        if (match_found) begin
          out_flit.id = match_k;
          do_free     = in_valid && (in_flit.ftype == FT_TAIL);
        end else begin
          out_keep = 1'b0;
          dropped  = in_valid;
        end
      end
      default: out_flit.id = RESV;   // response
    endcase
  end

  assign allocated = do_alloc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_USE; k++) begin
        used[k]    <= 1'b0;
        old_id[k]  <= '0;
        from_pt[k] <= '0;
      end
    end else if (do_alloc) begin
      used[free_k]    <= 1'b1;
      old_id[free_k]  <= in_flit.id;
      from_pt[free_k] <= in_from;
    end else if (do_free) begin
      used[match_k]    <= 1'b0;
      old_id[match_k]  <= '0;
      from_pt[match_k] <= '0;
    end
  end

  always_comb begin
    n_free = '0;
    for (int k = 0; k < N_USE; k++) n_free += (TAG_W+1)'(!used[k]);
  end

  initial begin
    assert (N_SLOT >= 2 && N_SLOT <= 2**TAG_W)
      else $error("N_SLOT must be between 2 and 2**TAG_W");
  end

endmodule
