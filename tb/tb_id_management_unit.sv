// tb_id_management_unit: checks the Id-tag update of an output port with a
// small table (N_SLOT = 4: three usable slots and the reserved slot 3).
// Directed: allocation of the lowest free slot, reuse of a packet's slot by
// its further headers, the same old Id from another input taking a new slot,
// Id run-out (header gets slot 3, its databody/tail are dropped), release by
// a tail, response flits on slot 3. Then random traffic against a model.
module tb_id_management_unit;
  import noc_pkg::*;

  localparam int unsigned N_SLOT = 4;
  localparam tag_t RESV = tag_t'(N_SLOT - 1);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid;
  flit_t in_flit, out_flit;
  port_t in_from;
  logic  out_keep, dropped, runout, allocated;
  logic [TAG_W:0] n_free;
  int    checks = 0, failures = 0;

  id_management_unit #(.N_SLOT(N_SLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the table
  logic  m_used [N_SLOT-1];
  tag_t  m_old  [N_SLOT-1];
  port_t m_from [N_SLOT-1];

  // Returns expected new id, keep flag; updates the model.
  task automatic model(input flit_type_e t, input tag_t id, input port_t from,
                       output tag_t nid, output logic keep);
    int match, free;
    match = -1; free = -1;
    for (int k = N_SLOT - 2; k >= 0; k--) begin
      if (m_used[k] && m_old[k] == id && m_from[k] == from) match = k;
      if (!m_used[k]) free = k;
    end
    keep = 1'b1; nid = RESV;
    case (t)
      FT_HEADER:
        if (id == RESV) nid = RESV;
        else if (match >= 0) nid = tag_t'(match);
        else if (free >= 0) begin
          nid = tag_t'(free); m_used[free] = 1'b1; m_old[free] = id; m_from[free] = from;
        end else nid = RESV;
      FT_DATABODY: if (match >= 0) nid = tag_t'(match); else keep = 1'b0;
      FT_TAIL: if (match >= 0) begin nid = tag_t'(match); m_used[match] = 1'b0; end else keep = 1'b0;
      default: nid = RESV;
    endcase
  endtask

  task automatic send(input flit_type_e t, input tag_t id, input port_t from,
                      input int exp_id, input logic exp_keep);
    tag_t nid; logic keep;
    in_valid = 1'b1; in_flit.ftype = t; in_flit.id = id; in_flit.word = $urandom; in_from = from;
    model(t, id, from, nid, keep);
    #1;
    checks++;
    if (out_keep !== keep || (keep && out_flit.id !== nid) || out_flit.word !== in_flit.word) begin
      failures++;
      if (failures < 10) $display("FAIL %s id=%0d from=%0d: keep=%b id=%0d exp keep=%b id=%0d",
                                  t.name(), id, from, out_keep, out_flit.id, keep, nid);
    end
    if (exp_id >= 0) begin
      checks++;
      if (out_keep !== exp_keep || (exp_keep && out_flit.id != tag_t'(exp_id))) begin
        failures++;
        $display("FAIL directed %s id=%0d from=%0d: got keep=%b id=%0d", t.name(), id, from, out_keep, out_flit.id);
      end
    end
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  int n_runout = 0, n_drop = 0;
  always @(posedge clk) begin
    if (runout) n_runout++;
    if (dropped) n_drop++;
  end

  initial begin
    for (int k = 0; k < N_SLOT - 1; k++) begin m_used[k] = 0; m_old[k] = '0; m_from[k] = '0; end
    in_valid = 0; in_flit = '0; in_from = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++; if (n_free != 3) begin failures++; $display("FAIL n_free after reset %0d", n_free); end
    send(FT_HEADER,   4'd5, 3'd1, 0, 1);   // packet A -> slot 0
    send(FT_HEADER,   4'd5, 3'd1, 0, 1);   // A's second header reuses slot 0
    send(FT_HEADER,   4'd5, 3'd2, 1, 1);   // same old Id, other input -> slot 1
    send(FT_DATABODY, 4'd5, 3'd2, 1, 1);
    send(FT_HEADER,   4'd0, 3'd4, 2, 1);   // slot 2
    checks++; if (n_free != 0) begin failures++; $display("FAIL n_free full %0d", n_free); end
    send(FT_HEADER,   4'd7, 3'd0, 3, 1);   // run-out -> reserved slot 3
    send(FT_DATABODY, 4'd7, 3'd0, 0, 0);   // its databody is dropped
    send(FT_TAIL,     4'd7, 3'd0, 0, 0);   // and its tail
    send(FT_RESPONSE, 4'd2, 3'd3, 3, 1);   // response -> slot 3
    send(FT_HEADER,   RESV, 3'd3, 3, 1);   // header already on slot 3 stays there
    send(FT_DATABODY, 4'd5, 3'd1, 0, 1);
    send(FT_TAIL,     4'd5, 3'd1, 0, 1);   // frees slot 0
    send(FT_HEADER,   4'd9, 3'd3, 0, 1);   // slot 0 reused by a new packet
    checks++; if (n_runout != 1 || n_drop != 2) begin failures++; $display("FAIL runout=%0d drop=%0d", n_runout, n_drop); end
    // random traffic against the model
    for (int i = 0; i < 4000; i++) begin
      flit_type_e t;
      t = flit_type_e'($urandom_range(0, 3));
      send(t, tag_t'($urandom_range(0, 3)), port_t'($urandom_range(0, 4)), -1, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
