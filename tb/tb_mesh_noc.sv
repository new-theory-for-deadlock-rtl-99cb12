// tb_mesh_noc: end-to-end test of the mesh at its default size (4x4 mesh,
// 16 Id slots per link, 4-flit queues).
// Phase 1, multicast trees: every node sends multicast and unicast packets
// to random destination sets while the receiving processing elements
// randomly stall; some nodes also send single-flit response flits.
// Phase 2, all-to-one: all 15 other nodes open a packet to node 0 at the same
// time, plus a second open packet from node 5 (headers first, then databody,
// then tails). The Local output of node 0 has 15 usable Id slots, so exactly
// one of the 16 packets runs out: its header arrives on the reserved Id and
// its databody and tail flits are dropped; the other 15 arrive complete.
// Scoreboard, per packet and per node: each destination gets its header and,
// unless the header came on the reserved Id, every databody/tail flit once,
// in order and on one Id-tag; no other node gets any flit of the packet.
// Each mechanism (multicast replication, hold, output contention, Id slot
// allocation, run-out, drop, response routing, back-pressure) is counted and
// must occur at least once.
module tb_mesh_noc;
  import noc_pkg::*;

  localparam int unsigned MX = 4, MY = 4, NSL = 16;
  localparam int unsigned NODES = MX * MY;
  localparam int unsigned MAXP = 256;
  localparam tag_t RESV = tag_t'(NSL - 1);

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           local_in_valid  [NODES];
  flit_t          local_in_flit   [NODES];
  logic           local_in_full   [NODES];
  logic           local_out_valid [NODES];
  flit_t          local_out_flit  [NODES];
  logic           local_out_full  [NODES];
  router_status_t status          [NODES];
  int             checks = 0, failures = 0;

  mesh_noc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- injection ----------------
  flit_t send_q [NODES][$];
  int    si [NODES] = '{default: 0};
  logic  random_full = 1'b0;

  always_comb
    for (int i = 0; i < NODES; i++) begin
      local_in_valid[i] = (si[i] < send_q[i].size());
      local_in_flit[i]  = local_in_valid[i] ? send_q[i][si[i]] : '0;
    end

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NODES; i++) if (local_in_valid[i] && !local_in_full[i]) si[i] <= si[i] + 1;

  always @(negedge clk)
    for (int i = 0; i < NODES; i++) local_out_full[i] <= random_full && ($urandom_range(0, 3) == 0);

  // ---------------- packets ----------------
  int     n_pkts = 0;
  int     pkt_src   [MAXP];
  int     pkt_len   [MAXP];          // 0 for a response flit
  int     pkt_ndest [MAXP][NODES];   // headers per destination node
  flit_t  got [NODES][$];

  function automatic int nx(int i); return i % MX; endfunction
  function automatic int ny(int i); return i / MX; endfunction

  task automatic open_packet(input int src, input int id, input int dests[$], input int len, output int p);
    flit_t f;
    p = n_pkts++;
    pkt_src[p] = src; pkt_len[p] = len;
    for (int d = 0; d < NODES; d++) pkt_ndest[p][d] = 0;
    foreach (dests[i]) begin
      f.ftype = FT_HEADER; f.id = tag_t'(id);
      f.word  = make_hdr_word(coord_t'(nx(src)), coord_t'(ny(src)),
                              coord_t'(nx(dests[i])), coord_t'(ny(dests[i])), {8'(p), 8'hff});
      send_q[src].push_back(f);
      pkt_ndest[p][dests[i]]++;
    end
  endtask

  task automatic body(input int p, input int id, input int from_s, input int to_s);
    flit_t f;
    for (int s = from_s; s < to_s; s++) begin
      f.ftype = (s == pkt_len[p] - 1) ? FT_TAIL : FT_DATABODY; f.id = tag_t'(id);
      f.word  = {8'(p), 8'hda, 16'(s)};
      send_q[pkt_src[p]].push_back(f);
    end
  endtask

  task automatic response(input int src, input int dst);
    flit_t f;
    int p = n_pkts++;
    pkt_src[p] = src; pkt_len[p] = 0;
    for (int d = 0; d < NODES; d++) pkt_ndest[p][d] = 0;
    pkt_ndest[p][dst] = 1;
    f.ftype = FT_RESPONSE; f.id = RESV;
    f.word  = make_hdr_word(coord_t'(nx(src)), coord_t'(ny(src)),
                            coord_t'(nx(dst)), coord_t'(ny(dst)), {8'(p), 8'hee});
    send_q[src].push_back(f);
  endtask

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NODES; i++)
      if (local_out_valid[i] && !local_out_full[i]) got[i].push_back(local_out_flit[i]);

  // ---------------- mechanism counters ----------------
  int n_held = 0, n_mc = 0, n_cont = 0, n_alloc = 0, n_runout = 0, n_drop = 0;
  int n_stall = 0, n_resp = 0, n_infull = 0;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NODES; i++) begin
      n_held   += $countones(status[i].held);
      n_mc     += $countones(status[i].multicast);
      n_cont   += $countones(status[i].contention);
      n_alloc  += $countones(status[i].allocated);
      n_runout += $countones(status[i].runout);
      n_drop   += $countones(status[i].dropped);
      if (local_out_valid[i] && local_out_full[i]) n_stall++;
      if (local_in_valid[i] && local_in_full[i]) n_infull++;
      if (local_out_valid[i] && !local_out_full[i] && local_out_flit[i].ftype == FT_RESPONSE) n_resp++;
    end

  task automatic wait_drain(input int settle);
    int guard = 0;
    logic busy = 1'b1;
    while (busy && guard < 100000) begin
      @(negedge clk); guard++;
      busy = 1'b0;
      for (int i = 0; i < NODES; i++) if (si[i] < send_q[i].size()) busy = 1'b1;
    end
    check(!busy, "injection finished (no deadlock)");
    repeat (settle) @(negedge clk);
  endtask

  // Score packets p0..p1-1; returns the number of run-out deliveries.
  task automatic score(input int p0, input int p1, output int n_resv_hdr);
    n_resv_hdr = 0;
    for (int p = p0; p < p1; p++)
      for (int d = 0; d < NODES; d++) begin
        int nh = 0, nd = 0, tag = -1;
        logic ok_order = 1'b1, ok_tag = 1'b1;
        foreach (got[d][i]) begin
          flit_t f = got[d][i];
          if ((f.ftype == FT_HEADER || f.ftype == FT_RESPONSE) && int'(f.word[15:8]) == p) begin
            nh++;
            if (tag < 0) tag = int'(f.id); else if (int'(f.id) != tag) ok_tag = 0;
            if (f.ftype == FT_RESPONSE && f.id != RESV) ok_tag = 0;
          end else if ((f.ftype == FT_DATABODY || f.ftype == FT_TAIL) && int'(f.word[31:24]) == p) begin
            if (int'(f.word[15:0]) != nd) ok_order = 0;
            if ((f.ftype == FT_TAIL) != (nd == pkt_len[p] - 1)) ok_order = 0;
            if (int'(f.id) != tag) ok_tag = 0;
            nd++;
          end
        end
        if (pkt_ndest[p][d] > 0 && tag == int'(RESV) && pkt_len[p] > 0) begin
          n_resv_hdr++;
          check(nd == 0, $sformatf("packet %0d at node %0d: run-out packet has no data", p, d));
        end else begin
          check(nd == (pkt_ndest[p][d] > 0 ? pkt_len[p] : 0),
                $sformatf("packet %0d at node %0d: %0d data flits, expected %0d", p, d, nd,
                          pkt_ndest[p][d] > 0 ? pkt_len[p] : 0));
        end
        check(nh == pkt_ndest[p][d], $sformatf("packet %0d at node %0d: %0d headers, expected %0d", p, d, nh, pkt_ndest[p][d]));
        check(ok_order, $sformatf("packet %0d at node %0d: order", p, d));
        check(ok_tag, $sformatf("packet %0d at node %0d: one Id-tag", p, d));
      end
  endtask

  initial begin
    int p, p_start, n_resv, runout_before, drop_before, t0;
    int open_p [NODES + 1];
    int open_id [NODES + 1];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---------------- Phase 1: multicast trees and responses ------------
    t0 = $time;
    random_full = 1'b1;
    for (int src = 0; src < NODES; src++)
      for (int k = 0; k < 3; k++) begin
        automatic int dests[$];
        automatic int nd = (k == 0) ? 1 : $urandom_range(2, 6);
        while (dests.size() < nd) begin
          int d;
          logic dup;
          d = $urandom_range(0, NODES - 1);
          dup = (d == src);
          foreach (dests[j]) if (dests[j] == d) dup = 1'b1;
          if (!dup) dests.push_back(d);
        end
        open_packet(src, k, dests, $urandom_range(1, 8), p);
        body(p, k, 0, pkt_len[p]);
        if (k == 1) response(src, (src + 5) % NODES);
      end
    wait_drain(100);
    random_full = 1'b0;
    repeat (50) @(negedge clk);
    score(0, n_pkts, n_resv);
    check(n_resv == 0, "phase 1: no Id run-out");
    $display("phase 1: %0d packets delivered in %0d cycles", n_pkts, ($time - t0) / 10);

    // ---------------- Phase 2: all-to-one with one run-out -------------
    p_start = n_pkts;
    runout_before = n_runout; drop_before = n_drop;
    for (int src = 1; src < NODES; src++) begin
      open_packet(src, 3, '{0}, 4, open_p[src]);
      open_id[src] = 3;
    end
    open_packet(5, 4, '{0}, 4, open_p[NODES]);   // second open packet of node 5
    open_id[NODES] = 4;
    wait_drain(60);
    for (int k = 1; k <= NODES; k++) body(open_p[k], open_id[k], 0, 3);
    wait_drain(60);
    for (int k = 1; k <= NODES; k++) body(open_p[k], open_id[k], 3, 4);
    wait_drain(100);
    score(p_start, n_pkts, n_resv);
    check(n_resv == 1, $sformatf("phase 2: exactly one packet ran out (%0d)", n_resv));
    check(n_runout - runout_before == 1, "phase 2: one run-out reported");
    check(n_drop - drop_before == 4, "phase 2: its databody and tail dropped");

    $display("held=%0d multicast=%0d contention=%0d alloc=%0d runout=%0d drop=%0d resp=%0d stall=%0d inject_full=%0d",
             n_held, n_mc, n_cont, n_alloc, n_runout, n_drop, n_resp, n_stall, n_infull);
    check(n_held > 0,   "mechanism: hold of a partly granted multicast flit");
    check(n_mc > 0,     "mechanism: multicast replication");
    check(n_cont > 0,   "mechanism: output contention");
    check(n_alloc > 0,  "mechanism: Id slot allocation");
    check(n_runout > 0, "mechanism: Id run-out");
    check(n_drop > 0,   "mechanism: databody/tail drop");
    check(n_resp > 0,   "mechanism: response flit delivery");
    check(n_stall > 0,  "mechanism: back-pressure from a stalled output");
    check(n_infull > 0, "mechanism: full input queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
