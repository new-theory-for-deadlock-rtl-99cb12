// tb_router: checks the five-port router at mesh position (1,1).
// Part 1 is the multicast contention example of the hold/release mechanism:
// input East wants North+West, input West wants East+South and input South
// wants North+West+Local (ports 1..5 = E, N, W, S, L). The three databody
// flits reach the routing stages in the same cycle: input West must leave in
// the first cycle, all three within two cycles (T_f = 2), and at least one
// must be held. Part 2 sends random unicast and multicast packets on all five
// inputs while the outputs randomly signal full.
// For every packet and every output the scoreboard checks that the output
// received exactly the packet's headers for that branch and, if the branch is
// in its multicast set, every databody/tail flit once, in order, all on one
// Id-tag, and nothing on outputs outside the set.
module tb_router;
  import noc_pkg::*;

  localparam int unsigned MAXP = 64;

  logic           clk = 1'b0, rst_n = 1'b0;
  coord_t         my_x = 4'd1, my_y = 4'd1;
  logic           in_valid  [N_PORTS];
  flit_t          in_flit   [N_PORTS];
  logic           in_full   [N_PORTS];
  logic           out_valid [N_PORTS];
  flit_t          out_flit  [N_PORTS];
  logic           out_full  [N_PORTS];
  router_status_t status;
  int             checks = 0, failures = 0;

  router dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- stimulus: one flit list per input link ----------------
  flit_t send_q [N_PORTS][$];
  int    si [N_PORTS] = '{default: 0};
  logic  random_full = 1'b0;

  always_comb
    for (int n = 0; n < N_PORTS; n++) begin
      in_valid[n] = (si[n] < send_q[n].size());
      in_flit[n]  = in_valid[n] ? send_q[n][si[n]] : '0;
    end

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N_PORTS; n++) if (in_valid[n] && !in_full[n]) si[n] <= si[n] + 1;

  always @(negedge clk)
    for (int m = 0; m < N_PORTS; m++) out_full[m] <= random_full && ($urandom_range(0, 2) == 0);

  // ---------------- packet bookkeeping ----------------
  int       n_pkts = 0;
  portvec_t pkt_set  [MAXP];          // union of branch directions
  int       pkt_hdrs [MAXP][N_PORTS]; // headers expected per output
  int       pkt_len  [MAXP];          // databody + tail flits
  flit_t    got [N_PORTS][$];

  function automatic int dir_of(int dx, int dy);
    if (dx > 1) return 0; if (dx < 1) return 2;
    if (dy > 1) return 1; if (dy < 1) return 3;
    return 4;
  endfunction

  // Queue a packet on input n with the given destinations and data length.
  task automatic add_packet(input int n, input int id, input int dxs[$], input int dys[$], input int len);
    flit_t f;
    int p = n_pkts++;
    pkt_set[p] = '0; pkt_len[p] = len;
    for (int m = 0; m < N_PORTS; m++) pkt_hdrs[p][m] = 0;
    foreach (dxs[i]) begin
      int d = dir_of(dxs[i], dys[i]);
      f.ftype = FT_HEADER; f.id = tag_t'(id);
      f.word  = make_hdr_word(4'd0, 4'd0, coord_t'(dxs[i]), coord_t'(dys[i]), {8'(p), 8'hff});
      send_q[n].push_back(f);
      pkt_set[p][d] = 1'b1; pkt_hdrs[p][d]++;
    end
    for (int s = 0; s < len; s++) begin
      f.ftype = (s == len - 1) ? FT_TAIL : FT_DATABODY; f.id = tag_t'(id);
      f.word  = {8'(p), 8'hda, 16'(s)};
      send_q[n].push_back(f);
    end
  endtask

  // Separate the databody of a packet from its headers (Part 1).
  task automatic add_headers_only(input int n, input int id, input int dxs[$], input int dys[$], input int len, output int p);
    flit_t f;
    p = n_pkts++;
    pkt_set[p] = '0; pkt_len[p] = len;
    for (int m = 0; m < N_PORTS; m++) pkt_hdrs[p][m] = 0;
    foreach (dxs[i]) begin
      int d = dir_of(dxs[i], dys[i]);
      f.ftype = FT_HEADER; f.id = tag_t'(id);
      f.word  = make_hdr_word(4'd0, 4'd0, coord_t'(dxs[i]), coord_t'(dys[i]), {8'(p), 8'hff});
      send_q[n].push_back(f);
      pkt_set[p][d] = 1'b1; pkt_hdrs[p][d]++;
    end
  endtask

  task automatic add_body(input int n, input int id, input int p, input int s);
    flit_t f;
    f.ftype = (s == pkt_len[p] - 1) ? FT_TAIL : FT_DATABODY; f.id = tag_t'(id);
    f.word  = {8'(p), 8'hda, 16'(s)};
    send_q[n].push_back(f);
  endtask

  always @(posedge clk) if (rst_n)
    for (int m = 0; m < N_PORTS; m++) if (out_valid[m] && !out_full[m]) got[m].push_back(out_flit[m]);

  int n_held = 0, n_mc = 0, n_cont = 0, n_alloc = 0, n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (status.held != '0) n_held++;
    if (status.multicast != '0) n_mc++;
    if (status.contention != '0) n_cont++;
    if (status.allocated != '0) n_alloc++;
    for (int m = 0; m < N_PORTS; m++) if (out_valid[m] && out_full[m]) n_stall++;
  end

  task automatic score();
    for (int p = 0; p < n_pkts; p++)
      for (int m = 0; m < N_PORTS; m++) begin
        int nh = 0, nd = 0, tag = -1;
        logic ok_order = 1'b1, ok_tag = 1'b1;
        foreach (got[m][i]) begin
          flit_t f = got[m][i];
          if (f.ftype == FT_HEADER && int'(f.word[15:8]) == p) begin
            nh++;
            if (tag < 0) tag = int'(f.id); else if (int'(f.id) != tag) ok_tag = 0;
          end else if ((f.ftype == FT_DATABODY || f.ftype == FT_TAIL) && int'(f.word[31:24]) == p) begin
            if (int'(f.word[15:0]) != nd) ok_order = 0;
            if ((f.ftype == FT_TAIL) != (nd == pkt_len[p] - 1)) ok_order = 0;
            if (int'(f.id) != tag) ok_tag = 0;
            nd++;
          end
        end
        check(nh == pkt_hdrs[p][m], $sformatf("packet %0d output %0d: %0d headers, expected %0d", p, m, nh, pkt_hdrs[p][m]));
        check(nd == (pkt_set[p][m] ? pkt_len[p] : 0), $sformatf("packet %0d output %0d: %0d data flits", p, m, nd));
        check(ok_order, $sformatf("packet %0d output %0d: order", p, m));
        check(ok_tag, $sformatf("packet %0d output %0d: one Id-tag", p, m));
      end
  endtask

  initial begin
    int pE, pW, pS;
    int t_rel [N_PORTS];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---------------- Part 1: the multicast contention example ----------
    add_headers_only(P_EAST,  1, '{1, 0},    '{2, 1},    2, pE);   // N, W
    add_headers_only(P_WEST,  1, '{2, 1},    '{1, 0},    2, pW);   // E, S
    add_headers_only(P_SOUTH, 1, '{1, 0, 1}, '{2, 1, 1}, 2, pS);   // N, W, L
    repeat (20) @(negedge clk);
    add_body(P_EAST, 1, pE, 0); add_body(P_WEST, 1, pW, 0); add_body(P_SOUTH, 1, pS, 0);
    // flits enter the queues at the next edge and the routing stage one later
    @(negedge clk); @(negedge clk);
    check(dut.req[P_EAST] == 5'b00110 && dut.req[P_WEST] == 5'b01001 &&
          dut.req[P_SOUTH] == 5'b10110, "example: request matrix R(1)");
    check(!status.held[P_WEST], "example: input W released in the first stage");
    check(status.held[P_EAST] || status.held[P_SOUTH], "example: a contending flit is held");
    @(negedge clk);
    check(status.held == '0, "example: all released after two stages (T_f = 2)");
    check(dut.req[P_WEST] == '0 || dut.g_in[P_WEST].u_in.u_re.flit.ftype != FT_DATABODY,
          "example: no flit replicated twice");
    add_body(P_EAST, 1, pE, 1); add_body(P_WEST, 1, pW, 1); add_body(P_SOUTH, 1, pS, 1);
    repeat (20) @(negedge clk);
    // ---------------- Part 2: random traffic with back-pressure ----------
    random_full = 1'b1;
    for (int k = 0; k < 40; k++) begin
      automatic int n = $urandom_range(0, N_PORTS - 1);
      automatic int nd = $urandom_range(1, 3);
      automatic int dxs[$], dys[$];
      for (int i = 0; i < nd; i++) begin
        dxs.push_back($urandom_range(0, 3));
        dys.push_back($urandom_range(0, 3));
      end
      add_packet(n, 2 + (k % 13), dxs, dys, $urandom_range(1, 6));
    end
    begin
      int guard = 0;
      logic busy = 1'b1;
      while (busy && guard < 20000) begin
        @(negedge clk); guard++;
        busy = 1'b0;
        for (int n = 0; n < N_PORTS; n++) if (si[n] < send_q[n].size()) busy = 1'b1;
      end
    end
    random_full = 1'b0;
    repeat (50) @(negedge clk);
    score();
    check(n_held > 0, "hold happened");
    check(n_mc > 0, "multicast happened");
    check(n_cont > 0, "contention happened");
    check(n_alloc > 0, "Id slots allocated");
    check(n_stall > 0, "output back-pressure happened");
    $display("held=%0d multicast=%0d contention=%0d alloc=%0d stall=%0d", n_held, n_mc, n_cont, n_alloc, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
