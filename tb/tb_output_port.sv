// tb_output_port: checks one output port (arbiter, multiplexer, Id
// management, link register) with N_SLOT = 4 (3 usable Id slots).
// The testbench plays the routing stages of the five inputs: each input
// offers its next flit while it has one and takes it away on a grant.
// Phase 1: three inputs send interleaved packets while the downstream queue
// randomly signals full. The link must carry every flit once, in order per
// input, all flits of a packet on one Id, concurrent packets on different
// Ids, no grant while the link register is blocked, and one grant per cycle.
// Phase 2: five packets open at once: three get slots 0..2, two run out and
// get the reserved slot 3; their databody flits are dropped.
module tb_output_port;
  import noc_pkg::*;

  localparam int unsigned N_SLOT = 4;

  logic     clk = 1'b0, rst_n = 1'b0;
  portvec_t req_col, gnt_col;
  flit_t    in_flits [N_PORTS];
  logic     out_valid, down_full;
  flit_t    out_flit;
  logic     contention, runout, dropped, allocated;
  logic [TAG_W:0] n_free;
  int       checks = 0, failures = 0;

  output_port #(.N_SLOT(N_SLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  flit_t src_q [N_PORTS][$];
  flit_t got [$];
  int    n_runout = 0, n_drop = 0, n_cont = 0;
  logic  random_full = 1'b0;

  // per-input read pointers, advanced with nonblocking writes
  int si [N_PORTS] = '{default: 0};
  always_comb begin
    for (int n = 0; n < N_PORTS; n++) begin
      req_col[n]  = (si[n] < src_q[n].size());
      in_flits[n] = (si[n] < src_q[n].size()) ? src_q[n][si[n]] : '0;
    end
  end

  always @(negedge clk) down_full <= random_full ? 1'($urandom_range(0, 1)) : 1'b0;

  always @(posedge clk) if (rst_n) begin
    check($onehot0(gnt_col), "one grant per cycle");
    if (out_valid && down_full) check(gnt_col == '0, "no grant while link blocked");
    if (runout) n_runout++;
    if (dropped) n_drop++;
    if (contention) n_cont++;
    if (out_valid && !down_full) got.push_back(out_flit);
    for (int n = 0; n < N_PORTS; n++) if (gnt_col[n]) si[n] <= si[n] + 1;
  end

  // Flit whose word says: input n, packet p, sequence s.
  function automatic flit_t mk(flit_type_e t, int n, int p, int s);
    flit_t f;
    f.ftype = t; f.id = tag_t'(2);   // all inputs use old Id 2
    f.word  = {8'(n), 8'(p), 16'(s)};
    return f;
  endfunction

  initial begin
    int  seq_exp [N_PORTS];
    int  tag_of  [N_PORTS];
    logic open   [N_PORTS];
    flit_t f;
    down_full = 1'b0;
    for (int n = 0; n < N_PORTS; n++) begin seq_exp[n] = 0; open[n] = 0; tag_of[n] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Phase 1
    foreach (seq_exp[n]) if (n % 2 == 0)
      for (int p = 0; p < 3; p++) begin
        src_q[n].push_back(mk(FT_HEADER, n, p, 0));
        for (int s = 1; s <= 4; s++) src_q[n].push_back(mk(FT_DATABODY, n, p, s));
        src_q[n].push_back(mk(FT_TAIL, n, p, 5));
      end
    random_full = 1'b1;
    for (int i = 0; i < 400; i++) @(negedge clk);
    random_full = 1'b0;
    repeat (5) @(negedge clk);
    check(got.size() == 3 * 3 * 6, "phase 1: all flits delivered once");
    foreach (got[i]) begin
      int n, s;
      n = int'(got[i].word[31:24]); s = int'(got[i].word[15:0]);
      check(s == seq_exp[n] % 6, "phase 1: order per input");
      seq_exp[n]++;
      if (got[i].ftype == FT_HEADER) begin
        for (int o = 0; o < N_PORTS; o++)
          if (o != n && open[o]) check(tag_of[o] != int'(got[i].id), "phase 1: distinct Ids");
        tag_of[n] = int'(got[i].id); open[n] = 1'b1;
        check(int'(got[i].id) < N_SLOT - 1, "phase 1: header got a usable slot");
      end else begin
        check(int'(got[i].id) == tag_of[n], "phase 1: packet keeps its Id");
        if (got[i].ftype == FT_TAIL) open[n] = 1'b0;
      end
    end
    check(n_cont > 0, "phase 1: contention seen");
    check(n_free == N_SLOT - 1, "phase 1: all slots free again");
    // Phase 2: five headers at once, then one databody and a tail each
    got.delete();
    for (int n = 0; n < N_PORTS; n++) src_q[n].push_back(mk(FT_HEADER, n, 9, 0));
    repeat (8) @(negedge clk);
    for (int n = 0; n < N_PORTS; n++) src_q[n].push_back(mk(FT_DATABODY, n, 9, 1));
    repeat (8) @(negedge clk);
    for (int n = 0; n < N_PORTS; n++) src_q[n].push_back(mk(FT_TAIL, n, 9, 2));
    repeat (8) @(negedge clk);
    begin
      int n_resv = 0, n_usable = 0, n_data = 0;
      foreach (got[i]) begin
        if (got[i].ftype == FT_HEADER) begin
          if (int'(got[i].id) == N_SLOT - 1) n_resv++; else n_usable++;
        end else n_data++;
      end
      check(n_usable == 3 && n_resv == 2, "phase 2: three slots allocated, two run-outs");
      check(n_runout == 2, "phase 2: run-out reported twice");
      check(n_data == 6 && n_drop == 4, "phase 2: databody/tail of run-out packets dropped");
    end
    check(n_free == N_SLOT - 1, "phase 2: slots freed by tails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
