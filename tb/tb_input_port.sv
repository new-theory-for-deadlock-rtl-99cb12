// tb_input_port: checks one input port (queue + routing engine) of the
// router at (2,2). The upstream side pushes packets whenever the queue is
// not full; the downstream side grants random subsets of the requests.
// Each packet has two headers (East and Local) so its databody and tail
// flits request both outputs. Checked: every flit leaves in arrival order,
// every requested output is granted exactly once per flit, headers request
// their own branch only, and the queue refuses flits while full.
module tb_input_port;
  import noc_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  coord_t   my_x = 4'd2, my_y = 4'd2;
  logic     in_valid, in_full;
  flit_t    in_flit, flit;
  portvec_t req, grant;
  logic     held, multicast;
  int       checks = 0, failures = 0;

  input_port dut (.*);

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

  flit_t    send_q [$];
  flit_t    exp_q  [$];
  portvec_t exp_r  [$];
  portvec_t served;
  int       n_full = 0, n_held = 0, n_out = 0;

  // upstream: offer the next flit, it is taken when not full
  // (the send pointer advances with a nonblocking write, after the DUT has
  // sampled its inputs at the same clock edge)
  int si = 0;
  assign in_valid = (si < send_q.size());
  assign in_flit  = (si < send_q.size()) ? send_q[si] : '0;

  always @(negedge clk) grant <= req & portvec_t'($urandom);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_full) si <= si + 1;
    if (in_valid && in_full) n_full++;
    if (held) n_held++;
    if (req != '0) begin
      check(flit == exp_q[0], "flit order");
      check((req & served) == '0, "no request served twice");
      check((req | served) == exp_r[0], "request set");
      served = served | grant;
      if (served == exp_r[0]) begin
        void'(exp_q.pop_front()); void'(exp_r.pop_front());
        served = '0; n_out++;
      end
    end
  end

  initial begin
    flit_t f;
    served = '0;
    grant  = '0;
    for (int p = 0; p < 40; p++) begin
      tag_t id;
      id = tag_t'(p % 15);
      f.ftype = FT_HEADER; f.id = id; f.word = make_hdr_word(0, 0, 4'd3, 4'd2, 16'(p));
      send_q.push_back(f); exp_q.push_back(f); exp_r.push_back(5'b00001);
      f.word = make_hdr_word(0, 0, 4'd2, 4'd2, 16'(p));
      send_q.push_back(f); exp_q.push_back(f); exp_r.push_back(5'b10000);
      for (int s = 0; s < 3; s++) begin
        f.ftype = (s == 2) ? FT_TAIL : FT_DATABODY; f.word = {16'(p), 16'(s)};
        send_q.push_back(f); exp_q.push_back(f); exp_r.push_back(5'b10001);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    check(n_out == 200, "all flits released");
    check(n_full > 0, "queue reported full");
    check(n_held > 0, "hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
