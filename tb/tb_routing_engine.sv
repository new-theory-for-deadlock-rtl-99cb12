// tb_routing_engine: checks the routing engine of one input port of the
// router at (1,1).
// Header flits are routed by XY and build the multicast set in the table;
// the databody of a two-header packet requests both branches. Granting only
// one branch must hold the flit and drop the granted request (r <- r & ~a);
// granting the rest releases it and pops the next flit. A tail requests the
// set and clears it; a later databody on the freed Id is discarded. Response
// flits are routed by address; a header on the reserved Id leaves no table
// entry. A random phase then compares hold/release against a model.
module tb_routing_engine;
  import noc_pkg::*;

  localparam int unsigned N_SLOT = 16;

  logic     clk = 1'b0, rst_n = 1'b0;
  coord_t   my_x = 4'd1, my_y = 4'd1;
  logic     head_valid, pop;
  flit_t    head, flit;
  portvec_t req, grant;
  logic     held, released, multicast, discarded;
  int       checks = 0, failures = 0;
  flit_t    q[$];

  routing_engine #(.N_SLOT(N_SLOT)) dut (.*);

  always #5 clk = ~clk;

  // queue read pointer, advanced with a nonblocking write
  int qi = 0;
  assign head_valid = (qi < q.size());
  assign head       = (qi < q.size()) ? q[qi] : '0;

  always @(posedge clk) if (pop && qi < q.size()) qi <= qi + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (req=%b)", what, $time, req); end
  endtask

  function automatic flit_t mk(flit_type_e t, int id, int dx, int dy);
    flit_t f;
    f.ftype = t; f.id = tag_t'(id);
    f.word  = (t == FT_HEADER || t == FT_RESPONSE) ?
              make_hdr_word(4'd0, 4'd0, coord_t'(dx), coord_t'(dy), 16'hbeef) : 32'hd00d_0000 + dx;
    return f;
  endfunction

  // Wait for the stage to hold a flit; check its request; grant g.
  task automatic expect_req(input portvec_t exp_r, input portvec_t g, input logic exp_release, input string what);
    int n = 0;
    while (req == '0 && n < 20) begin @(negedge clk); n++; end
    check(req == exp_r, {what, ": request"});
    grant = g & req; #1;
    check(released == exp_release && held == !exp_release, {what, ": hold/release"});
    @(negedge clk);
    grant = '0;
  endtask

  int n_disc = 0, n_mc = 0;
  always @(posedge clk) begin
    if (discarded) n_disc++;
    if (multicast) n_mc++;
  end

  initial begin
    grant = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    q.push_back(mk(FT_HEADER,   2, 1, 2));     // -> North
    q.push_back(mk(FT_HEADER,   2, 0, 1));     // -> West
    q.push_back(mk(FT_DATABODY, 2, 0, 0));     // -> North | West
    q.push_back(mk(FT_TAIL,     2, 0, 0));
    q.push_back(mk(FT_DATABODY, 2, 0, 0));     // table cleared: discarded
    q.push_back(mk(FT_RESPONSE, 9, 3, 1));     // -> East
    q.push_back(mk(FT_HEADER,   N_SLOT - 1, 1, 0));  // -> South, no table write
    q.push_back(mk(FT_DATABODY, N_SLOT - 1, 0, 0));  // discarded
    q.push_back(mk(FT_HEADER,   5, 1, 1));     // -> Local
    expect_req(5'b00010, 5'b00010, 1'b1, "header N");
    expect_req(5'b00100, 5'b00100, 1'b1, "header W");
    expect_req(5'b00110, 5'b00010, 1'b0, "databody, N granted");
    check(flit.ftype == FT_DATABODY, "databody still held");
    expect_req(5'b00100, 5'b00100, 1'b1, "databody, W granted");
    expect_req(5'b00110, 5'b00110, 1'b1, "tail, both granted");
    expect_req(5'b00001, 5'b00001, 1'b1, "response E");
    check(n_disc == 1, "databody after tail discarded");
    expect_req(5'b01000, 5'b01000, 1'b1, "reserved-Id header S");
    expect_req(5'b10000, 5'b10000, 1'b1, "header L");
    check(n_disc == 2, "databody on reserved Id discarded");
    check(n_mc == 2, "two multicast flits routed");
    check(qi == q.size(), "queue drained");

    // Random phase: multicast set E|N|S|L in slot 7, then databody flits with
    // random partial grants; each request bit must be granted exactly once.
    q.push_back(mk(FT_HEADER, 7, 2, 1));
    q.push_back(mk(FT_HEADER, 7, 1, 2));
    q.push_back(mk(FT_HEADER, 7, 1, 0));
    q.push_back(mk(FT_HEADER, 7, 1, 1));
    for (int h = 0; h < 4; h++) begin
      while (req == '0) @(negedge clk);
      grant = req; @(negedge clk); grant = '0;
    end
    for (int i = 0; i < 300; i++) begin
      portvec_t left, g;
      int guard;
      q.push_back(mk(FT_DATABODY, 7, 0, 0));
      while (req == '0) @(negedge clk);
      left = 5'b11011;
      check(req == left, "random: full set requested");
      guard = 0;
      while (left != '0 && guard < 50) begin
        g = req & portvec_t'($urandom);
        check(req == left, "random: only ungranted requests remain");
        grant = g & req; #1;
        check(released == ((left & ~g) == '0), "random: release when all granted");
        left = left & ~g;
        @(negedge clk);
        grant = '0;
        guard++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
