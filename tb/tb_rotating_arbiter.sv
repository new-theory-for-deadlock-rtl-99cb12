// tb_rotating_arbiter: checks the rotating flit-by-flit arbiter.
// 1) The worked example of the arbitration definition: inputs 2, 4 and 5
//    (1-based) request continuously; the grants must come in the order
//    5, 4, 2, 5, 4, 2 (each served once every T = 3 grants).
// 2) Random requests and enables against an independent model of the
//    downward-rotating search; one-hot, no grant without request or enable.
module tb_rotating_arbiter;
  localparam int unsigned N = 5;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         en;
  logic [N-1:0] req, gnt;
  int           checks = 0, failures = 0;

  rotating_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: index granted last (search starts just below it)
  int last_m;

  function automatic logic [N-1:0] model_gnt(logic [N-1:0] r, logic e);
    logic [N-1:0] g;
    int idx;
    g = '0;
    if (e) begin
      for (int i = N; i >= 1; i--) begin
        idx = (last_m - i + N) % N;
        if (r[idx]) g = '0;
        if (r[idx]) g[idx] = 1'b1;
      end
    end
    return g;
  endfunction

  task automatic step(input logic [N-1:0] r, input logic e);
    logic [N-1:0] exp_g;
    req = r; en = e;
    #1;
    exp_g = model_gnt(r, e);
    checks++;
    if (gnt !== exp_g) begin
      failures++;
      if (failures < 10) $display("FAIL req=%b en=%b gnt=%b exp=%b", r, e, gnt, exp_g);
    end
    @(posedge clk);
    for (int k = 0; k < N; k++) if (exp_g[k]) last_m = k;
    #1;
  endtask

  initial begin
    int order[6];
    int served[N];
    last_m = N;   // search starts at input N-1 (the highest)
    req = '0; en = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // worked example: requests from inputs 2, 4, 5 (indices 1, 3, 4)
    order = '{4, 3, 1, 4, 3, 1};
    for (int t = 0; t < 6; t++) begin
      req = 5'b11010; en = 1'b1; #1;
      checks++;
      if (gnt !== (5'(1) << order[t])) begin
        failures++;
        $display("FAIL example step %0d: gnt=%b expected input %0d", t, gnt, order[t] + 1);
      end
      @(posedge clk);
      last_m = order[t];
      #1;
    end
    // fairness: all five requesting, each served once in five grants
    for (int k = 0; k < N; k++) served[k] = 0;
    for (int t = 0; t < N; t++) begin
      req = '1; en = 1'b1; #1;
      for (int k = 0; k < N; k++) if (gnt[k]) begin served[k]++; last_m = k; end
      @(posedge clk); #1;
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (served[k] != 1) begin failures++; $display("FAIL fairness input %0d served %0d", k, served[k]); end
    end
    // random
    for (int i = 0; i < 5000; i++)
      step((N)'($urandom), ($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
