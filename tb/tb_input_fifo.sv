// tb_input_fifo: self-checking test of the input flit queue.
// Random push/pop traffic is compared with a queue model; the full flag is
// checked against the model's occupancy, and the queue is filled to DEPTH to
// check that a further push is refused, also when a pop happens in the same
// cycle (a transfer needs full low).
module tb_input_fifo;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  push, pop, full, empty;
  flit_t din, head;
  int    checks = 0, failures = 0;
  flit_t model[$];

  input_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(input logic do_push, input logic do_pop);
    flit_t f;
    int sz;
    f = flit_t'({$urandom, $urandom});
    push = do_push; pop = do_pop; din = f;
    #1;
    check(full == (model.size() == DEPTH), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    if (model.size() > 0) check(head == model[0], "head flit");
    @(posedge clk);
    sz = model.size();   // occupancy before this clock edge
    if (do_pop && sz > 0) void'(model.pop_front());
    if (do_push && sz < DEPTH) model.push_back(f);
    #1;
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // fill to full, then one more push that must be refused
    for (int i = 0; i < DEPTH + 2; i++) cycle(1'b1, 1'b0);
    check(model.size() == DEPTH, "model full");
    // push and pop together at full: the push is refused
    for (int i = 0; i < 5; i++) cycle(1'b1, 1'b1);
    // random traffic
    for (int i = 0; i < 3000; i++) cycle(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    // drain
    for (int i = 0; i < DEPTH + 1; i++) cycle(1'b0, 1'b1);
    check(empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
