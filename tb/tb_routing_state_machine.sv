// tb_routing_state_machine: exhaustive check of the XY routing function
// over all router and target coordinates of a 16x16 address space, against
// an independent rule: X-first, then Y, then Local.
module tb_routing_state_machine;
  import noc_pkg::*;

  coord_t   my_x, my_y, dst_x, dst_y;
  portvec_t r_dir;
  int       checks = 0, failures = 0;

  routing_state_machine dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_port;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++)
          for (int d = 0; d < 16; d += 3) begin
            my_x = coord_t'(a); my_y = coord_t'(b); dst_x = coord_t'(c); dst_y = coord_t'(d);
            #1;
            if (c != a)      exp_port = (c > a) ? 0 : 2;   // East : West
            else if (d != b) exp_port = (d > b) ? 1 : 3;   // North : South
            else             exp_port = 4;                 // Local
            checks++;
            if (r_dir !== portvec_t'(1 << exp_port)) begin
              failures++;
              if (failures < 10)
                $display("FAIL at (%0d,%0d) to (%0d,%0d): got %b", a, b, c, d, r_dir);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
