// tb_routing_reservation_table: random union/clear/read operations on the
// routing reservation table, compared with an array model (header: union,
// tail: clear, databody: read).
module tb_routing_reservation_table;
  import noc_pkg::*;

  localparam int unsigned N_SLOT = 16;

  logic     clk = 1'b0, rst_n = 1'b0;
  tag_t     rd_id, wr_id;
  portvec_t rd_dir, wr_dir;
  logic     wr_en, wr_clear;
  int       checks = 0, failures = 0;
  portvec_t model [N_SLOT];

  routing_reservation_table #(.N_SLOT(N_SLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_SLOT; k++) model[k] = '0;
    wr_en = 0; wr_clear = 0; wr_id = '0; wr_dir = '0; rd_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // after reset every entry is empty
    for (int k = 0; k < N_SLOT; k++) begin
      rd_id = tag_t'(k); #1;
      checks++; if (rd_dir !== '0) begin failures++; $display("FAIL reset entry %0d", k); end
    end
    // a two-header multicast: union of E and L in slot 3, then read, clear
    @(negedge clk); wr_en = 1; wr_clear = 0; wr_id = 3; wr_dir = 5'b00001;
    @(negedge clk); wr_dir = 5'b10000;
    @(negedge clk); wr_en = 0; rd_id = 3; #1;
    checks++; if (rd_dir !== 5'b10001) begin failures++; $display("FAIL union %b", rd_dir); end
    @(negedge clk); wr_en = 1; wr_clear = 1; wr_id = 3;
    @(negedge clk); wr_en = 0; #1;
    checks++; if (rd_dir !== '0) begin failures++; $display("FAIL clear %b", rd_dir); end
    // random operations
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en    = 1'($urandom_range(0, 1));
      wr_clear = ($urandom_range(0, 3) == 0);
      wr_id    = tag_t'($urandom_range(0, N_SLOT - 1));
      wr_dir   = portvec_t'(1 << $urandom_range(0, N_PORTS - 1));
      rd_id    = tag_t'($urandom_range(0, N_SLOT - 1));
      #1;
      checks++;
      if (rd_dir !== model[rd_id]) begin
        failures++;
        if (failures < 10) $display("FAIL read slot %0d got %b exp %b", rd_id, rd_dir, model[rd_id]);
      end
      @(posedge clk);
      if (wr_en) model[wr_id] = wr_clear ? '0 : (model[wr_id] | wr_dir);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
