// tb_xc_trigger_table: programs every {source, hit} entry and reads it back
// through both lookup ports.
module tb_xc_trigger_table;
  import xcache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we; logic [2:0] cfg_addr; event_t cfg_event;
  src_e src_a, src_b; logic hit_a, hit_b; event_t ev_a, ev_b;
  event_t model [8];
  int checks = 0, failures = 0, cycle = 0;
  xc_trigger_table dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_event = 0; src_a = SRC_LOAD; src_b = SRC_LOAD; hit_a = 0; hit_b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) model[i] = '0;
    for (int r = 0; r < 200; r++) begin
      cfg_we = $urandom_range(1); cfg_addr = 3'($urandom); cfg_event = event_t'($urandom);
      @(negedge clk);
      if (cfg_we) model[cfg_addr] = cfg_event;
      cfg_we = 0;
      src_a = src_e'($urandom_range(3)); hit_a = $urandom_range(1);
      src_b = src_e'($urandom_range(3)); hit_b = $urandom_range(1);
      #1;
      check(ev_a == model[{src_a, hit_a}], "port a");
      check(ev_b == model[{src_b, hit_b}], "port b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
