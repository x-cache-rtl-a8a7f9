// tb_xc_routine_table: random programming of [state, event] entries and
// random lookups against a model; unprogrammed entries must read invalid.
module tb_xc_routine_table;
  import xcache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_valid, rd_valid; state_t cfg_state, rd_state; event_t cfg_event, rd_event;
  upc_t cfg_pc, rd_pc;
  logic mv [256]; upc_t mp [256];
  int checks = 0, failures = 0, cycle = 0;
  xc_routine_table dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg_we = 0; cfg_valid = 0; cfg_state = 0; cfg_event = 0; cfg_pc = 0; rd_state = 0; rd_event = 0;
    for (int i = 0; i < 256; i++) begin mv[i] = 0; mp[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 1000; r++) begin
      cfg_we = ($urandom_range(3) == 0); cfg_state = state_t'($urandom); cfg_event = event_t'($urandom);
      cfg_valid = ($urandom_range(4) != 0); cfg_pc = upc_t'($urandom);
      @(negedge clk);
      if (cfg_we) begin mv[{cfg_state, cfg_event}] = cfg_valid; mp[{cfg_state, cfg_event}] = cfg_pc; end
      cfg_we = 0;
      rd_state = state_t'($urandom); rd_event = event_t'($urandom);
      #1;
      check(rd_valid == mv[{rd_state, rd_event}], "valid");
      if (mv[{rd_state, rd_event}]) check(rd_pc == mp[{rd_state, rd_event}], "pc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
