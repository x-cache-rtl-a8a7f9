// tb_xc_ucode_ram: writes random actions and reads them back through all
// four lane ports, including addresses beyond the configured depth (NOP).
module tb_xc_ucode_ram;
  import xcache_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic cfg_we; upc_t cfg_addr; action_t cfg_action;
  upc_t rd_pc [4]; action_t rd_act [4];
  action_t model [128];
  bit written [128];
  int checks = 0, failures = 0, cycle = 0;
  xc_ucode_ram #(.DEPTH(128), .NRD(4)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_action = '0;
    for (int i = 0; i < 4; i++) rd_pc[i] = 0;
    for (int i = 0; i < 128; i++) written[i] = 0;
    for (int r = 0; r < 1500; r++) begin
      cfg_we = $urandom_range(1); cfg_addr = upc_t'($urandom_range(127)); cfg_action = action_t'({$urandom, $urandom});
      @(negedge clk);
      if (cfg_we) begin model[cfg_addr] = cfg_action; written[cfg_addr] = 1; end
      cfg_we = 0;
      for (int i = 0; i < 4; i++) rd_pc[i] = upc_t'($urandom);
      #1;
      for (int i = 0; i < 4; i++)
        if (rd_pc[i] >= 128) check(rd_act[i].op == OP_NOP, "beyond depth reads NOP");
        else if (written[rd_pc[i]]) check(rd_act[i] == model[rd_pc[i]], "read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
