// tb_xc_data_ram: random byte-enabled sector writes and reads on both read
// ports against a model; read data is checked one cycle after the read.
module tb_xc_data_ram;
  import xcache_pkg::*;
  localparam int N = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en, rda_en, rdb_en; sec_t wr_sector, rda_sector, rdb_sector;
  logic [WLEN-1:0] wr_be; block_t wr_data, rda_data, rdb_data;
  block_t model [N];
  int checks = 0, failures = 0, cycle = 0;
  xc_data_ram #(.NSECTORS(N)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) if (++cycle > 20000) begin
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wr_en = 0; rda_en = 0; rdb_en = 0; wr_sector = 0; rda_sector = 0; rdb_sector = 0; wr_be = 0; wr_data = '0;
    // fill every sector first
    for (int s = 0; s < N; s++) begin
      @(negedge clk); wr_en = 1; wr_sector = sec_t'(s); wr_be = '1;
      for (int w = 0; w < WLEN; w++) wr_data[w] = $urandom;
      model[s] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 2000; r++) begin
      block_t ea, eb;
      wr_en = $urandom_range(1); wr_sector = sec_t'($urandom_range(N-1)); wr_be = WLEN'($urandom);
      for (int w = 0; w < WLEN; w++) wr_data[w] = $urandom;
      rda_en = 1; rda_sector = sec_t'($urandom_range(N-1));
      rdb_en = 1; rdb_sector = sec_t'($urandom_range(N-1));
      ea = model[rda_sector]; eb = model[rdb_sector];   // read-before-write
      @(negedge clk);
      if (wr_en) for (int w = 0; w < WLEN; w++) if (wr_be[w]) model[wr_sector][w] = wr_data[w];
      check(rda_data == ea, "port A");
      check(rdb_data == eb, "port B");
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
