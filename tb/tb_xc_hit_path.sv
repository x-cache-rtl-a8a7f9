// tb_xc_hit_path: random hit jobs of 0..5 sectors over a behavioural data
// RAM read port, with random back-pressure on the output. Checks every
// sector's data, order and last flag, and that an isolated one-sector job
// arriving at clock edge t is answered at edge t+2 (the block's share of the
// 3-cycle load-to-use latency; the cache's request queue adds the third).
module tb_xc_hit_path;
  import xcache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic job_valid, job_ready, rd_en, resp_valid, resp_ready;
  hit_job_t job; sec_t rd_sector; block_t rd_data; meta_resp_t resp;
  block_t ram [64];
  meta_resp_t expq [$];
  int checks = 0, failures = 0, cycle = 0;
  int t_job = 0, lat = -1;
  bit probe = 0;
  xc_hit_path dut (.*);
  always @(posedge clk) if (rd_en) rd_data <= ram[rd_sector];
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge clk) begin
    if (++cycle > 50000) begin
      $display("FAIL: watchdog"); failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
    if (rst_n && job_valid && job_ready) t_job = cycle;
    if (rst_n && resp_valid && resp_ready) begin
      if (probe && lat < 0) lat = cycle - t_job;
      check(expq.size() > 0, "response without job");
      if (expq.size() > 0) begin
        check(resp == expq[0], $sformatf("response key %0d", resp.key));
        void'(expq.pop_front());
      end
    end
  end
  task automatic push(hit_job_t j);
    job = j; job_valid = 1;
    @(posedge clk); while (!job_ready) @(posedge clk);
    @(negedge clk); job_valid = 0;
    if (j.len == 0) expq.push_back('{key: j.key, data: '0, last: 1'b1});
    for (int i = 0; i < j.len; i++) expq.push_back('{key: j.key, data: ram[j.start + i], last: (i == j.len - 1)});
  endtask
  initial begin
    job_valid = 0; job = '0; resp_ready = 1;
    for (int s = 0; s < 64; s++) for (int w = 0; w < WLEN; w++) ram[s][w] = $urandom;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    probe = 1;
    push('{key: 77, start: 5, len: 1});
    repeat (6) @(negedge clk);
    check(lat == 2, $sformatf("job-to-data latency %0d, expected 2", lat));
    probe = 0;
    fork
      for (int i = 0; i < 400; i++) begin
        hit_job_t j;
        j.key = key_t'(i); j.len = len_t'($urandom_range(5)); j.start = sec_t'($urandom_range(58));
        push(j);
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int i = 0; i < 3000; i++) begin @(negedge clk); resp_ready = ($urandom_range(3) != 0); end
    join
    resp_ready = 1;
    repeat (40) @(negedge clk);
    check(expq.size() == 0, "all sectors delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
