// tb_xc_executor: one lane running directed routines with random operands
// and random port grants. Checks the AGEN results written back, branches,
// the two-cycle READ, ENQ payloads, the END release, and that a failed
// allocation yields: the walker's event is re-queued and the lane frees
// itself without releasing the walker.
module tb_xc_executor;
  import xcache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic disp_valid, idle; dispatch_t disp; upc_t pc; action_t act; word_t ctrl [NCTRL];
  logic [NPORTS-1:0] port_req, port_gnt;
  mt_cmd_t mt_cmd; key_t mt_key; logic mt_alloc_ok, replay_ready; logic [SET_W-1:0] mt_alloc_set; logic [WAY_W-1:0] mt_alloc_way;
  len_t sa_len, sa_free_len; logic sa_take, sa_ok, sa_free_en; sec_t sa_start, sa_free_start;
  dram_req_t dram_req; logic dramq_ready; int_event_t int_ev; logic evq_ready;
  sec_t dwr_sector, drd_sector; logic [WLEN-1:0] dwr_be; block_t dwr_data, drd_data;
  logic wb_en, wb_release; wid_t wb_wid; walker_ctx_t wb_ctx; logic stall_port, stall_alloc;
  action_t ucode [64];
  block_t ram [16];
  int checks = 0, failures = 0, cycle = 0;
  // captured events
  bit got_wb; walker_ctx_t cap_ctx; bit cap_rel;
  dram_req_t dq [$]; int_event_t eq [$];
  xc_executor dut (.*);
  assign act = ucode[pc[5:0]];
  always_comb port_gnt = port_req & NPORTS'($urandom_range(0, 2) != 0 ? '1 : '0);
  always @(posedge clk) drd_data <= ram[drd_sector[3:0]];
  always @(posedge clk) begin
    if (wb_en) begin got_wb = 1; cap_ctx = wb_ctx; cap_rel = wb_release; end
    if (port_gnt[P_DRAMQ] && dramq_ready) dq.push_back(dram_req);
    if (port_gnt[P_EVQ] && evq_ready) eq.push_back(int_ev);
    if (++cycle > 50000) begin
      $display("FAIL: watchdog"); failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
  end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic run(walker_ctx_t c, upc_t start, event_t ev);
    @(negedge clk);
    while (!idle) @(negedge clk);
    got_wb = 0;
    disp = '0; disp.wid = 5; disp.ctx = c; disp.ev = ev; disp.pc = start; disp_valid = 1;
    @(negedge clk); disp_valid = 0;
    while (!got_wb) @(negedge clk);
    @(negedge clk);
  endtask
  initial begin
    walker_ctx_t c;
    disp_valid = 0; disp = '0; mt_alloc_ok = 1; mt_alloc_set = 3; mt_alloc_way = 1; replay_ready = 1;
    sa_ok = 1; sa_start = 9; dramq_ready = 1; evq_ready = 1;
    for (int i = 0; i < NCTRL; i++) ctrl[i] = 100 * i;
    for (int i = 0; i < 64; i++) ucode[i] = mk_act(OP_NOP);
    for (int s = 0; s < 16; s++) for (int w = 0; w < WLEN; w++) ram[s][w] = $urandom;
    // routine @0: AGEN and a branch
    ucode[0]  = mk_act(OP_ADD, 2, 0, 1);
    ucode[1]  = mk_act(OP_XOR, 3, 0, 1);
    ucode[2]  = mk_act(OP_ADDI, 4, 0, 0, 16'hfffd);
    ucode[3]  = mk_act(OP_SHL, 5, 0, 0, 3);
    ucode[4]  = mk_act(OP_SRA, 6, 1, 0, 2);
    ucode[5]  = mk_act(OP_BLT, 0, 0, 1, 8);
    ucode[6]  = mk_act(OP_ADD, 7, 9, 7);      // r7 = C1 + r7 (only when r0 >= r1)
    ucode[7]  = mk_act(OP_ENQ, 0, 2, 0, 16'h8000);
    ucode[8]  = mk_act(OP_STATE, 0, 0, 0, 6);
    // routine @16: READ then END
    ucode[16] = mk_act(OP_READ, 1, 7, 0, 2);
    ucode[17] = mk_act(OP_INC, 1);
    ucode[18] = mk_act(OP_STATE, 0, 0, 0, STATE_END);
    // routine @24: allocations
    ucode[24] = mk_act(OP_ALLOCD, 0, 0, 0, 2);
    ucode[25] = mk_act(OP_ALLOCM);
    ucode[26] = mk_act(OP_ENQ, 0, 0, 0, 7);
    ucode[27] = mk_act(OP_STATE, 0, 0, 0, 3);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      word_t a, b;
      c = '0; a = $urandom; b = $urandom; c.r[0] = a; c.r[1] = b; c.r[7] = 5; c.key = 42;
      dq.delete();
      run(c, 0, 1);
      check(cap_ctx.r[2] == a + b, "add");
      check(cap_ctx.r[3] == (a ^ b), "xor");
      check(cap_ctx.r[4] == a - 3, "addi");
      check(cap_ctx.r[5] == a << 3, "shl");
      check(cap_ctx.r[6] == word_t'($signed(b) >>> 2), "sra");
      check(cap_ctx.r[7] == ((a < b) ? 5 : 105), "branch");
      check(cap_ctx.state == 6 && !cap_rel, "state, no release");
      check(((a < b) ? 0 : 1) == dq.size(), "enq count");
      if (dq.size() == 1) check(dq[0].addr == a + b && dq[0].wid == 5, "dram request");
    end
    // READ: two-cycle data return, END releases
    for (int i = 0; i < 20; i++) begin
      c = '0; c.dstart = sec_t'($urandom_range(10)); c.r[7] = $urandom_range(5); c.has_data = 1;
      run(c, 16, 1);
      check(cap_ctx.r[1] == ram[c.dstart + c.r[7]][2] + 1, "read data");
      check(cap_rel, "END releases");
    end
    // failed allocD: yield with the event re-queued
    sa_ok = 0; eq.delete();
    c = '0; c.key = 77;
    run(c, 24, 9);
    check(!cap_rel && !cap_ctx.has_data, "yield keeps the walker");
    check(eq.size() == 1 && eq[0].ev == 9 && eq[0].wid == 5, "event re-queued");
    check(idle, "lane free after yield");
    // retry succeeds
    sa_ok = 1; eq.delete();
    run(cap_ctx, 24, 9);
    check(cap_ctx.has_data && cap_ctx.dstart == 9 && cap_ctx.dlen == 2, "allocD");
    check(cap_ctx.has_meta && cap_ctx.set == 3 && cap_ctx.way == 1, "allocM");
    check(eq.size() == 1 && eq[0].ev == 7, "internal event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
