// tb_xcache_sparch: X-Cache at its default size caching rows of a sparse
// matrix in CSR form, as a sparse-GEMM accelerator uses it (the key is a row
// number of B, the element is the row's non-zero values).
//
// The row walker: on a miss it fetches row_ptr[r] and row_ptr[r+1] in one
// DRAM read, computes the row length and its sector count and allocates that
// many sectors. It then copies the row sector by sector: each DRAM response
// is written to the next sector and the next read is issued, so the walker
// never has more than one read outstanding; after the last sector it
// installs the pointers and ends. An empty row is cached with no sectors and
// answered with a single zero sector. Rows are 0..32 values long, so an
// element takes 0..8 sectors (MAX_RUN).
//
// Checked: every load gets the row's sectors in order, the first len words
// matching the matrix, the last sector flagged. Required: hits, misses,
// merged loads, replays, multi-sector rows and empty rows.
module tb_xcache_sparch;
  import xcache_pkg::*;

  localparam int NROWS  = 200;
  localparam int RPBASE = 'h400;    // row_ptr array (bytes)
  localparam int VBASE  = 'h4000;   // values array (bytes)
  localparam int NLOADS = 600;
  localparam int S_DEF = 0, S_END = 1, S_META = 2, S_FILL = 3;
  localparam int E_MISS = 0, E_DRAM = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic meta_req_valid, meta_req_ready, meta_resp_valid, meta_resp_ready;
  meta_req_t meta_req; meta_resp_t meta_resp;
  logic dram_req_valid, dram_req_ready, dram_resp_valid, dram_resp_ready;
  dram_req_t dram_req; dram_resp_t dram_resp;
  logic cfg_we; cfg_target_e cfg_target; logic [15:0] cfg_addr; logic [63:0] cfg_wdata;
  logic [5:0] active;
  xc_stats_t stats;
  int n_dram;

  xcache dut (
    .clk, .rst_n,
    .meta_req_valid, .meta_req_ready, .meta_req,
    .meta_resp_valid, .meta_resp_ready, .meta_resp,
    .dram_req_valid, .dram_req_ready, .dram_req,
    .dram_resp_valid, .dram_resp_ready, .dram_resp,
    .cfg_we, .cfg_target, .cfg_addr, .cfg_wdata,
    .active_walkers(active), .stats);

  xc_dram_model #(.LATENCY(16), .WORDS(65536)) u_dram (
    .clk, .rst_n,
    .req_valid(dram_req_valid), .req_ready(dram_req_ready), .req(dram_req),
    .resp_valid(dram_resp_valid), .resp_ready(dram_resp_ready), .resp(dram_resp),
    .n_requests(n_dram));

  int checks = 0, failures = 0, cycle = 0;
  int row_ptr [NROWS + 1];
  int outstanding [int];
  int n_out = 0, n_rows_done = 0, n_multi = 0, n_empty = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cfg(cfg_target_e t, int a, longint d);
    @(negedge clk);
    cfg_we = 1; cfg_target = t; cfg_addr = 16'(a); cfg_wdata = 64'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask
  task automatic ucode(int a, action_t act); cfg(CFG_UCODE, a, longint'(act)); endtask
  task automatic route(int s, int e, int pc); cfg(CFG_RTABLE, (s << 4) | e, (1 << 8) | pc); endtask

  task automatic program_walker();
    cfg(CFG_TRIGGER, {SRC_LOAD, 1'b0}, E_MISS);
    cfg(CFG_TRIGGER, {SRC_DRAM, 1'b0}, E_DRAM);
    cfg(CFG_CTRL, 0, RPBASE);
    cfg(CFG_CTRL, 1, VBASE);
    // MISS: claim a tag, fetch row_ptr[r], row_ptr[r+1].
    ucode(0,  mk_act(OP_ALLOCM));
    ucode(1,  mk_act(OP_ALLOCR, 0));
    ucode(2,  mk_act(OP_SHL, 1, 0, 0, 2));
    ucode(3,  mk_act(OP_ADD, 1, 1, 8));
    ucode(4,  mk_act(OP_ENQ, 0, 1, 0, 'h8000));
    ucode(5,  mk_act(OP_STATE, 0, 0, 0, S_META));
    // META: len = end - start, sectors = (len + 3) / 4; fetch sector 0.
    ucode(8,  mk_act(OP_PEEK, 2, 0, 0, 0));
    ucode(9,  mk_act(OP_PEEK, 3, 0, 0, 1));
    ucode(10, mk_act(OP_NOT, 4, 2));
    ucode(11, mk_act(OP_ADD, 4, 4, 3));
    ucode(12, mk_act(OP_INC, 4));
    ucode(13, mk_act(OP_ADDI, 5, 4, 0, 3));
    ucode(14, mk_act(OP_SRL, 5, 5, 0, 2));
    ucode(15, mk_act(OP_BEQ, 0, 5, 7, 26));
    ucode(16, mk_act(OP_ALLOCD, 0, 5, 0, 0));
    ucode(17, mk_act(OP_SHL, 1, 2, 0, 2));
    ucode(18, mk_act(OP_ADD, 1, 1, 9));
    ucode(19, mk_act(OP_AND, 6, 7, 7));
    ucode(20, mk_act(OP_ENQ, 0, 1, 0, 'h8000));
    ucode(21, mk_act(OP_STATE, 0, 0, 0, S_FILL));
    ucode(26, mk_act(OP_UPDATE));
    ucode(27, mk_act(OP_STATE, 0, 0, 0, S_END));
    // FILL: copy the block into sector r6; fetch the next or finish.
    ucode(30, mk_act(OP_WRITE, 0, 6, 0, 0));
    ucode(31, mk_act(OP_INC, 6));
    ucode(32, mk_act(OP_BEQ, 0, 6, 5, 37));
    ucode(33, mk_act(OP_ADDI, 1, 1, 0, 16));
    ucode(34, mk_act(OP_ENQ, 0, 1, 0, 'h8000));
    ucode(35, mk_act(OP_STATE, 0, 0, 0, S_FILL));
    ucode(37, mk_act(OP_UPDATE));
    ucode(38, mk_act(OP_STATE, 0, 0, 0, S_END));
    route(S_DEF,  E_MISS, 0);
    route(S_META, E_DRAM, 8);
    route(S_FILL, E_DRAM, 30);
  endtask

  task automatic build_matrix();
    row_ptr[0] = 0;
    for (int r = 0; r < NROWS; r++) begin
      int len, pick;
      pick = $urandom_range(9);
      case (pick)
        0:       len = 0;
        1, 2:    len = $urandom_range(9, 32);
        default: len = $urandom_range(1, 8);
      endcase
      row_ptr[r + 1] = row_ptr[r] + len;
    end
    for (int r = 0; r <= NROWS; r++) u_dram.mem[RPBASE/4 + r] = row_ptr[r];
    for (int i = 0; i < row_ptr[NROWS] + 4; i++) u_dram.mem[VBASE/4 + i] = 32'h1000_0000 + i * 7;
  endtask

  // Responses: the sectors of one load arrive back to back.
  int cur_key = -1, beat = 0;
  always @(posedge clk) if (rst_n && meta_resp_valid && meta_resp_ready) begin
    int k, st, len, nsec;
    k = int'(meta_resp.key);
    if (cur_key < 0) begin
      cur_key = k; beat = 0;
      check(k < NROWS && outstanding.exists(k) && outstanding[k] > 0, $sformatf("unexpected row %0d", k));
    end
    check(k == cur_key, "sectors of two loads interleaved");
    if (k < NROWS) begin
      st = row_ptr[k]; len = row_ptr[k + 1] - st; nsec = (len + 3) / 4;
      for (int w = 0; w < WLEN; w++)
        if (beat * 4 + w < len)
          check(int'(meta_resp.data[w]) == 32'h1000_0000 + (st + beat * 4 + w) * 7,
                $sformatf("row %0d sector %0d word %0d", k, beat, w));
      check(meta_resp.last == (beat == ((nsec == 0) ? 0 : nsec - 1)), $sformatf("row %0d last flag at %0d", k, beat));
    end
    beat++;
    if (meta_resp.last) begin
      if (outstanding.exists(k)) outstanding[k]--;
      if (k < NROWS && row_ptr[k + 1] - row_ptr[k] > 4) n_multi++;
      if (k < NROWS && row_ptr[k + 1] == row_ptr[k]) n_empty++;
      n_rows_done++;
      cur_key = -1;
    end
  end

  // the datapath is not always ready for a response
  bit drain = 0;
  always @(negedge clk) meta_resp_ready <= drain || ($urandom_range(4) != 0);

  task automatic send(int k);
    meta_req.kind = REQ_LOAD; meta_req.key = key_t'(k); meta_req.data = '0;
    meta_req_valid = 1;
    @(posedge clk);
    while (!meta_req_ready) @(posedge clk);
    @(negedge clk);
    meta_req_valid = 0;
    if (!outstanding.exists(k)) outstanding[k] = 0;
    outstanding[k]++;
    n_out++;
  endtask

  always @(posedge clk) begin
    cycle++;
    if (cycle > 300000) begin
      failures++;
      $display("FAIL: watchdog answered=%0d of %0d", n_rows_done, n_out);
      $display("state: active=%0d hits=%0d misses=%0d routines=%0d alloc_stalls=%0d dropped=%0d dram=%0d",
        active, stats.hits, stats.misses, stats.routines, stats.alloc_stalls, stats.dropped, n_dram);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    meta_req_valid = 0; meta_req = '0;
    cfg_we = 0; cfg_target = CFG_CTRL; cfg_addr = 0; cfg_wdata = 0;
    build_matrix();
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_walker();
    // rows drawn from a window that slides over the matrix: reuse and misses
    for (int i = 0; i < NLOADS; i++) begin
      send((i / 4 + $urandom_range(15)) % NROWS);
      repeat ($urandom_range(3)) @(negedge clk);
    end
    drain = 1;
    begin
      int idle = 0;
      while (idle < 60) begin @(negedge clk); if (active == 0 && !meta_resp_valid) idle++; else idle = 0; end
    end
    check(n_rows_done == n_out, $sformatf("answered %0d of %0d loads", n_rows_done, n_out));
    $display("hits=%0d misses=%0d merged=%0d replays=%0d multi_sector=%0d empty=%0d dram=%0d port_stalls=%0d",
             stats.hits, stats.misses, stats.merged, stats.replays, n_multi, n_empty, n_dram, stats.port_stalls);
    check(stats.hits > 0,    "no hit");
    check(stats.misses > 0,  "no miss");
    check(stats.merged > 0,  "no merged load");
    check(stats.replays > 0, "no replay");
    check(n_multi > 0,       "no multi-sector row");
    check(n_empty > 0,       "no empty row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
