// xc_xreg: X-registers, the state of active walkers.
//
// Every walker in flight owns one of NACTIVE rows. A row holds the walker's
// meta key (its tag), its current state, its temporaries R0..R7, where its
// meta-tag entry and data sectors are, a running bit (a routine of this
// walker is executing on a lane) and the number of meta loads waiting for
// its element. Between routines the walker is dormant and this row is all
// that is left of it, so NACTIVE bounds the walkers, and with them the DRAM
// refills, in flight.
//
// The key compare over all valid rows is the active-meta check: a load for a
// key whose walker is already running joins that walker instead of starting a
// second one. Two combinational compare ports serve the front end. The front
// end allocates a row (lowest free one) when a walker starts, marks rows
// running on dispatch and adds waiting loads; each executor lane writes its
// walker's context back when a routine ends. A routine that ends in state
// END releases the row and, if loads are waiting, emits a replay request so
// they are answered from the now resident data. All updates take effect at
// the clock edge. X-registers and the active-meta tracking follow the design;
// the waiting-load count and the replay request are this design's choice.
module xc_xreg
  import xcache_pkg::*;
#(
  parameter int unsigned NACTIVE = 32,
  parameter int unsigned NWB     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // active-meta compare
  input  key_t              cam_key [2],
  output logic              cam_hit [2],
  output wid_t              cam_wid [2],
  // row state
  output logic              row_valid   [NACTIVE],
  output logic              row_running [NACTIVE],
  output logic [PEND_W-1:0] row_pend    [NACTIVE],
  output walker_ctx_t       row_ctx     [NACTIVE],
  output logic              free_ok,
  output wid_t              free_wid,
  output logic [$clog2(NACTIVE+1)-1:0] active_count,
  // front-end updates
  input  logic              alloc_en,
  input  wid_t              alloc_wid,
  input  walker_ctx_t       alloc_ctx,
  input  logic [PEND_W-1:0] alloc_pend,
  input  logic              run_en,
  input  wid_t              run_wid,
  input  logic              pend_en,
  input  wid_t              pend_wid,
  input  logic [PEND_W-1:0] pend_amt,
  // lane write-back
  input  logic              wb_en      [NWB],
  input  wid_t              wb_wid     [NWB],
  input  walker_ctx_t       wb_ctx     [NWB],
  input  logic              wb_release [NWB],
  // replay request for waiting loads
  output logic              replay_valid,
  output replay_t           replay
);
  logic              valid_q   [NACTIVE];
  logic              running_q [NACTIVE];
  logic [PEND_W-1:0] pend_q    [NACTIVE];
  walker_ctx_t       ctx_q     [NACTIVE];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      cam_hit[p] = 1'b0;
      cam_wid[p] = '0;
      for (int i = 0; i < NACTIVE; i++)
        if (valid_q[i] && ctx_q[i].key == cam_key[p] && !cam_hit[p]) begin
          cam_hit[p] = 1'b1;
          cam_wid[p] = wid_t'(i);
        end
    end
    free_ok  = 1'b0;
    free_wid = '0;
    active_count = '0;
    for (int i = NACTIVE - 1; i >= 0; i--)
      if (!valid_q[i]) begin
        free_ok  = 1'b1;
        free_wid = wid_t'(i);
      end
    for (int i = 0; i < NACTIVE; i++) active_count = active_count + valid_q[i];
    for (int i = 0; i < NACTIVE; i++) begin
      row_valid[i]   = valid_q[i];
      row_running[i] = running_q[i];
      row_pend[i]    = pend_q[i];
      row_ctx[i]     = ctx_q[i];
    end
  end

  // Replay request: at most one release per cycle (the lanes' releases share
  // the meta-tag port).
  always_comb begin
    replay_valid = 1'b0;
    replay       = '0;
    for (int l = 0; l < NWB; l++) begin
      if (wb_en[l] && wb_release[l]) begin
        replay.key = ctx_q[wb_wid[l]].key;
        replay.cnt = pend_q[wb_wid[l]] +
                     ((pend_en && pend_wid == wb_wid[l]) ? pend_amt : '0);
        replay_valid = (replay.cnt != '0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NACTIVE; i++) begin
        valid_q[i]   <= 1'b0;
        running_q[i] <= 1'b0;
        pend_q[i]    <= '0;
      end
    end else begin
      if (pend_en) pend_q[pend_wid] <= pend_q[pend_wid] + pend_amt;
      if (run_en)  running_q[run_wid] <= 1'b1;
      for (int l = 0; l < NWB; l++) begin
        if (wb_en[l]) begin
          running_q[wb_wid[l]] <= 1'b0;
          if (wb_release[l]) begin
            valid_q[wb_wid[l]] <= 1'b0;
            pend_q[wb_wid[l]]  <= '0;
          end
        end
      end
      if (alloc_en) begin
        valid_q[alloc_wid]   <= 1'b1;
        running_q[alloc_wid] <= 1'b1;
        pend_q[alloc_wid]    <= alloc_pend;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < NWB; l++)
      if (wb_en[l]) ctx_q[wb_wid[l]] <= wb_ctx[l];
    if (alloc_en) ctx_q[alloc_wid] <= alloc_ctx;
  end

  // A walker runs on at most one lane at a time.
  assert property (@(posedge clk) disable iff (!rst_n) !(run_en && running_q[run_wid]));
  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_en && valid_q[alloc_wid]));
endmodule
