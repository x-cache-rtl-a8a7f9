// xc_frontend: the event loop (trigger and decode stages).
//
// Each cycle the front end looks at the heads of four message queues --
// replays of completed walkers, DRAM responses, internal events enqueued by
// routines and meta requests from the datapath -- and takes at most one
// message, the first in that order that can make progress this cycle:
//
//  * A meta load whose key hits a resident meta-tag entry goes straight to
//    the hit path (no routine runs); the entry is touched for LRU.
//  * A meta load whose key already has an active walker (the active-meta
//    check over the X-registers) joins it: the walker's waiting-load count
//    grows and the load is answered by the walker's replay.
//  * A meta load or preload that misses starts a walker: an X-register is
//    allocated (state DEFAULT) and the routine for [DEFAULT, event] is
//    dispatched. A meta store always starts a walker, on the resident entry
//    if there is one, so its routine can merge the payload.
//  * An internal event or a DRAM response wakes the dormant walker it names:
//    [walker state, event] selects the routine.
//
// The event comes from the trigger table, the routine's start address from
// the routine table, and the routine is dispatched to the lowest idle lane.
// A walker is never dispatched while one of its routines is still running,
// so routines of one walker never overlap; a message whose [state, event]
// has no routine is dropped and counted. The queue order, the replay queue
// and the waiting-load count are this design's choices; waking one walker
// per cycle and the [state, event] indexing follow the design.
module xc_frontend
  import xcache_pkg::*;
#(
  parameter int unsigned NEXE    = 4,
  parameter int unsigned NACTIVE = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // queue heads
  input  logic              rp_valid,
  input  replay_t           rp,
  output logic              rp_pop,
  input  logic              ie_valid,
  input  int_event_t        ie,
  output logic              ie_pop,
  input  logic              dr_valid,
  input  dram_resp_t        dr,
  output logic              dr_pop,
  input  logic              mr_valid,
  input  meta_req_t         mr,
  output logic              mr_pop,
  // meta-tag lookups: port 0 replay, port 1 meta request
  output key_t              lk_key   [2],
  input  logic              lk_hit   [2],
  input  logic              lk_match [2],
  input  logic [SET_W-1:0]  lk_set   [2],
  input  logic [WAY_W-1:0]  lk_way   [2],
  input  meta_entry_t       lk_entry [2],
  output logic              touch_en,
  output logic [SET_W-1:0]  touch_set,
  output logic [WAY_W-1:0]  touch_way,
  // X-registers
  input  logic              cam_hit [2],
  input  wid_t              cam_wid [2],
  input  logic              row_valid   [NACTIVE],
  input  logic              row_running [NACTIVE],
  input  logic [PEND_W-1:0] row_pend    [NACTIVE],
  input  walker_ctx_t       row_ctx     [NACTIVE],
  input  logic              free_ok,
  input  wid_t              free_wid,
  output logic              alloc_en,
  output wid_t              alloc_wid,
  output walker_ctx_t       alloc_ctx,
  output logic [PEND_W-1:0] alloc_pend,
  output logic              run_en,
  output wid_t              run_wid,
  output logic              pend_en,
  output wid_t              pend_wid,
  output logic [PEND_W-1:0] pend_amt,
  // trigger and routine tables
  output src_e              trig_src_a,
  output logic              trig_hit_a,
  input  event_t            trig_ev_a,
  output src_e              trig_src_b,
  output logic              trig_hit_b,
  input  event_t            trig_ev_b,
  output state_t            rt_state,
  output event_t            rt_event,
  input  logic              rt_valid,
  input  upc_t              rt_pc,
  // hit path
  output logic              job_valid,
  input  logic              job_ready,
  output hit_job_t          job,
  // lanes
  input  logic [NEXE-1:0]   lane_idle,
  output logic [NEXE-1:0]   disp_valid,
  output dispatch_t         disp,
  // statistics pulses
  output logic              st_hit,
  output logic              st_miss,
  output logic              st_merged,
  output logic              st_replay,
  output logic              st_xreg_full,
  output logic              st_dropped
);
  localparam logic [PEND_W-1:0] PEND_MAX = '1;

  typedef enum logic [2:0] {
    S_NONE, S_RP, S_IE, S_DR, S_MR
  } sel_e;

  logic [PEND_W-1:0] rp_served_q;

  assign lk_key[0] = rp.key;
  assign lk_key[1] = mr.key;

  // lowest idle lane
  logic any_idle;
  logic [$clog2(NEXE+1)-1:0] lane_sel;
  always_comb begin
    any_idle = 1'b0;
    lane_sel = '0;
    for (int i = NEXE - 1; i >= 0; i--)
      if (lane_idle[i]) begin
        any_idle = 1'b1;
        lane_sel = ($clog2(NEXE+1))'(i);
      end
  end

  // ----------------------------------------------- what each source needs
  // Replay: answer from the hit path, join an active walker, or re-walk.
  logic rp_go, rp_is_hit, rp_is_join, rp_is_walk;
  logic [PEND_W-1:0] rp_left;
  always_comb begin
    rp_left    = rp.cnt - rp_served_q;
    rp_is_hit  = lk_hit[0];
    rp_is_join = !lk_hit[0] && cam_hit[0];
    rp_is_walk = !lk_hit[0] && !cam_hit[0];
    rp_go = rp_valid && (
              (rp_is_hit  && job_ready) ||
              (rp_is_join && ({1'b0, row_pend[cam_wid[0]]} + {1'b0, rp_left} <= {1'b0, PEND_MAX})) ||
              (rp_is_walk && free_ok && any_idle));
  end

  logic ie_go, dr_go;
  assign ie_go = ie_valid && (!row_valid[ie.wid] || (!row_running[ie.wid] && any_idle));
  assign dr_go = dr_valid && (!row_valid[dr.wid] || (!row_running[dr.wid] && any_idle));

  // Meta request.
  logic mr_go, mr_is_hit, mr_is_join, mr_is_walk, mr_is_drop;
  always_comb begin
    mr_is_hit  = 1'b0;
    mr_is_join = 1'b0;
    mr_is_walk = 1'b0;
    mr_is_drop = 1'b0;
    mr_go      = 1'b0;
    unique case (mr.kind)
      REQ_LOAD: begin
        mr_is_hit  = lk_hit[1];
        mr_is_join = !lk_hit[1] && cam_hit[1];
        mr_is_walk = !lk_hit[1] && !cam_hit[1];
        mr_go = (mr_is_hit && job_ready) ||
                (mr_is_join && row_pend[cam_wid[1]] != PEND_MAX) ||
                (mr_is_walk && free_ok && any_idle);
      end
      REQ_PRELOAD: begin
        mr_is_drop = lk_hit[1] || cam_hit[1];
        mr_is_walk = !mr_is_drop;
        mr_go = mr_is_drop || (free_ok && any_idle);
      end
      REQ_STORE: begin
        mr_is_walk = !cam_hit[1];
        mr_go = mr_is_walk && free_ok && any_idle;
      end
      default: mr_is_drop = 1'b1;
    endcase
    mr_go = mr_valid && (mr_go || mr_is_drop);
  end

  sel_e sel;
  always_comb begin
    if      (rp_go) sel = S_RP;
    else if (dr_go) sel = S_DR;
    else if (ie_go) sel = S_IE;
    else if (mr_go) sel = S_MR;
    else            sel = S_NONE;
  end

  // ---------------------------------------------------- build the dispatch
  logic new_walker, old_walker;
  wid_t old_wid;
  walker_ctx_t new_ctx;
  logic [PEND_W-1:0] new_pend;
  logic dhit;
  block_t dmsg;
  event_t dev;

  always_comb begin
    trig_src_a = SRC_LOAD;
    trig_hit_a = 1'b0;
    trig_src_b = SRC_DRAM;
    trig_hit_b = 1'b0;
    new_walker = 1'b0;
    old_walker = 1'b0;
    old_wid    = '0;
    new_pend   = '0;
    dhit       = 1'b0;
    dmsg       = '0;
    dev        = '0;
    new_ctx    = '0;
    new_ctx.state = STATE_DEFAULT;
    unique case (sel)
      S_RP: if (rp_is_walk) begin
        new_walker  = 1'b1;
        new_ctx.key = rp.key;
        new_pend    = rp_left;
        dev         = trig_ev_a;
      end
      S_IE: if (row_valid[ie.wid]) begin
        old_walker = 1'b1;
        old_wid    = ie.wid;
        dev        = ie.ev;
        dhit       = ie.hit;
        dmsg       = ie.msg;
      end
      S_DR: if (row_valid[dr.wid]) begin
        old_walker = 1'b1;
        old_wid    = dr.wid;
        dev        = trig_ev_b;
        dmsg       = dr.data;
      end
      S_MR: if (mr_is_walk) begin
        new_walker  = 1'b1;
        trig_src_a  = src_e'(mr.kind);
        trig_hit_a  = lk_hit[1];
        dev         = trig_ev_a;
        dhit        = lk_hit[1];
        dmsg        = mr.data;
        new_ctx.key = mr.key;
        new_pend    = (mr.kind == REQ_LOAD) ? PEND_W'(1) : '0;
        if (mr.kind == REQ_STORE && lk_match[1]) begin
          new_ctx.state    = lk_entry[1].state;
          new_ctx.has_meta = 1'b1;
          new_ctx.set      = lk_set[1];
          new_ctx.way      = lk_way[1];
          new_ctx.has_data = (lk_entry[1].dlen != '0);
          new_ctx.dstart   = lk_entry[1].dstart;
          new_ctx.dlen     = lk_entry[1].dlen;
        end
      end
      default: ;
    endcase
    rt_state = old_walker ? row_ctx[old_wid].state : new_ctx.state;
    rt_event = dev;
  end

  wire dispatch_ok = (new_walker || old_walker) && rt_valid;

  always_comb begin
    disp       = '0;
    disp.wid   = new_walker ? free_wid : old_wid;
    disp.ctx   = new_walker ? new_ctx  : row_ctx[old_wid];
    disp.ev    = dev;
    disp.hit   = dhit;
    disp.msg   = dmsg;
    disp.pc    = rt_pc;
    disp_valid = '0;
    if (dispatch_ok) disp_valid[lane_sel] = 1'b1;
  end

  assign alloc_en   = dispatch_ok && new_walker;
  assign alloc_wid  = free_wid;
  assign alloc_ctx  = new_ctx;
  assign alloc_pend = new_pend;
  assign run_en     = dispatch_ok && old_walker;
  assign run_wid    = old_wid;

  // ------------------------------------------------------ pops and joins
  wire rp_hit_now = (sel == S_RP) && rp_is_hit;
  wire rp_last    = (rp_served_q + 1'b1 == rp.cnt);

  always_comb begin
    rp_pop = (sel == S_RP) && (rp_is_hit ? rp_last : 1'b1);
    ie_pop = (sel == S_IE);
    dr_pop = (sel == S_DR);
    mr_pop = (sel == S_MR);

    pend_en  = 1'b0;
    pend_wid = '0;
    pend_amt = '0;
    if (sel == S_RP && rp_is_join) begin
      pend_en = 1'b1; pend_wid = cam_wid[0]; pend_amt = rp_left;
    end else if (sel == S_MR && mr.kind == REQ_LOAD && mr_is_join) begin
      pend_en = 1'b1; pend_wid = cam_wid[1]; pend_amt = PEND_W'(1);
    end

    job_valid = 1'b0;
    job       = '0;
    touch_en  = 1'b0;
    touch_set = '0;
    touch_way = '0;
    if (rp_hit_now) begin
      job_valid = 1'b1;
      job       = '{key: rp.key, start: lk_entry[0].dstart, len: lk_entry[0].dlen};
      touch_en  = 1'b1; touch_set = lk_set[0]; touch_way = lk_way[0];
    end else if (sel == S_MR && mr.kind == REQ_LOAD && mr_is_hit) begin
      job_valid = 1'b1;
      job       = '{key: mr.key, start: lk_entry[1].dstart, len: lk_entry[1].dlen};
      touch_en  = 1'b1; touch_set = lk_set[1]; touch_way = lk_way[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           rp_served_q <= '0;
    else if (rp_hit_now)  rp_served_q <= rp_last ? '0 : rp_served_q + 1'b1;
    else if (rp_pop)      rp_served_q <= '0;
  end

  // ---------------------------------------------------------- statistics
  assign st_hit       = (sel == S_MR) && mr.kind == REQ_LOAD && mr_is_hit;
  assign st_miss      = alloc_en;
  assign st_merged    = (sel == S_MR) && mr.kind == REQ_LOAD && mr_is_join;
  assign st_replay    = rp_hit_now;
  assign st_xreg_full = (mr_valid && mr_is_walk && !free_ok && sel == S_NONE);
  assign st_dropped   = (sel != S_NONE) && !dispatch_ok && (new_walker || old_walker ||
                        (sel == S_IE) || (sel == S_DR));

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(disp_valid));
  assert property (@(posedge clk) disable iff (!rst_n) (disp_valid != '0) |-> ((disp_valid & ~lane_idle) == '0));
endmodule
