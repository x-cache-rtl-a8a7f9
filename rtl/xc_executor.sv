// xc_executor: one action-executor lane.
//
// A routine, once triggered, runs to completion without blocking: the lane
// fetches one microcode action per cycle from its PC, executes it, and moves
// on. Every action takes one cycle, except READ, whose data RAM result is
// written one cycle later. The lane owns an integer/logic ALU for the AGEN
// actions and a private copy of the walker's context (temporaries, state,
// meta-tag and sector pointers) and of the triggering message. Actions that
// touch a shared structure raise a request to the port scheduler and hold
// until granted (and, for ENQ and the END transition, until the queue has
// room). An allocM/allocD that cannot be satisfied (the set holds only busy
// entries, or no sector run is free and nothing can be evicted) does not
// hold the lane: the lane writes the context back as it stands, re-queues
// the triggering event with its message on the internal event queue and
// goes idle, so the walker re-runs the routine from its start later.
// Routines must therefore put allocations before any action that is not
// idempotent (allocD and allocM are no-ops once done). Holding the lane
// instead can deadlock: every lane waits on an entry owned by a walker that
// needs a lane to finish. A STATE action
// ends the routine: the new state is written to the walker's meta-tag entry
// and the context back to its X-register; a transition to END releases the
// X-register.
//
// Interface: dispatch (disp_valid with disp, accepted when idle), the
// microcode fetch (pc/act), the port requests and grants, the payload of each
// port, and the write-back to the X-registers. Operand fields: rd names
// R0..R7; rs1/rs2 name R0..R7 (0..7) or control registers C0..C7 (8..15).
// The action set follows the design's action table; the encodings, operand
// conventions and the exact semantics listed in the package are this
// design's choice.
module xc_executor
  import xcache_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              disp_valid,
  input  dispatch_t         disp,
  output logic              idle,
  // microcode fetch
  output upc_t              pc,
  input  action_t           act,
  input  word_t             ctrl [NCTRL],
  // port scheduling
  output logic [NPORTS-1:0] port_req,
  input  logic [NPORTS-1:0] port_gnt,
  // meta-tag port
  output mt_cmd_t           mt_cmd,
  output key_t              mt_key,
  input  logic              mt_alloc_ok,
  input  logic [SET_W-1:0]  mt_alloc_set,
  input  logic [WAY_W-1:0]  mt_alloc_way,
  input  logic              replay_ready,
  // sector allocator port
  output len_t              sa_len,
  output logic              sa_take,
  input  logic              sa_ok,
  input  sec_t              sa_start,
  output logic              sa_free_en,
  output sec_t              sa_free_start,
  output len_t              sa_free_len,
  // queues
  output dram_req_t         dram_req,
  input  logic              dramq_ready,
  output int_event_t        int_ev,
  input  logic              evq_ready,
  // data RAM
  output sec_t              dwr_sector,
  output logic [WLEN-1:0]   dwr_be,
  output block_t            dwr_data,
  output sec_t              drd_sector,
  input  block_t            drd_data,
  // write-back
  output logic              wb_en,
  output wid_t              wb_wid,
  output walker_ctx_t       wb_ctx,
  output logic              wb_release,
  // status
  output logic              stall_port,
  output logic              stall_alloc
);
  typedef enum logic [1:0] {L_IDLE, L_RUN, L_RDWAIT, L_YIELD} lane_state_e;

  lane_state_e ls_q;
  walker_ctx_t ctx_q;
  wid_t        wid_q;
  block_t      msg_q;
  logic        hit_q;
  event_t      ev_q;
  upc_t        pc_q;
  logic [2:0]  rd_wait_q;
  logic [1:0]  rd_word_q;

  assign idle = (ls_q == L_IDLE);
  assign pc   = pc_q;

  function automatic word_t src(walker_ctx_t c, word_t cr [NCTRL], logic [3:0] i);
    return i[3] ? cr[i[2:0]] : c.r[i[2:0]];
  endfunction

  word_t s1, s2;
  assign s1 = src(ctx_q, ctrl, act.rs1);
  assign s2 = src(ctx_q, ctrl, act.rs2);

  // ------------------------------------------------------- port requests
  logic need_port;
  logic [$clog2(NPORTS)-1:0] port_idx;
  logic res_ok;   // the shared resource can take the action this cycle

  always_comb begin
    need_port = 1'b0;
    port_idx  = '0;
    res_ok    = 1'b1;
    if (ls_q == L_RUN) begin
      unique case (act.op)
        OP_ALLOCM:   if (!ctx_q.has_meta) begin need_port = 1'b1; port_idx = P_META; res_ok = mt_alloc_ok; end
        OP_DEALLOCM,
        OP_UPDATE:   if (ctx_q.has_meta)  begin need_port = 1'b1; port_idx = P_META; end
        OP_STATE:    begin
                       need_port = 1'b1; port_idx = P_META;
                       res_ok = (state_t'(act.imm) != STATE_END) || replay_ready;
                     end
        OP_ALLOCD:   if (!ctx_q.has_data) begin need_port = 1'b1; port_idx = P_ALLOC; res_ok = sa_ok; end
        OP_DEALLOCD: if (ctx_q.has_data)  begin need_port = 1'b1; port_idx = P_ALLOC; end
        OP_ENQ:      begin
                       need_port = 1'b1;
                       port_idx  = act.imm[IMM_SEL] ? P_DRAMQ : P_EVQ;
                       res_ok    = act.imm[IMM_SEL] ? dramq_ready : evq_ready;
                     end
        OP_WRITE:    begin need_port = 1'b1; port_idx = P_DWR; end
        OP_READ:     begin need_port = 1'b1; port_idx = P_DRD; end
        default: ;
      endcase
    end else if (ls_q == L_YIELD) begin
      need_port = 1'b1;
      port_idx  = P_EVQ;
      res_ok    = evq_ready;
    end
  end

  always_comb begin
    port_req = '0;
    if (need_port) port_req[port_idx] = 1'b1;
  end

  wire granted = need_port && port_gnt[port_idx];
  wire advance = (ls_q == L_RUN) && (!need_port || (granted && res_ok));
  // A failed allocation abandons the routine: the walker goes back to
  // sleep and its triggering event is queued again (see header).
  wire alloc_fail = (ls_q == L_RUN) && granted && !res_ok &&
                    (act.op == OP_ALLOCM || act.op == OP_ALLOCD);
  wire yield_done = (ls_q == L_YIELD) && granted && res_ok;

  assign stall_port  = need_port && !granted;
  assign stall_alloc = alloc_fail;

  // ------------------------------------------------------------ payloads
  always_comb begin
    mt_cmd        = '0;
    mt_cmd.op     = MT_NONE;
    mt_cmd.key    = ctx_q.key;
    mt_cmd.set    = ctx_q.set;
    mt_cmd.way    = ctx_q.way;
    mt_cmd.state  = ctx_q.state;
    mt_cmd.dstart = ctx_q.dstart;
    mt_cmd.dlen   = ctx_q.dlen;
    if (granted && port_idx == P_META) begin
      unique case (act.op)
        OP_ALLOCM:   mt_cmd.op = MT_ALLOC;
        OP_DEALLOCM: mt_cmd.op = MT_DEALLOC;
        OP_UPDATE:   mt_cmd.op = MT_UPDATE;
        OP_STATE:    if (ctx_q.has_meta && res_ok) begin
                       mt_cmd.op    = MT_STATE;
                       mt_cmd.state = state_t'(act.imm);
                     end
        default: ;
      endcase
    end
  end

  assign mt_key        = ctx_q.key;
  assign sa_len        = (act.imm != '0) ? len_t'(act.imm) : len_t'(s1);
  assign sa_take       = granted && act.op == OP_ALLOCD;
  assign sa_free_en    = granted && act.op == OP_DEALLOCD;
  assign sa_free_start = ctx_q.dstart;
  assign sa_free_len   = ctx_q.dlen;

  assign dram_req.addr = s1;
  assign dram_req.wid  = wid_q;
  assign int_ev.wid    = wid_q;
  assign int_ev.ev     = (ls_q == L_YIELD) ? ev_q  : event_t'(act.imm);
  assign int_ev.hit    = (ls_q == L_YIELD) ? hit_q : 1'b0;
  assign int_ev.msg    = msg_q;

  assign dwr_sector = ctx_q.dstart + sec_t'(s1);
  assign drd_sector = ctx_q.dstart + sec_t'(s1);
  always_comb begin
    if (act.imm[IMM_SEL]) begin
      dwr_be   = '0;
      dwr_be[act.imm[1:0]] = 1'b1;
      for (int w = 0; w < WLEN; w++) dwr_data[w] = s2;
    end else begin
      dwr_be   = '1;
      dwr_data = msg_q;
    end
  end

  // ------------------------------------------------------------ execute
  walker_ctx_t ctx_n;
  block_t      msg_n;
  upc_t        pc_n;
  logic        done;

  always_comb begin
    ctx_n = ctx_q;
    msg_n = msg_q;
    pc_n  = pc_q + 1'b1;
    done  = 1'b0;
    unique case (act.op)
      OP_ADD:    ctx_n.r[act.rd] = s1 + s2;
      OP_AND:    ctx_n.r[act.rd] = s1 & s2;
      OP_OR:     ctx_n.r[act.rd] = s1 | s2;
      OP_XOR:    ctx_n.r[act.rd] = s1 ^ s2;
      OP_ADDI:   ctx_n.r[act.rd] = s1 + word_t'(signed'(act.imm));
      OP_INC:    ctx_n.r[act.rd] = ctx_q.r[act.rd] + 1'b1;
      OP_DEC:    ctx_n.r[act.rd] = ctx_q.r[act.rd] - 1'b1;
      OP_SHL:    ctx_n.r[act.rd] = s1 << act.imm[4:0];
      OP_SHR:    ctx_n.r[act.rd] = s1 >> s2[4:0];
      OP_SRA:    ctx_n.r[act.rd] = word_t'($signed(s1) >>> act.imm[4:0]);
      OP_SRL:    ctx_n.r[act.rd] = s1 >> act.imm[4:0];
      OP_NOT:    ctx_n.r[act.rd] = ~s1;
      OP_ALLOCR: ctx_n.r[act.rd] = word_t'(ctx_q.key);
      OP_DEQ:    msg_n = '0;
      OP_RDATA:  ctx_n.r[act.rd] = msg_q[s1[1:0]];
      OP_PEEK:   ctx_n.r[act.rd] = msg_q[act.imm[1:0]];
      OP_WDATA:  msg_n[act.imm[1:0]] = s1;
      OP_ALLOCM: if (!ctx_q.has_meta) begin
                   ctx_n.has_meta = 1'b1;
                   ctx_n.set      = mt_alloc_set;
                   ctx_n.way      = mt_alloc_way;
                 end
      OP_DEALLOCM: ctx_n.has_meta = 1'b0;
      OP_STATE:  begin ctx_n.state = state_t'(act.imm); done = 1'b1; end
      OP_BMISS:  if (!hit_q)   pc_n = upc_t'(act.imm);
      OP_BHIT:   if (hit_q)    pc_n = upc_t'(act.imm);
      OP_BEQ:    if (s1 == s2) pc_n = upc_t'(act.imm);
      OP_BNZ:    if (s1 != '0) pc_n = upc_t'(act.imm);
      OP_BLT:    if (s1 <  s2) pc_n = upc_t'(act.imm);
      OP_BGE:    if (s1 >= s2) pc_n = upc_t'(act.imm);
      OP_BLE:    if (s1 <= s2) pc_n = upc_t'(act.imm);
      OP_ALLOCD: if (!ctx_q.has_data) begin
                   ctx_n.has_data = 1'b1;
                   ctx_n.dstart   = sa_start;
                   ctx_n.dlen     = sa_len;
                 end
      OP_DEALLOCD: begin ctx_n.has_data = 1'b0; ctx_n.dlen = '0; end
      default: ;
    endcase
  end

  assign wb_en      = (advance && done) || yield_done;
  assign wb_wid     = wid_q;
  assign wb_ctx     = yield_done ? ctx_q : ctx_n;
  assign wb_release = !yield_done && (ctx_n.state == STATE_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ls_q <= L_IDLE;
    end else begin
      unique case (ls_q)
        L_IDLE: if (disp_valid) ls_q <= L_RUN;
        L_RUN:  if (advance) begin
                  if (done)                 ls_q <= L_IDLE;
                  else if (act.op == OP_READ) ls_q <= L_RDWAIT;
                end else if (alloc_fail) begin
                  ls_q <= L_YIELD;
                end
        L_YIELD: if (yield_done) ls_q <= L_IDLE;
        default: ls_q <= L_RUN;   // L_RDWAIT: data arrives this cycle
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case (ls_q)
      L_IDLE: if (disp_valid) begin
        ctx_q <= disp.ctx;
        wid_q <= disp.wid;
        msg_q <= disp.msg;
        hit_q <= disp.hit;
        ev_q  <= disp.ev;
        pc_q  <= disp.pc;
      end
      L_RUN: if (advance) begin
        ctx_q <= ctx_n;
        msg_q <= msg_n;
        pc_q  <= pc_n;
        rd_wait_q <= act.rd;
        rd_word_q <= act.imm[1:0];
      end
      L_RDWAIT: ctx_q.r[rd_wait_q] <= drd_data[rd_word_q];
      default: ;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) disp_valid |-> idle);
endmodule
