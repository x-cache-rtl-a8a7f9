// xc_meta_tag: the meta-tag array.
//
// Entries are tagged with the accelerator's own metadata key rather than an
// address, so a meta load is checked without any address translation. The
// array is SETS x WAYS set-associative; the set is the low bits of the key
// and the full key is stored and compared. Each entry also holds the state
// of the walker that owns it (the current state of an entry is kept beside
// its tag) and explicit pointers to its data: first sector and sector count.
// An entry answers loads (a hit) only in state END; in any other state a
// walker is still filling it.
//
// Two combinational lookup ports serve the front end. One update port,
// written at the clock edge, serves the walkers' meta-tag actions: ALLOC
// (allocM: pick a way in the set of alloc_key, invalid ways first, otherwise the least recently used
// resident entry; entries with a walker in flight are never chosen; the
// evicted entry's sectors are reported for freeing), DEALLOC (deallocM),
// UPDATE (write the data pointers) and STATE. Replacement ranks live in
// xc_lru; an ALLOC touches its way, otherwise the front end's hit touch is
// applied. Meta-tags, per-entry state, sector pointers and LRU follow the
// design; the set-index function and the rule that busy entries are not
// evicted are this design's choice.
module xc_meta_tag
  import xcache_pkg::*;
#(
  parameter int unsigned SETS = 512,
  parameter int unsigned WAYS = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup ports
  input  key_t             lk_key   [2],
  output logic             lk_hit   [2],   // resident (state END)
  output logic             lk_match [2],   // any valid entry with this key
  output logic [SET_W-1:0] lk_set   [2],
  output logic [WAY_W-1:0] lk_way   [2],
  output meta_entry_t      lk_entry [2],
  // LRU touch from the front end on a hit
  input  logic             touch_en,
  input  logic [SET_W-1:0] touch_set,
  input  logic [WAY_W-1:0] touch_way,
  // update port
  input  mt_cmd_t          cmd,
  input  key_t             alloc_key,   // key a pending ALLOC would place
  output logic             alloc_ok,
  output logic [SET_W-1:0] alloc_set,
  output logic [WAY_W-1:0] alloc_way,
  output logic             evict_en,    // a resident entry is replaced (when cmd is taken)
  output sec_t             evict_start,
  output len_t             evict_len
);
  localparam int unsigned SW = $clog2(SETS);

  logic [SETS-1:0][WAYS-1:0] valid_q;
  meta_entry_t ent_q   [SETS][WAYS];

  function automatic logic [SET_W-1:0] set_of(key_t k);
    return SET_W'(k[SW-1:0]);
  endfunction

  // ---------------------------------------------------------------- lookup
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [SW-1:0] s;
      s = lk_key[p][SW-1:0];
      lk_hit[p]   = 1'b0;
      lk_match[p] = 1'b0;
      lk_set[p]   = set_of(lk_key[p]);
      lk_way[p]   = '0;
      lk_entry[p] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[s][w] && ent_q[s][w].key == lk_key[p] && !lk_match[p]) begin
          lk_match[p] = 1'b1;
          lk_hit[p]   = (ent_q[s][w].state == STATE_END);
          lk_way[p]   = WAY_W'(w);
          lk_entry[p] = ent_q[s][w];
          lk_entry[p].valid = 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------ victim selection
  logic [WAYS-1:0][WAY_W-1:0] rank;
  logic [SW-1:0] cs;
  assign cs        = alloc_key[SW-1:0];
  assign alloc_set = set_of(alloc_key);

  xc_lru #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk       (clk),
    .rst_n     (rst_n),
    .touch_en  ((cmd.op == MT_ALLOC && alloc_ok) || touch_en),
    .touch_set ((cmd.op == MT_ALLOC && alloc_ok) ? alloc_set : touch_set),
    .touch_way ((cmd.op == MT_ALLOC && alloc_ok) ? alloc_way : touch_way),
    .rd_set    (alloc_set),
    .rd_rank   (rank)
  );

  logic evict_any;

  always_comb begin
    logic found_inv;
    logic [WAY_W-1:0] best_rank;
    found_inv = 1'b0;
    alloc_ok  = 1'b0;
    alloc_way = '0;
    best_rank = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!valid_q[cs][w] && !found_inv) begin
        found_inv = 1'b1;
        alloc_ok  = 1'b1;
        alloc_way = WAY_W'(w);
      end
    end
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++) begin
        if (ent_q[cs][w].state == STATE_END && (!alloc_ok || rank[w] > best_rank)) begin
          alloc_ok  = 1'b1;
          alloc_way = WAY_W'(w);
          best_rank = rank[w];
        end
      end
    end
    evict_any   = alloc_ok && !found_inv;
  end

  assign evict_en    = evict_any && (cmd.op == MT_ALLOC);
  assign evict_start = ent_q[cs][alloc_way].dstart;
  assign evict_len   = ent_q[cs][alloc_way].dlen;

  // ---------------------------------------------------------------- update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      case (cmd.op)
        MT_ALLOC:   if (alloc_ok) valid_q[cs][alloc_way] <= 1'b1;
        MT_DEALLOC: valid_q[cmd.set[SW-1:0]][cmd.way] <= 1'b0;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    case (cmd.op)
      MT_ALLOC: if (alloc_ok) begin
        ent_q[cs][alloc_way].key    <= alloc_key;
        ent_q[cs][alloc_way].state  <= cmd.state;
        ent_q[cs][alloc_way].dstart <= '0;
        ent_q[cs][alloc_way].dlen   <= '0;
      end
      MT_UPDATE: begin
        ent_q[cmd.set[SW-1:0]][cmd.way].dstart <= cmd.dstart;
        ent_q[cmd.set[SW-1:0]][cmd.way].dlen   <= cmd.dlen;
      end
      MT_STATE: ent_q[cmd.set[SW-1:0]][cmd.way].state <= cmd.state;
      default: ;
    endcase
  end
endmodule
