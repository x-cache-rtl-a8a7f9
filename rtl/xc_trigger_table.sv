// xc_trigger_table: maps incoming messages to protocol events.
//
// The head of every input queue is a message; the trigger table turns the
// message's source (meta load, preload, meta store or DRAM response) and the
// outcome of its meta-tag lookup (hit or miss) into the event that, paired
// with the walker's current state, selects a routine. The table is a small
// host-written RAM of 8 entries indexed by {source, hit}; internal events
// enqueued by routines carry their event number and bypass the table.
// Writes take effect at the clock edge; the two read ports are
// combinational. The table's purpose follows the design; its indexing and
// size are this design's choice.
module xc_trigger_table
  import xcache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cfg_we,
  input  logic [2:0] cfg_addr,   // {source, hit}
  input  event_t cfg_event,
  input  src_e   src_a,
  input  logic   hit_a,
  output event_t ev_a,
  input  src_e   src_b,
  input  logic   hit_b,
  output event_t ev_b
);
  event_t table_q [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) table_q[i] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_addr] <= cfg_event;
    end
  end

  assign ev_a = table_q[{src_a, hit_a}];
  assign ev_b = table_q[{src_b, hit_b}];
endmodule
