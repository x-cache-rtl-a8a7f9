// xc_ucode_ram: routine microcode RAM.
//
// Holds the compiled routines: each routine is a run of actions that ends
// with a STATE action. The host writes one action per cycle through the
// configuration port; each executor lane has its own read port and fetches
// the action at its PC combinationally, so a lane issues one action per
// cycle. Reads of addresses beyond DEPTH return a NOP. The per-lane read
// ports and DEPTH (256) are this design's choice; the design sizes the RAM
// from the compiled routines.
module xc_ucode_ram
  import xcache_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned NRD   = 4
) (
  input  logic    clk,
  input  logic    cfg_we,
  input  upc_t    cfg_addr,
  input  action_t cfg_action,
  input  upc_t    rd_pc  [NRD],
  output action_t rd_act [NRD]
);
  action_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cfg_we && (int'(cfg_addr) < DEPTH)) mem[cfg_addr] <= cfg_action;
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) begin
      rd_act[i] = mk_act(OP_NOP);
      if (int'(rd_pc[i]) < DEPTH) rd_act[i] = mem[rd_pc[i]];
    end
  end
endmodule
