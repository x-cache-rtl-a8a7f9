// xc_routine_table: the [state, event] -> routine pointer table.
//
// Rows are walker states, columns are events; each cell holds a valid bit
// and the microcode address where the routine for that transition starts
// (its logical PC). A cell without a routine is invalid, and a message that
// lands on it is dropped by the front end. The table is written by the host
// (it is the compiled transition list of the walker) and read
// combinationally by the front end, once per cycle. The two-dimensional
// organisation and the pointer contents follow the design; the sizes
// (NSTATES x NEVENTS) are set from the field widths, since the design sizes
// the table from the compiled walker.
module xc_routine_table
  import xcache_pkg::*;
#(
  parameter int unsigned NSTATES = 16,
  parameter int unsigned NEVENTS = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cfg_we,
  input  state_t cfg_state,
  input  event_t cfg_event,
  input  logic   cfg_valid,
  input  upc_t   cfg_pc,
  input  state_t rd_state,
  input  event_t rd_event,
  output logic   rd_valid,
  output upc_t   rd_pc
);
  logic valid_q [NSTATES][NEVENTS];
  upc_t pc_q    [NSTATES][NEVENTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++)
        for (int e = 0; e < NEVENTS; e++) valid_q[s][e] <= 1'b0;
    end else if (cfg_we && (int'(cfg_state) < NSTATES) && (int'(cfg_event) < NEVENTS)) begin
      valid_q[cfg_state][cfg_event] <= cfg_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && (int'(cfg_state) < NSTATES) && (int'(cfg_event) < NEVENTS))
      pc_q[cfg_state][cfg_event] <= cfg_pc;
  end

  always_comb begin
    rd_valid = 1'b0;
    rd_pc    = '0;
    if ((int'(rd_state) < NSTATES) && (int'(rd_event) < NEVENTS)) begin
      rd_valid = valid_q[rd_state][rd_event];
      rd_pc    = pc_q[rd_state][rd_event];
    end
  end
endmodule
