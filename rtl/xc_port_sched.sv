// xc_port_sched: port scheduler for the executor lanes.
//
// Several lanes may issue actions that need the same shared structure in the
// same cycle (the meta-tag update port, the sector allocator, the DRAM or
// internal event queue, the data RAM write or read port). For each of the
// NPORTS ports this block grants at most one requesting lane per cycle,
// round-robin: after a grant the granted lane gets the lowest priority on
// that port. A lane that is not granted holds its action and retries, so
// port conflicts become stalls rather than hazards. Grants are combinational
// from the requests. The design names a port scheduler; the round-robin
// policy is this design's choice.
module xc_port_sched #(
  parameter int unsigned NREQ   = 4,
  parameter int unsigned NPORTS = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NREQ-1:0] req   [NPORTS],
  output logic [NREQ-1:0] grant [NPORTS]
);
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;
  logic [IW-1:0] prio [NPORTS];   // lane with the highest priority

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      grant[p] = '0;
      for (int k = 0; k < NREQ; k++) begin
        int idx;
        idx = (int'(prio[p]) + k) % NREQ;
        if (grant[p] == '0 && req[p][idx]) grant[p][idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) prio[p] <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++)
        for (int i = 0; i < NREQ; i++)
          if (grant[p][i]) prio[p] <= IW'((i + 1) % NREQ);
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant[p]));
    assert property (@(posedge clk) disable iff (!rst_n) (grant[p] & ~req[p]) == '0);
  end
endmodule
