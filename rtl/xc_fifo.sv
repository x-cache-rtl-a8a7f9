// xc_fifo: latency-insensitive message queue.
//
// X-Cache talks to the accelerator datapath, to DRAM and to itself through
// message queues; every queue in the design is an instance of this FIFO.
// It is a circular buffer of DEPTH entries of type T with a valid/ready
// handshake on both sides: an entry pushed at a clock edge is visible at the
// output in the next cycle, a push into a full queue is refused (in_ready
// low) and a pop of an empty queue does nothing. The design text describes the
// queues only as latency-insensitive message bundles; the depth and the
// registered (no fall-through) timing are this design's choice.
module xc_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire do_push = in_valid && in_ready;
  wire do_pop  = out_valid && out_ready;

  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rd_ptr];
  assign count     = cnt;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      cnt <= cnt + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

  // A refused push must be retried by the producer, never lost silently.
  assert property (@(posedge clk) disable iff (!rst_n) cnt <= DEPTH);
endmodule
