// xc_dram_model: behavioural DRAM for the X-Cache testbenches.
//
// Not part of the design. It accepts one block request per cycle, holds it
// for LATENCY cycles and returns WLEN consecutive 32-bit words starting at
// the (word-aligned) request address, in request order, tagged with the
// request's walker id. Many requests may be outstanding. The word array is
// filled by the testbench through hierarchical writes to mem. Requests and
// served beats are counted.
module xc_dram_model
  import xcache_pkg::*;
#(
  parameter int unsigned LATENCY = 20,
  parameter int unsigned WORDS   = 65536,
  parameter int unsigned SLOTS   = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  dram_req_t  req,
  output logic       resp_valid,
  input  logic       resp_ready,
  output dram_resp_t resp,
  output int         n_requests
);
  word_t mem [WORDS];

  dram_req_t   q_req  [SLOTS];
  longint      q_due  [SLOTS];
  int          head, tail, cnt;
  longint      now;

  assign req_ready  = (cnt < SLOTS);
  assign resp_valid = (cnt > 0) && (q_due[head] <= now);
  always_comb begin
    resp.wid = q_req[head].wid;
    for (int w = 0; w < WLEN; w++)
      resp.data[w] = mem[((q_req[head].addr >> 2) + w) % WORDS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= 0; tail <= 0; cnt <= 0; now <= 0; n_requests <= 0;
    end else begin
      now <= now + 1;
      if (req_valid && req_ready) begin
        q_req[tail] <= req;
        q_due[tail] <= now + LATENCY;
        tail <= (tail + 1) % SLOTS;
        n_requests <= n_requests + 1;
      end
      if (resp_valid && resp_ready) head <= (head + 1) % SLOTS;
      cnt <= cnt + ((req_valid && req_ready) ? 1 : 0) - ((resp_valid && resp_ready) ? 1 : 0);
    end
  end
endmodule
