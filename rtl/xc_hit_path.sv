// xc_hit_path: the dedicated meta-hit read path.
//
// A meta load that hits in the meta-tags bypasses the routine machinery: the
// front end hands this block a job {key, first sector, sector count} and the
// block streams the element's sectors, one per cycle, out of the data RAM's
// dedicated read port to the datapath, marking the last one. It is fully
// pipelined: RAM read, then output queue; a job that finds nothing ahead of
// it skips the job queue and reads the RAM in the cycle it arrives, so with
// the cache's request queue in front a meta load accepted at clock edge t
// is answered at edge t+3 (load-to-use latency of 3 cycles). An entry without sectors answers with a
// single all-zero sector. The output queue has a valid/ready handshake; the
// block only issues a read when the output queue is sure to have room. The
// 3-cycle latency and the dedicated port follow the design; queue depths and
// the zero answer are this design's choice.
module xc_hit_path
  import xcache_pkg::*;
#(
  parameter int unsigned JOB_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       job_valid,
  output logic       job_ready,
  input  hit_job_t   job,
  output logic       rd_en,
  output sec_t       rd_sector,
  input  block_t     rd_data,
  output logic       resp_valid,
  input  logic       resp_ready,
  output meta_resp_t resp
);
  localparam int unsigned OUT_DEPTH = 4;

  logic     jq_valid, jq_pop;
  logic     direct;   // job issued straight from the input, skipping the queue
  hit_job_t jq_head;

  xc_fifo #(.T(hit_job_t), .DEPTH(JOB_DEPTH)) u_jobq (
    .clk, .rst_n,
    .in_valid (job_valid && !direct), .in_ready (job_ready), .in_data (job),
    .out_valid(jq_valid),  .out_ready(jq_pop),    .out_data(jq_head),
    .count    ()
  );

  logic     cur_active;
  hit_job_t cur;
  len_t     idx;

  logic     infl_valid, infl_last, infl_zero;
  key_t     infl_key;

  logic [$clog2(OUT_DEPTH+1)-1:0] ocount;
  meta_resp_t opush;

  hit_job_t sel;
  len_t     sel_idx;
  logic     can_issue, last;

  always_comb begin
    // With nothing queued, a new job is issued in the cycle it arrives.
    sel       = cur_active ? cur : (jq_valid ? jq_head : job);
    sel_idx   = cur_active ? idx : '0;
    can_issue = (cur_active || jq_valid || job_valid) &&
                (int'(ocount) + int'(infl_valid) <= OUT_DEPTH - 1);
    direct    = can_issue && !cur_active && !jq_valid;
    last      = (sel.len <= 1) || (sel_idx == sel.len - 1'b1);
    jq_pop    = can_issue && !cur_active && jq_valid;
    rd_en     = can_issue;
    rd_sector = sel.start + sec_t'(sel_idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_active <= 1'b0;
      infl_valid <= 1'b0;
    end else begin
      infl_valid <= can_issue;
      if (can_issue) begin
        if (!cur_active && !last) begin
          cur_active <= 1'b1;
          cur        <= sel;
          idx        <= 1;
        end else if (cur_active) begin
          idx <= idx + 1'b1;
          if (last) cur_active <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (can_issue) begin
      infl_key  <= sel.key;
      infl_last <= last;
      infl_zero <= (sel.len == '0);
    end
  end

  always_comb begin
    opush.key  = infl_key;
    opush.last = infl_last;
    opush.data = infl_zero ? '0 : rd_data;
  end

  xc_fifo #(.T(meta_resp_t), .DEPTH(OUT_DEPTH)) u_outq (
    .clk, .rst_n,
    .in_valid (infl_valid), .in_ready (), .in_data (opush),
    .out_valid(resp_valid), .out_ready(resp_ready), .out_data(resp),
    .count    (ocount)
  );

  // The credit check above guarantees the output queue never overflows.
  assert property (@(posedge clk) disable iff (!rst_n) infl_valid |-> (ocount < OUT_DEPTH));
endmodule
