// xc_sector_alloc: allocator for data RAM sectors.
//
// The data RAM is managed as fixed-size sectors, decoupled from the
// meta-tags: an element takes as many sectors as its size needs and its tag
// entry points at the first sector and holds the count. This block keeps a
// free bitmap of the NSECTORS sectors. An allocation request for LEN
// (1..MAX_RUN) contiguous sectors is answered in the same cycle with the
// lowest free run that fits (ok low when none does); when the request is
// taken (alloc_take) the run is marked used at the clock edge. Two free
// ports return runs (a walker's deallocD and a meta-tag eviction) in the same
// cycle. All sectors are free after reset. Sectors, start/end pointers and
// allocD/deallocD follow the design; the first-fit contiguous policy and
// MAX_RUN are this design's choice.
module xc_sector_alloc
  import xcache_pkg::*;
#(
  parameter int unsigned NSECTORS = 4096,
  parameter int unsigned MAX_RUN  = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  len_t alloc_len,
  output logic alloc_ok,
  output sec_t alloc_start,
  input  logic alloc_take,
  input  logic free_a_en,
  input  sec_t free_a_start,
  input  len_t free_a_len,
  input  logic free_b_en,
  input  sec_t free_b_start,
  input  len_t free_b_len,
  output logic [$clog2(NSECTORS+1)-1:0] free_count
);
  logic [NSECTORS-1:0] free_q;
  logic [NSECTORS-1:0] fits;

  // fits[s]: sectors s .. s+alloc_len-1 exist and are all free.
  always_comb begin
    for (int s = 0; s < NSECTORS; s++) begin
      fits[s] = (alloc_len != '0) && (int'(alloc_len) <= MAX_RUN) &&
                (s + int'(alloc_len) <= NSECTORS);
      for (int k = 0; k < MAX_RUN; k++)
        if (k < int'(alloc_len) && (s + k) < NSECTORS && !free_q[s+k]) fits[s] = 1'b0;
    end
  end

  always_comb begin
    alloc_ok    = 1'b0;
    alloc_start = '0;
    for (int s = NSECTORS - 1; s >= 0; s--)
      if (fits[s]) begin
        alloc_ok    = 1'b1;
        alloc_start = sec_t'(s);
      end
  end

  function automatic logic [NSECTORS-1:0] run_mask(sec_t start, len_t len);
    logic [NSECTORS-1:0] m;
    m = '0;
    for (int k = 0; k < MAX_RUN; k++)
      if (k < int'(len) && int'(start) + k < NSECTORS) m[int'(start) + k] = 1'b1;
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q <= '1;
    end else begin
      logic [NSECTORS-1:0] nxt;
      nxt = free_q;
      if (free_a_en) nxt = nxt | run_mask(free_a_start, free_a_len);
      if (free_b_en) nxt = nxt | run_mask(free_b_start, free_b_len);
      if (alloc_take && alloc_ok) nxt = nxt & ~run_mask(alloc_start, alloc_len);
      free_q <= nxt;
    end
  end

  always_comb begin
    free_count = '0;
    for (int s = 0; s < NSECTORS; s++) free_count = free_count + free_q[s];
  end
endmodule
