// xc_data_ram: banked, sectored data RAM.
//
// The data RAM is physically split into WLEN banks, one per word delivered to
// the datapath per cycle; a sector is one row across all banks (WLEN words).
// There is one write port with a per-bank (per-word) write enable, used by
// the walkers to copy DRAM responses sector by sector or to update single
// words, and two read ports with one cycle of latency: port A is the
// dedicated meta-hit port, port B serves the routines' READ action. Reads
// and a write to the same sector in one cycle return the old data. Banking
// by words and the dedicated hit port follow the design; the second read
// port and the read-before-write behaviour are this design's choice.
module xc_data_ram
  import xcache_pkg::*;
#(
  parameter int unsigned NSECTORS = 4096
) (
  input  logic             clk,
  input  logic             wr_en,
  input  sec_t             wr_sector,
  input  logic [WLEN-1:0]  wr_be,
  input  block_t           wr_data,
  input  logic             rda_en,
  input  sec_t             rda_sector,
  output block_t           rda_data,
  input  logic             rdb_en,
  input  sec_t             rdb_sector,
  output block_t           rdb_data
);
  localparam int unsigned AW = $clog2(NSECTORS);

  for (genvar b = 0; b < WLEN; b++) begin : g_bank
    word_t bank [NSECTORS];

    always_ff @(posedge clk) begin
      if (wr_en && wr_be[b]) bank[wr_sector[AW-1:0]] <= wr_data[b];
    end

    always_ff @(posedge clk) begin
      if (rda_en) rda_data[b] <= bank[rda_sector[AW-1:0]];
      if (rdb_en) rdb_data[b] <= bank[rdb_sector[AW-1:0]];
    end
  end
endmodule
