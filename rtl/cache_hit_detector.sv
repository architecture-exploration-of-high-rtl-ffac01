// cache_hit_detector: Cache-Hit Detectors 0 and 1 of the dual-port SSD.
//
// The cache buffer holds LINES lines, direct-mapped: line index = low bits of the logical line
// address, tag = the remaining bits. One tag store is shared by the NPORTS detectors, since both
// SSD ports use the same cache buffer; detector p compares lookup_lba[p] against its entry and
// raises hit[p] (HIT0/HIT1 in the document) when the line is present. A port that fills a line
// (after a NAND read or on a write) sets the tag through its update port. The document gives only
// the detectors' function; the direct-mapped organisation is this design's own choice.
//
// Interface: lookup_lba[p] -> hit[p] combinationally; upd_valid[p]/upd_lba[p] set the entry at
// the next clock edge. Reset empties the cache.
module cache_hit_detector
  import ssd_pkg::*;
#(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned LINES  = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0][LBA_W-1:0]  lookup_lba,
  output logic [NPORTS-1:0]             hit,
  input  logic [NPORTS-1:0]             upd_valid,
  input  logic [NPORTS-1:0][LBA_W-1:0]  upd_lba
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = LBA_W - IW;

  logic [LINES-1:0]  valid;
  logic [TW-1:0]     tags [LINES];

  always_comb
    for (int p = 0; p < NPORTS; p++)
      hit[p] = valid[lookup_lba[p][IW-1:0]] && tags[lookup_lba[p][IW-1:0]] == lookup_lba[p][LBA_W-1:IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else
      for (int p = 0; p < NPORTS; p++)
        if (upd_valid[p]) valid[upd_lba[p][IW-1:0]] <= 1'b1;
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NPORTS; p++)
      if (upd_valid[p]) tags[upd_lba[p][IW-1:0]] <= upd_lba[p][LBA_W-1:IW];
endmodule
