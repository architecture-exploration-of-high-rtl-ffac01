// cache_buffer_ctrl: cache buffer controller of the dual-port SSD.
//
// Two SSD ports issue line requests at the same time. For each port a Cache-Hit Detector
// decides whether the line is in the cache buffer. A read hit is served from the dual-port
// cache DRAM through the DRAM Port Allocator (SSD port i always uses DRAM port i, and waits while
// that port's INT marks the bank busy). A read miss is served from NAND: the Channel Allocator
// gives the port the channel its address maps to (round-robin when both ports want the same
// channel, pending while the other port holds it); the line read is then written into the cache
// buffer and its tag set. A write is programmed to NAND through the same channel path and also
// written into the cache buffer (write-through with allocate), so a later read of it hits.
// One port hitting while the other misses therefore uses disjoint resources, as the document
// describes; both hitting contend only per bank, both missing only per channel.
//
// The document gives the detectors, the two allocators and their rules; the per-port sequencing,
// the write policy and the address mapping are this design's own. Mapping: cache index = low
// bits of the logical line address, cache bank = low bits of the index (consecutive lines
// interleave over banks), NAND channel = low bits of the logical address, page = the rest (a
// fixed stand-in for the FTL, whose algorithm the document does not give).
//
// Interface per SSD port p: s_valid/s_we/s_lba/s_wdata held until s_ready (one-cycle accept);
// s_done is a one-cycle completion with s_rdata (reads) and s_hit. Towards the cache DRAM and the
// NAND channels: see the port list. ev_* are one-cycle event strobes for monitoring.
// As in the document, the two ports are assumed to carry independent transactions (never the
// same logical line at once). They may share a cache slot: a read hit is confirmed again when its
// DRAM read is issued and, if the other port refilled the slot meanwhile, is served from NAND.
module cache_buffer_ctrl
  import ssd_pkg::*;
#(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned ROWS   = 256,
  parameter int unsigned NCH    = 2,
  parameter int unsigned PAGES  = 4096
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // SSD ports
  input  logic [1:0]                      s_valid,
  input  logic [1:0]                      s_we,
  input  logic [1:0][LBA_W-1:0]           s_lba,
  input  line_t [1:0]                     s_wdata,
  output logic [1:0]                      s_ready,
  output logic [1:0]                      s_done,
  output line_t [1:0]                     s_rdata,
  output logic [1:0]                      s_hit,
  // dual-port cache DRAM
  output logic [1:0]                      m_valid,
  output logic [1:0]                      m_we,
  output logic [1:0][$clog2(NBANKS)-1:0]  m_bank,
  output logic [1:0][$clog2(ROWS)-1:0]    m_row,
  output line_t [1:0]                     m_wdata,
  input  logic [1:0]                      m_ready,
  input  logic [1:0]                      m_rvalid,
  input  line_t [1:0]                     m_rdata,
  input  logic [1:0][NBANKS-1:0]          m_int,
  // NAND channels
  output logic [NCH-1:0]                  ch_start,
  output logic [NCH-1:0]                  ch_we,
  output logic [NCH-1:0][$clog2(PAGES)-1:0] ch_page,
  output line_t [NCH-1:0]                 ch_wdata,
  input  logic [NCH-1:0]                  ch_done,
  input  line_t [NCH-1:0]                 ch_rdata,
  // monitoring strobes
  output logic [1:0]                      ev_hit,
  output logic [1:0]                      ev_miss,
  output logic [1:0]                      ev_int_stall,
  output logic [1:0]                      ev_ch_conflict
);
  localparam int unsigned BW  = $clog2(NBANKS);
  localparam int unsigned RW  = $clog2(ROWS);
  localparam int unsigned IW  = BW + RW;
  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned PGW = $clog2(PAGES);

  typedef enum logic [2:0] {S_IDLE, S_DRD, S_DRW, S_CREQ, S_CST, S_CWT, S_FILL, S_RESP} st_e;

  st_e  [1:0]            st;
  logic [1:0][LBA_W-1:0] lba_q;
  logic [1:0]            we_q, hit_q;
  line_t [1:0]           buf_q;

  // Cache-Hit Detectors 0/1
  logic [1:0] hit, upd;
  logic [1:0][LBA_W-1:0] look_lba;
  cache_hit_detector #(.NPORTS(2), .LINES(NBANKS * ROWS)) u_hit (
    .clk, .rst_n, .lookup_lba(look_lba), .hit, .upd_valid(upd), .upd_lba(lba_q)
  );

  // Channel Allocator
  logic [1:0]           ch_req, ch_gnt, ch_conf;
  logic [1:0][CHW-1:0]  ch_sel;
  channel_allocator #(.NPORTS(2), .NCH(NCH)) u_challoc (
    .clk, .rst_n, .req(ch_req), .req_ch(ch_sel), .gnt(ch_gnt), .conflict(ch_conf)
  );

  // DRAM Port Allocator
  logic [1:0]           c_valid, c_we, c_ready, c_stall;
  logic [1:0][BW-1:0]   c_bank;
  logic [1:0][RW-1:0]   c_row;
  dram_port_allocator #(.NPORTS(2), .NBANKS(NBANKS), .ROWS(ROWS)) u_palloc (
    .c_valid, .c_we, .c_bank, .c_row, .c_wdata(buf_q), .c_ready, .stall(c_stall),
    .d_valid(m_valid), .d_we(m_we), .d_bank(m_bank), .d_row(m_row), .d_wdata(m_wdata),
    .d_ready(m_ready), .int_busy(m_int)
  );

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [IW-1:0] idx;
      idx        = lba_q[p][IW-1:0];
      c_bank[p]  = idx[BW-1:0];
      c_row[p]   = idx[IW-1:BW];
      // a new request is looked up on arrival; a read hit is looked up again when its DRAM
      // read is issued, in case the other port has refilled that cache slot in between
      look_lba[p] = (st[p] == S_IDLE) ? s_lba[p] : lba_q[p];
      c_valid[p] = (st[p] == S_DRD && hit[p]) || (st[p] == S_FILL);
      c_we[p]    = (st[p] == S_FILL);
      ch_sel[p]  = CHW'(lba_q[p] % NCH);
      ch_req[p]  = (st[p] == S_CREQ) || (st[p] == S_CST) || (st[p] == S_CWT);
      upd[p]     = (st[p] == S_FILL) && c_ready[p];
      s_ready[p] = (st[p] == S_IDLE) && s_valid[p];
      ev_hit[p]  = s_ready[p] && hit[p] && !s_we[p];
      ev_miss[p] = s_ready[p] && !hit[p] && !s_we[p];
      ev_int_stall[p]   = c_stall[p];
      ev_ch_conflict[p] = ch_conf[p];
    end
    // a channel is driven by the port that owns it
    ch_start = '0; ch_we = '0; ch_page = '0; ch_wdata = '0;
    for (int p = 0; p < 2; p++) begin
      if (st[p] == S_CST) begin
        ch_start[ch_sel[p]] = 1'b1;
        ch_we[ch_sel[p]]    = we_q[p];
        ch_page[ch_sel[p]]  = PGW'(lba_q[p] / NCH);
        ch_wdata[ch_sel[p]] = buf_q[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= {S_IDLE, S_IDLE}; lba_q <= '0; we_q <= '0; hit_q <= '0; buf_q <= '0;
      s_done <= '0; s_rdata <= '0; s_hit <= '0;
    end else begin
      for (int p = 0; p < 2; p++) begin
        s_done[p] <= 1'b0;
        unique case (st[p])
          S_IDLE: if (s_valid[p]) begin
            lba_q[p] <= s_lba[p];
            we_q[p]  <= s_we[p];
            hit_q[p] <= hit[p];
            buf_q[p] <= s_wdata[p];
            st[p]    <= (!s_we[p] && hit[p]) ? S_DRD : S_CREQ;
          end
          S_DRD:  if (!hit[p]) begin hit_q[p] <= 1'b0; st[p] <= S_CREQ; end
                  else if (c_ready[p]) st[p] <= S_DRW;
          S_DRW:  if (m_rvalid[p]) begin buf_q[p] <= m_rdata[p]; st[p] <= S_RESP; end
          S_CREQ: if (ch_gnt[p]) st[p] <= S_CST;
          S_CST:  st[p] <= S_CWT;
          S_CWT:  if (ch_done[ch_sel[p]]) begin
            if (!we_q[p]) buf_q[p] <= ch_rdata[ch_sel[p]];
            st[p] <= S_FILL;
          end
          S_FILL: if (c_ready[p]) st[p] <= S_RESP;
          S_RESP: begin
            s_done[p]  <= 1'b1;
            s_rdata[p] <= buf_q[p];
            s_hit[p]   <= hit_q[p];
            st[p]      <= S_IDLE;
          end
          default: st[p] <= S_IDLE;
        endcase
      end
    end
  end
endmodule
