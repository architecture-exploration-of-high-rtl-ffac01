// dual_port_ssd: SSD with two ports for concurrent transactions.
//
// Port 0 is the host interface on the DDR DRAM bus (ssd_ddr_slave, DQS signalling). Port 1 is
// DMA2, the SSD's own DMA controller, whose memory side is the direct path to the second port of
// the dual-port main memory and which takes its commands from the North Bridge (d2_*). Both
// ports enter the cache buffer controller, which serves them from a dual-port DRAM cache buffer
// (SSD port i on DRAM port i) or from NCH NAND channels. Because the cache buffer is itself
// dual-ported, a hit on one port and a miss on the other proceed fully in parallel. DMA2 raises
// irq_dma2, the interrupt pin the document adds for DMA completion in the SSD. The processor
// running the FTL and its SRAM are not built; the controller maps addresses to channels with a
// fixed rule instead.
//
// Interface: ddr_* link to the North Bridge; d2_* DMA2 command (held until d2_ready); mm_* the
// direct-path master on main-memory port B with that port's INT lines; ev_* monitoring strobes.
module dual_port_ssd
  import ssd_pkg::*;
#(
  parameter int unsigned MM_NBANKS = 4,
  parameter int unsigned MM_ROWS   = 2048,
  parameter int unsigned CB_NBANKS = 4,
  parameter int unsigned CB_ROWS   = 256,
  parameter int unsigned CL        = 2,
  parameter int unsigned NCH       = 2,
  parameter int unsigned PAGES     = 4096,
  parameter int unsigned T_READ    = 25,
  parameter int unsigned T_PROG    = 100
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DDR link (port 0)
  input  ddr_cmd_e                      ddr_cmd,
  input  logic [LBA_W/2-1:0]            ddr_addr,
  input  logic [DW-1:0]                 ddr_w_dq,
  input  logic                          ddr_w_dqs,
  input  logic                          ddr_w_dqs_en,
  output logic [DW-1:0]                 ddr_r_dq,
  output logic                          ddr_r_dqs,
  output logic                          ddr_r_dqs_oe,
  // DMA2 command (port 1)
  input  logic                          d2_valid,
  input  dma_cmd_t                      d2_cmd,
  output logic                          d2_ready,
  output logic                          irq_dma2,
  output logic                          dma2_busy,
  // direct path to main-memory port B
  output logic                          mm_valid,
  output logic                          mm_we,
  output logic [$clog2(MM_NBANKS)-1:0]  mm_bank,
  output logic [$clog2(MM_ROWS)-1:0]    mm_row,
  output line_t                         mm_wdata,
  input  logic                          mm_ready,
  input  logic                          mm_rvalid,
  input  line_t                         mm_rdata,
  input  logic [MM_NBANKS-1:0]          mm_int,
  // monitoring
  output logic [1:0]                    ev_hit,
  output logic [1:0]                    ev_miss,
  output logic [1:0]                    ev_cb_int_stall,
  output logic [1:0]                    ev_ch_conflict,
  output logic                          ev_mm_int_stall
);
  localparam int unsigned MBW = $clog2(MM_NBANKS);
  localparam int unsigned MRW = $clog2(MM_ROWS);
  localparam int unsigned CBW = $clog2(CB_NBANKS);
  localparam int unsigned CRW = $clog2(CB_ROWS);
  localparam int unsigned PGW = $clog2(PAGES);

  // SSD ports into the cache buffer controller
  logic [1:0]             s_valid, s_we, s_ready, s_done, s_hit;
  logic [1:0][LBA_W-1:0]  s_lba;
  line_t [1:0]            s_wdata, s_rdata;

  ssd_ddr_slave u_port0 (
    .clk, .rst_n, .cmd(ddr_cmd), .addr(ddr_addr), .w_dq(ddr_w_dq), .w_dqs(ddr_w_dqs),
    .w_dqs_en(ddr_w_dqs_en), .r_dq(ddr_r_dq), .r_dqs(ddr_r_dqs), .r_dqs_oe(ddr_r_dqs_oe),
    .s_valid(s_valid[0]), .s_we(s_we[0]), .s_lba(s_lba[0]), .s_wdata(s_wdata[0]),
    .s_ready(s_ready[0]), .s_done(s_done[0]), .s_rdata(s_rdata[0])
  );

  // DMA2 and its INT-aware memory front end (the SSD's DRAM controller on the direct path)
  logic              dm_valid, dm_we, dm_ready;
  logic [MBW-1:0]    dm_bank;
  logic [MRW-1:0]    dm_row;
  line_t             dm_wdata;
  logic [0:0]        mm_stall;

  dma_engine #(.NBANKS(MM_NBANKS), .ROWS(MM_ROWS)) u_dma2 (
    .clk, .rst_n, .cmd_valid(d2_valid), .cmd(d2_cmd), .cmd_ready(d2_ready), .busy(dma2_busy),
    .irq(irq_dma2),
    .m_valid(dm_valid), .m_we(dm_we), .m_bank(dm_bank), .m_row(dm_row), .m_wdata(dm_wdata),
    .m_ready(dm_ready), .m_rvalid(mm_rvalid), .m_rdata(mm_rdata),
    .s_valid(s_valid[1]), .s_we(s_we[1]), .s_lba(s_lba[1]), .s_wdata(s_wdata[1]),
    .s_ready(s_ready[1]), .s_done(s_done[1]), .s_rdata(s_rdata[1])
  );

  dram_port_allocator #(.NPORTS(1), .NBANKS(MM_NBANKS), .ROWS(MM_ROWS)) u_mmport (
    .c_valid(dm_valid), .c_we(dm_we), .c_bank(dm_bank), .c_row(dm_row), .c_wdata(dm_wdata),
    .c_ready(dm_ready), .stall(mm_stall),
    .d_valid(mm_valid), .d_we(mm_we), .d_bank(mm_bank), .d_row(mm_row), .d_wdata(mm_wdata),
    .d_ready(mm_ready), .int_busy(mm_int)
  );
  assign ev_mm_int_stall = mm_stall[0];

  // cache buffer controller
  logic [1:0]             cm_valid, cm_we, cm_ready, cm_rvalid;
  logic [1:0][CBW-1:0]    cm_bank;
  logic [1:0][CRW-1:0]    cm_row;
  line_t [1:0]            cm_wdata, cm_rdata;
  logic [1:0][CB_NBANKS-1:0] cm_int;
  logic [NCH-1:0]         ch_start, ch_we, ch_done, ch_busy;
  logic [NCH-1:0][PGW-1:0] ch_page;
  line_t [NCH-1:0]        ch_wdata, ch_rdata;

  cache_buffer_ctrl #(.NBANKS(CB_NBANKS), .ROWS(CB_ROWS), .NCH(NCH), .PAGES(PAGES)) u_cbc (
    .clk, .rst_n,
    .s_valid, .s_we, .s_lba, .s_wdata, .s_ready, .s_done, .s_rdata, .s_hit,
    .m_valid(cm_valid), .m_we(cm_we), .m_bank(cm_bank), .m_row(cm_row), .m_wdata(cm_wdata),
    .m_ready(cm_ready), .m_rvalid(cm_rvalid), .m_rdata(cm_rdata), .m_int(cm_int),
    .ch_start, .ch_we, .ch_page, .ch_wdata, .ch_done, .ch_rdata,
    .ev_hit, .ev_miss, .ev_int_stall(ev_cb_int_stall), .ev_ch_conflict
  );

  // dual-port cache buffer
  dp_dram #(.NBANKS(CB_NBANKS), .ROWS(CB_ROWS), .CL(CL)) u_cache (
    .clk, .rst_n, .req_valid(cm_valid), .req_we(cm_we), .req_bank(cm_bank), .req_row(cm_row),
    .req_wdata(cm_wdata), .req_ready(cm_ready), .rvalid(cm_rvalid), .rdata(cm_rdata),
    .int_busy(cm_int)
  );

  // NAND channels
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    flash_channel #(.PAGES(PAGES), .T_READ(T_READ), .T_PROG(T_PROG)) u_ch (
      .clk, .rst_n, .start(ch_start[c]), .we(ch_we[c]), .page(ch_page[c]), .wdata(ch_wdata[c]),
      .busy(ch_busy[c]), .done(ch_done[c]), .rdata(ch_rdata[c])
    );
  end

  // Per-completion hit flags and channel busy levels are not used at this level; the ev_*
  // strobes carry the hit/miss information.
  logic unused_ok;
  assign unused_ok = ^{s_hit, ch_busy};
endmodule
