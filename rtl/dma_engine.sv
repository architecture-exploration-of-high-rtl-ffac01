// dma_engine: DMA controller that moves a block of lines between main memory and the SSD.
//
// The same engine is used twice: DMA1 inside the North Bridge DRAM controller, whose SSD side
// goes over the DDR link, and DMA2 inside the SSD, whose memory side is the direct path to
// the second port of the dual-port main memory. A DMA WRITE reads each line from main memory
// and writes it to the SSD, waiting until the SSD reports it stored before the next line, so
// consecutive writes are strictly serialised as the document requires for write safety. A DMA
// READ is pipelined as the document describes: while line i is being written into main memory
// (D_RMW), the SSD request for line i+1 is already issued, so the SSD's internal latency overlaps
// the memory write. A line that arrives from the SSD before the memory write of the previous one
// was accepted waits in a second buffer. At the end the engine pulses irq (the completion
// interrupt).
//
// The command carries the memory address, SSD address and length directly; the physical region
// descriptor fetch of a SATA DMA is not modelled (this design's own simplification). At most one
// SSD request is outstanding, since both SSD front ends serve one line at a time. Main-memory
// lines are interleaved over the banks: bank = low bits of the line address, row = the rest.
//
// Interface: cmd_valid/cmd held until cmd_ready (accept); busy while a command runs; irq one
// cycle. m_*: request/accept plus rvalid, as dp_dram. s_*: request/accept plus done pulse.
module dma_engine
  import ssd_pkg::*;
#(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned ROWS   = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cmd_valid,
  input  dma_cmd_t                   cmd,
  output logic                       cmd_ready,
  output logic                       busy,
  output logic                       irq,
  // main memory
  output logic                       m_valid,
  output logic                       m_we,
  output logic [$clog2(NBANKS)-1:0]  m_bank,
  output logic [$clog2(ROWS)-1:0]    m_row,
  output line_t                      m_wdata,
  input  logic                       m_ready,
  input  logic                       m_rvalid,
  input  line_t                      m_rdata,
  // SSD
  output logic                       s_valid,
  output logic                       s_we,
  output logic [LBA_W-1:0]           s_lba,
  output line_t                      s_wdata,
  input  logic                       s_ready,
  input  logic                       s_done,
  input  line_t                      s_rdata
);
  localparam int unsigned BW = $clog2(NBANKS);
  localparam int unsigned RW = $clog2(ROWS);

  typedef enum logic [2:0] {D_IDLE, D_MREQ, D_MWAIT, D_SREQ, D_SWAIT, D_NEXT, D_RMW} st_e;
  st_e              st;
  dma_dir_e         dir_q;
  logic [MA_W-1:0]  ma_q;
  logic [LBA_W-1:0] lba_q;
  logic [LEN_W-1:0] left_q;
  line_t            buf_q;
  // DMA READ pipeline: SSD requests still to issue, flags of the current D_RMW step, and the
  // second buffer for a line that arrived early.
  logic [LEN_W-1:0] sleft_q;
  logic             mw_done, sr_done, nfull;
  line_t            nbuf_q;
  logic             m_acc, s_acc, s_more;

  assign cmd_ready = (st == D_IDLE);
  assign busy      = (st != D_IDLE);
  assign s_more    = (sleft_q != '0);
  assign m_valid   = (st == D_MREQ) || (st == D_RMW && !mw_done);
  assign m_we      = (dir_q == DMA_READ);
  assign m_bank    = ma_q[BW-1:0];
  assign m_row     = RW'(ma_q >> BW);
  assign m_wdata   = buf_q;
  assign s_valid   = (st == D_SREQ) || (st == D_RMW && s_more && !sr_done);
  assign m_acc     = m_valid && m_ready;
  assign s_acc     = s_valid && s_ready;
  assign s_we      = (dir_q == DMA_WRITE);
  assign s_lba     = lba_q;
  assign s_wdata   = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; dir_q <= DMA_WRITE; ma_q <= '0; lba_q <= '0; left_q <= '0; buf_q <= '0;
      irq <= 1'b0; sleft_q <= '0; mw_done <= 1'b0; sr_done <= 1'b0; nfull <= 1'b0; nbuf_q <= '0;
    end else begin
      irq <= 1'b0;
      unique case (st)
        D_IDLE:  if (cmd_valid) begin
          dir_q <= cmd.dir; ma_q <= cmd.mem_addr; lba_q <= cmd.lba; left_q <= cmd.nlines;
          sleft_q <= cmd.nlines; nfull <= 1'b0;
          st <= (cmd.dir == DMA_WRITE) ? D_MREQ : D_SREQ;
        end
        D_MREQ:  if (m_ready) st <= (dir_q == DMA_WRITE) ? D_MWAIT : D_NEXT;
        D_MWAIT: if (m_rvalid) begin buf_q <= m_rdata; st <= D_SREQ; end
        D_SREQ:  if (s_ready) begin
          st <= D_SWAIT;
          if (dir_q == DMA_READ) begin lba_q <= lba_q + LBA_W'(1); sleft_q <= sleft_q - LEN_W'(1); end
        end
        D_SWAIT: if (s_done) begin
          if (dir_q == DMA_READ) begin
            buf_q <= s_rdata; mw_done <= 1'b0; sr_done <= 1'b0; st <= D_RMW;
          end else st <= D_NEXT;
        end
        // DMA READ: write buf_q to memory and request the next line from the SSD at once.
        D_RMW: begin
          if (m_acc) begin
            mw_done <= 1'b1; ma_q <= ma_q + MA_W'(1); left_q <= left_q - LEN_W'(1);
          end
          if (s_acc) begin
            sr_done <= 1'b1; lba_q <= lba_q + LBA_W'(1); sleft_q <= sleft_q - LEN_W'(1);
          end
          if (s_done) begin nbuf_q <= s_rdata; nfull <= 1'b1; end
          if (mw_done && (sr_done || !s_more)) begin
            if (left_q == '0) begin irq <= 1'b1; st <= D_IDLE; end
            else if (nfull || s_done) begin
              buf_q <= nfull ? nbuf_q : s_rdata; nfull <= 1'b0;
              mw_done <= 1'b0; sr_done <= 1'b0;
            end else st <= D_SWAIT;
          end
        end
        D_NEXT:  begin
          ma_q   <= ma_q + MA_W'(1);
          lba_q  <= lba_q + LBA_W'(1);
          left_q <= left_q - LEN_W'(1);
          if (left_q == LEN_W'(1)) begin irq <= 1'b1; st <= D_IDLE; end
          else st <= D_MREQ;
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  a_nonzero_length: assert property (@(posedge clk) disable iff (!rst_n)
    (st == D_IDLE && cmd_valid) |-> (cmd.nlines != '0))
    else $error("dma_engine: zero-length command");
  a_no_lost_line: assert property (@(posedge clk) disable iff (!rst_n)
    (st == D_RMW && s_done) |-> !nfull)
    else $error("dma_engine: SSD line arrived while the second buffer was full");
endmodule
