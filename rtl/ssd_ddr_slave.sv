// ssd_ddr_slave: the SSD's host interface on a DDR DRAM bus (SSD port 0).
//
// The host addresses the SSD like a DRAM: a row-active command carries the upper half of the
// logical line address, the following read or write command the lower half. A DRAM answers a
// read after a fixed CAS latency; the SSD cannot, because a line may come from its cache buffer
// (fast) or from NAND (slow). So the SSD keeps DQS, the data strobe, idle while it is busy and
// drives it only when the data is ready: one cycle of preamble (DQS driven low), then the BL data
// words, DQS toggling with each word, as in the cache-miss and cache-hit timing diagrams. This is
// the document's DQS signalling scheme.
//
// Writes: the host drives the BL words with its own strobe (w_dqs_en marks each beat, w_dqs
// toggles) starting the cycle after the write command. The SSD answers with a preamble and a
// single DQS pulse once the line is stored. This write acknowledge is this design's own choice;
// the document shows the scheme for reads only.
//
// The link is modelled one data word per clock (both edges of a real DDR bus are folded into
// one), with separate signals per direction instead of bidirectional pins.
module ssd_ddr_slave
  import ssd_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // DDR link, host -> SSD
  input  ddr_cmd_e               cmd,
  input  logic [LBA_W/2-1:0]     addr,
  input  logic [DW-1:0]          w_dq,
  input  logic                   w_dqs,
  input  logic                   w_dqs_en,
  // DDR link, SSD -> host
  output logic [DW-1:0]          r_dq,
  output logic                   r_dqs,
  output logic                   r_dqs_oe,
  // to the cache buffer controller
  output logic                   s_valid,
  output logic                   s_we,
  output logic [LBA_W-1:0]       s_lba,
  output line_t                  s_wdata,
  input  logic                   s_ready,
  input  logic                   s_done,
  input  line_t                  s_rdata
);
  localparam int unsigned AW = LBA_W / 2;
  localparam int unsigned KW = $clog2(BL + 1);

  typedef enum logic [2:0] {L_IDLE, L_WDATA, L_REQ, L_WAIT, L_PRE, L_BURST, L_ACK} st_e;
  st_e            st;
  logic [AW-1:0]  row_q;
  logic [KW-1:0]  k;
  line_t          line_q;

  assign s_valid = (st == L_REQ);
  assign s_wdata = line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; row_q <= '0; k <= '0; line_q <= '0; s_we <= 1'b0; s_lba <= '0;
      r_dq <= '0; r_dqs <= 1'b0; r_dqs_oe <= 1'b0;
    end else begin
      r_dqs_oe <= 1'b0; r_dqs <= 1'b0; r_dq <= '0;
      unique case (st)
        L_IDLE: begin
          if (cmd == DDR_ACT) row_q <= addr;
          else if (cmd == DDR_RD) begin
            s_lba <= {row_q, addr}; s_we <= 1'b0; st <= L_REQ;
          end else if (cmd == DDR_WR) begin
            s_lba <= {row_q, addr}; s_we <= 1'b1; k <= '0; st <= L_WDATA;
          end
        end
        L_WDATA: if (w_dqs_en) begin
          line_q[k*DW +: DW] <= w_dq;
          k <= k + KW'(1);
          if (k == KW'(BL - 1)) st <= L_REQ;
        end
        L_REQ:  if (s_ready) st <= L_WAIT;
        L_WAIT: if (s_done) begin
          line_q <= s_rdata;
          r_dqs_oe <= 1'b1;                 // preamble: DQS driven low
          st <= s_we ? L_ACK : L_PRE;
          k <= '0;
        end
        L_PRE, L_BURST: begin
          r_dqs_oe <= 1'b1;
          r_dqs    <= ~k[0];
          r_dq     <= line_q[k*DW +: DW];
          k        <= k + KW'(1);
          st       <= (k == KW'(BL - 1)) ? L_IDLE : L_BURST;
        end
        L_ACK: begin
          r_dqs_oe <= 1'b1; r_dqs <= 1'b1; st <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  // The host must not send a new command while a transfer is in progress.
  a_no_cmd_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (st != L_IDLE) |-> (cmd == DDR_NOP))
    else $error("ssd_ddr_slave: command while busy");
  // The host's write strobe toggles with each beat, high on the first.
  a_wdqs_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (st == L_WDATA && w_dqs_en) |-> (w_dqs == ~k[0]))
    else $error("ssd_ddr_slave: write strobe out of phase");
endmodule
