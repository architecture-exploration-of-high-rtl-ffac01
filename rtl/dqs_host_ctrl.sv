// dqs_host_ctrl: host memory controller for an SSD on the DDR DRAM interface.
//
// It turns line requests into DRAM-style commands: row-active with the upper half of the
// logical line address, then read or write with the lower half. For a read it does not count a
// CAS latency: it waits, however long it takes, until the SSD drives DQS (a one-cycle preamble
// with DQS low), then captures BL words, one per DQS toggle. For a write it sends the BL words
// with its own strobe right after the write command and then waits for the SSD's DQS
// acknowledge. Supporting this DQS scheme is the change the document asks of the North Bridge
// DRAM controller; the write acknowledge is this design's own choice.
//
// Interface: c_valid/c_we/c_lba/c_wdata held until c_ready (one-cycle accept); c_done is a
// one-cycle completion, with c_rdata for reads. dqs_wait is high in every cycle spent waiting
// for the SSD (the BUSY interval of the timing diagram).
// Timing: ACT in the accept cycle + 1, RD/WR one cycle later; data is returned the cycle after
// the last beat.
module dqs_host_ctrl
  import ssd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                c_valid,
  input  logic                c_we,
  input  logic [LBA_W-1:0]    c_lba,
  input  line_t               c_wdata,
  output logic                c_ready,
  output logic                c_done,
  output line_t               c_rdata,
  output logic                dqs_wait,
  // DDR link
  output ddr_cmd_e            cmd,
  output logic [LBA_W/2-1:0]  addr,
  output logic [DW-1:0]       w_dq,
  output logic                w_dqs,
  output logic                w_dqs_en,
  input  logic [DW-1:0]       r_dq,
  input  logic                r_dqs,
  input  logic                r_dqs_oe
);
  localparam int unsigned AW = LBA_W / 2;
  localparam int unsigned KW = $clog2(BL + 1);

  typedef enum logic [2:0] {H_IDLE, H_ACT, H_CMD, H_WBEAT, H_WAIT, H_RBEAT, H_DONE} st_e;
  st_e           st;
  logic          we_q;
  logic [LBA_W-1:0] lba_q;
  line_t         line_q;
  logic [KW-1:0] k;

  assign c_ready  = (st == H_IDLE) && c_valid;
  assign dqs_wait = (st == H_WAIT) && !r_dqs_oe;

  always_comb begin
    cmd = DDR_NOP; addr = '0; w_dq = '0; w_dqs = 1'b0; w_dqs_en = 1'b0;
    unique case (st)
      H_ACT:   begin cmd = DDR_ACT; addr = lba_q[LBA_W-1:AW]; end
      H_CMD:   begin cmd = we_q ? DDR_WR : DDR_RD; addr = lba_q[AW-1:0]; end
      H_WBEAT: begin w_dqs_en = 1'b1; w_dqs = ~k[0]; w_dq = line_q[k*DW +: DW]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; we_q <= 1'b0; lba_q <= '0; line_q <= '0; k <= '0;
      c_done <= 1'b0; c_rdata <= '0;
    end else begin
      c_done <= 1'b0;
      unique case (st)
        H_IDLE:  if (c_valid) begin
          we_q <= c_we; lba_q <= c_lba; line_q <= c_wdata; st <= H_ACT;
        end
        H_ACT:   st <= H_CMD;
        H_CMD:   begin k <= '0; st <= we_q ? H_WBEAT : H_WAIT; end
        H_WBEAT: begin
          k <= k + KW'(1);
          if (k == KW'(BL - 1)) st <= H_WAIT;
        end
        H_WAIT:  if (r_dqs_oe) begin          // preamble seen
          k <= '0;
          st <= H_RBEAT;
        end
        H_RBEAT: if (r_dqs_oe) begin
          if (we_q) st <= H_DONE;             // acknowledge pulse
          else begin
            line_q[k*DW +: DW] <= r_dq;
            k <= k + KW'(1);
            if (k == KW'(BL - 1)) st <= H_DONE;
          end
        end
        H_DONE:  begin c_done <= 1'b1; c_rdata <= line_q; st <= H_IDLE; end
        default: st <= H_IDLE;
      endcase
    end
  end

  // Each captured beat must come with DQS in the expected phase.
  a_dqs_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (st == H_RBEAT && r_dqs_oe && !we_q) |-> (r_dqs == ~k[0]))
    else $error("dqs_host_ctrl: DQS out of phase");
endmodule
