// dp_dram: dual-port DRAM with a per-bank INT signal to each port.
//
// NBANKS banks of ROWS lines each (a line is one BL-word burst) are reachable from two ports,
// A (0) and B (1). The two ports may use different banks at the same time; one bank serves one
// port at a time, as decided by bank_arbiter (round-robin on simultaneous requests). While one
// port uses a bank, the other port sees that bank's INT high and must wait: this is the
// synchronisation scheme the document proposes instead of a single shared bank with a hardware
// semaphore. It serves as main memory and as the SSD's cache buffer.
//
// Interface per port p: req_valid/req_we/req_bank/req_row/req_wdata, held until req_ready (a
// one-cycle accept); a read returns rdata with a one-cycle rvalid CL cycles after the accept cycle (CL >= 2);
// int_busy[p][b] is the INT pin of port p for bank b.
// Timing: the bank is held for CL + BURST_CYC cycles after the accept (CAS latency, then the
// burst of Fig. 5, which takes two clocks at double data rate). The row activate of a real DRAM
// and refresh are not modelled: the accept stands for row-active plus column command.
module dp_dram
  import ssd_pkg::*;
#(
  parameter int unsigned NBANKS    = 4,
  parameter int unsigned ROWS      = 2048,
  parameter int unsigned CL        = 2,
  parameter int unsigned BURST_CYC = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [1:0]                      req_valid,
  input  logic [1:0]                      req_we,
  input  logic [1:0][$clog2(NBANKS)-1:0]  req_bank,
  input  logic [1:0][$clog2(ROWS)-1:0]    req_row,
  input  line_t [1:0]                     req_wdata,
  output logic [1:0]                      req_ready,
  output logic [1:0]                      rvalid,
  output line_t [1:0]                     rdata,
  output logic [1:0][NBANKS-1:0]          int_busy
);
  localparam int unsigned BW = $clog2(NBANKS);
  localparam int unsigned CW = $clog2(CL + 1);

  // The bank array is read in the accept cycle and returned from a register, so CL >= 2.
  if (CL < 2) begin : g_cl_check
    $error("dp_dram: CL must be at least 2");
  end

  logic [1:0] gnt, port_busy;

  bank_arbiter #(.NBANKS(NBANKS), .HOLD(CL + BURST_CYC)) u_arb (
    .clk, .rst_n, .req(req_valid), .req_bank, .gnt, .port_busy, .int_busy
  );
  assign req_ready = gnt;
  // port_busy only gates the arbiter internally; a port sees its own accept on req_ready.
  logic unused_busy;
  assign unused_busy = ^port_busy;

  line_t [NBANKS-1:0] rd_q;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    line_t mem [ROWS];
    logic  hit0, hit1, sel;
    assign hit0 = gnt[0] && req_bank[0] == BW'(b);
    assign hit1 = gnt[1] && req_bank[1] == BW'(b);
    assign sel  = hit1;
    always_ff @(posedge clk) begin
      if (hit0 || hit1) begin
        if (req_we[sel]) mem[req_row[sel]] <= req_wdata[sel];
        else             rd_q[b]           <= mem[req_row[sel]];
      end
    end
  end

  // Read return: CL cycles after the accept.
  for (genvar p = 0; p < 2; p++) begin : g_port
    logic          pend;
    logic [CW-1:0] pcnt;
    logic [BW-1:0] pbank;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pend <= 1'b0; pcnt <= '0; pbank <= '0; rvalid[p] <= 1'b0; rdata[p] <= '0;
      end else begin
        rvalid[p] <= 1'b0;
        if (gnt[p] && !req_we[p]) begin
          pend <= 1'b1; pcnt <= CW'(CL - 1); pbank <= req_bank[p];
        end else if (pend) begin
          pcnt <= pcnt - CW'(1);
          if (pcnt == CW'(1)) begin
            pend <= 1'b0; rvalid[p] <= 1'b1; rdata[p] <= rd_q[pbank];
          end
        end
      end
    end
  end
endmodule
