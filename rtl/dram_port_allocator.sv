// dram_port_allocator: the DRAM Port Allocator between requesters and a dual-port DRAM.
//
// Requester i is tied to DRAM port i (in the SSD: SSD port 0 -> DRAM port 0, SSD port 1 -> DRAM
// port 1). A request is passed to the DRAM only while that port's INT line for the target bank
// is low; while it is high the other port is using the bank, and the request is held back until
// the Bank Arbiter drops INT. With NPORTS = 1 the same logic serves as the INT-aware front end of
// one memory controller (the document requires every controller on a dual-port DRAM to obey INT).
//
// Interface: c_* from the requesters (held until c_ready), d_* to the DRAM ports; stall[i] is
// high in each cycle a pending request is held back by INT.
// Timing: combinational, no added latency. Write flag, bank, row and data go straight through
// to the DRAM port; only the request valid and its accept are gated by INT.
module dram_port_allocator
  import ssd_pkg::*;
#(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned NBANKS = 4,
  parameter int unsigned ROWS   = 2048
) (
  input  logic [NPORTS-1:0]                      c_valid,
  input  logic [NPORTS-1:0]                      c_we,
  input  logic [NPORTS-1:0][$clog2(NBANKS)-1:0]  c_bank,
  input  logic [NPORTS-1:0][$clog2(ROWS)-1:0]    c_row,
  input  line_t [NPORTS-1:0]                     c_wdata,
  output logic [NPORTS-1:0]                      c_ready,
  output logic [NPORTS-1:0]                      stall,
  output logic [NPORTS-1:0]                      d_valid,
  output logic [NPORTS-1:0]                      d_we,
  output logic [NPORTS-1:0][$clog2(NBANKS)-1:0]  d_bank,
  output logic [NPORTS-1:0][$clog2(ROWS)-1:0]    d_row,
  output line_t [NPORTS-1:0]                     d_wdata,
  input  logic [NPORTS-1:0]                      d_ready,
  input  logic [NPORTS-1:0][NBANKS-1:0]          int_busy
);
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      stall[i]   = c_valid[i] && int_busy[i][c_bank[i]];
      d_valid[i] = c_valid[i] && !int_busy[i][c_bank[i]];
      d_we[i]    = c_we[i];
      d_bank[i]  = c_bank[i];
      d_row[i]   = c_row[i];
      d_wdata[i] = c_wdata[i];
      c_ready[i] = d_valid[i] && d_ready[i];
    end
  end
endmodule
