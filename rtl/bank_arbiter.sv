// bank_arbiter: the Bank Arbiter of a dual-port DRAM.
//
// Each bank can be used by one of the two ports at a time. A port that asks for a free bank gets
// it at once; when both ports ask for the same free bank in the same cycle, the grant alternates
// between them (round-robin per bank), as the document specifies. A granted bank stays owned for
// HOLD cycles (CAS latency plus the burst). While port p owns bank b, the INT line of the other
// port for bank b is high ("busy"); it falls when the access is over, and the waiting port may
// then take the bank. Different banks are used by the two ports independently.
//
// Interface: req[p] with req_bank[p] (held by the requester until gnt[p]); gnt[p] is a one-cycle
// grant in the cycle the request is taken; int_busy[p][b] as above. A port that still owns a
// bank is not granted another (port_busy).
// Timing: grant in the request cycle when free; INT of the other port rises the next cycle.
// The document's INT polarity: Sec. 4.2.1 and Fig. 5 (HIGH = busy) are followed; one sentence of
// Sec. 4.2.2 calls "1" the ready state.
module bank_arbiter #(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned HOLD   = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [1:0]                           req,
  input  logic [1:0][$clog2(NBANKS)-1:0]       req_bank,
  output logic [1:0]                           gnt,
  output logic [1:0]                           port_busy,
  output logic [1:0][NBANKS-1:0]               int_busy
);
  localparam int unsigned BW = $clog2(NBANKS);
  localparam int unsigned CW = $clog2(HOLD + 1);

  logic [NBANKS-1:0]         own_v;
  logic [NBANKS-1:0]         own_p;    // owning port
  logic [NBANKS-1:0]         rr_last;  // port granted last on this bank
  logic [NBANKS-1:0][CW-1:0] cnt;

  logic [1:0] rq;
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      port_busy[p] = 1'b0;
      for (int b = 0; b < NBANKS; b++)
        if (own_v[b] && own_p[b] == p[0]) port_busy[p] = 1'b1;
      rq[p] = req[p] && !port_busy[p];
    end
  end

  // Per-bank grant decision.
  logic [NBANKS-1:0][1:0] bgnt;
  always_comb begin
    gnt = '0;
    for (int b = 0; b < NBANKS; b++) begin
      logic r0, r1;
      r0 = rq[0] && req_bank[0] == BW'(b);
      r1 = rq[1] && req_bank[1] == BW'(b);
      bgnt[b] = 2'b00;
      if (!own_v[b]) begin
        if (r0 && r1) bgnt[b] = rr_last[b] ? 2'b01 : 2'b10;
        else          bgnt[b] = {r1, r0};
      end
      gnt |= bgnt[b];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v <= '0; own_p <= '0; rr_last <= '0; cnt <= '0;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        if (own_v[b]) begin
          if (cnt[b] == CW'(1)) own_v[b] <= 1'b0;
          cnt[b] <= cnt[b] - CW'(1);
        end else if (bgnt[b] != 2'b00) begin
          own_v[b]   <= 1'b1;
          own_p[b]   <= bgnt[b][1];
          rr_last[b] <= bgnt[b][1];
          cnt[b]     <= CW'(HOLD);
        end
      end
    end
  end

  always_comb
    for (int p = 0; p < 2; p++)
      for (int b = 0; b < NBANKS; b++)
        int_busy[p][b] = own_v[b] && (own_p[b] != p[0]);

  // A grant goes to at most one port per bank.
  a_one_grant_per_bank: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt == 2'b11) |-> (req_bank[0] != req_bank[1]))
    else $error("bank_arbiter: both ports granted the same bank");
endmodule
