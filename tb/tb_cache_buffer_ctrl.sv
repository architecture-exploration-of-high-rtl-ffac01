// tb_cache_buffer_ctrl: cache buffer controller with a real dual-port cache DRAM and two real
// NAND channels. Two independent processes drive SSD ports 0 and 1 at the same time, each on its
// own half of the cache indices (independent transactions), mixing channels and banks so that
// both ports collide on channels and on banks. A reference copy of the SSD contents is kept in
// the testbench. Checks: every read returns the last line written to that address; a read right
// after a write to the same line is a hit, a read after the line's cache slot was reused is a
// miss; a hit completes within a few cycles and a miss takes at least the NAND read time; hits,
// misses, INT stalls and channel conflicts all occur.
module tb_cache_buffer_ctrl;
  import ssd_pkg::*;
  localparam int unsigned NB = 4, ROWS = 4, NCH = 2, PAGES = 64, TR = 12, TP = 20, CL = 2;
  logic clk = 0, rst_n = 0;
  logic [1:0] s_valid, s_we, s_ready, s_done, s_hit;
  logic [1:0][LBA_W-1:0] s_lba;
  line_t [1:0] s_wdata, s_rdata;
  logic [1:0] m_valid, m_we, m_ready, m_rvalid;
  logic [1:0][1:0] m_bank; logic [1:0][1:0] m_row;
  line_t [1:0] m_wdata, m_rdata;
  logic [1:0][NB-1:0] m_int;
  logic [NCH-1:0] ch_start, ch_we, ch_done, ch_busy;
  logic [NCH-1:0][5:0] ch_page;
  line_t [NCH-1:0] ch_wdata, ch_rdata;
  logic [1:0] ev_hit, ev_miss, ev_int_stall, ev_ch_conflict;
  int checks = 0, failures = 0;

  cache_buffer_ctrl #(.NBANKS(NB), .ROWS(ROWS), .NCH(NCH), .PAGES(PAGES)) dut (.*);
  dp_dram #(.NBANKS(NB), .ROWS(ROWS), .CL(CL)) u_cache (.clk, .rst_n, .req_valid(m_valid),
    .req_we(m_we), .req_bank(m_bank), .req_row(m_row), .req_wdata(m_wdata), .req_ready(m_ready),
    .rvalid(m_rvalid), .rdata(m_rdata), .int_busy(m_int));
  for (genvar c = 0; c < NCH; c++) begin : g_ch
    flash_channel #(.PAGES(PAGES), .T_READ(TR), .T_PROG(TP)) u_ch (.clk, .rst_n,
      .start(ch_start[c]), .we(ch_we[c]), .page(ch_page[c]), .wdata(ch_wdata[c]),
      .busy(ch_busy[c]), .done(ch_done[c]), .rdata(ch_rdata[c]));
  end
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_hit = 0, n_miss = 0, n_stall = 0, n_conf = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += $countones(ev_hit); n_miss += $countones(ev_miss);
    n_stall += $countones(ev_int_stall); n_conf += $countones(ev_ch_conflict);
  end

  line_t ref_mem [128];
  bit    written [128];   // only lines written by the test are compared
  function automatic line_t pat(int a, int v); return {4{32'(a * 131 + v * 7919)}} ^ LINE_W'(v); endfunction

  task automatic op(input int p, input logic w, input int a, input line_t d,
                    output line_t rd, output logic hit, output int cyc);
    @(negedge clk);
    s_valid[p] = 1; s_we[p] = w; s_lba[p] = LBA_W'(a); s_wdata[p] = d;
    @(posedge clk); #1; s_valid[p] = 0; cyc = 1;
    while (!s_done[p]) begin @(posedge clk); #1; cyc++; end
    rd = s_rdata[p]; hit = s_hit[p];
  endtask

  // port p uses addresses whose cache index (a % 16) is in [8p, 8p+8)
  function automatic int addr_of(int p, int k); return (k / 8) * 16 + 8 * p + (k % 8); endfunction

  task automatic run_port(input int p);
    line_t rd; logic hit; int cyc;
    // write 16 lines (two per cache slot: the second evicts the first)
    for (int k = 0; k < 16; k++) begin
      int a; a = addr_of(p, k);
      ref_mem[a] = pat(a, 1); written[a] = 1;
      op(p, 1, a, pat(a, 1), rd, hit, cyc);
      chk(cyc >= TP, "a write is programmed to NAND");
    end
    // the second half is cached, the first half was evicted
    for (int k = 15; k >= 0; k--) begin
      int a; a = addr_of(p, k);
      op(p, 0, a, '0, rd, hit, cyc);
      chk(rd == ref_mem[a], "read returns the stored line");
      if (k >= 8) begin chk(hit, "recently written line hits"); chk(cyc <= 4 + CL + (CL + 4), "hit latency, at most one bank wait"); end
      else begin chk(!hit, "evicted line misses"); chk(cyc >= TR, "miss waits for NAND"); end
    end
    // random mix
    for (int n = 0; n < 60; n++) begin
      int a; logic w;
      a = addr_of(p, $urandom_range(0, 23)); w = 1'($urandom_range(0, 2) == 0);
      if (w) begin ref_mem[a] = pat(a, n + 2); written[a] = 1; op(p, 1, a, ref_mem[a], rd, hit, cyc); end
      else begin op(p, 0, a, '0, rd, hit, cyc); if (written[a]) chk(rd == ref_mem[a], "random read data"); end
    end
  endtask

  initial begin
    s_valid = 0; s_we = 0; s_lba = '0; s_wdata = '0;
    for (int i = 0; i < 128; i++) written[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    fork run_port(0); run_port(1); join
    chk(n_hit > 0, "hits occurred");
    chk(n_miss > 0, "misses occurred");
    chk(n_stall > 0, "INT stalls occurred");
    chk(n_conf > 0, "channel conflicts occurred");
    $display("hits=%0d misses=%0d int_stalls=%0d ch_conflicts=%0d", n_hit, n_miss, n_stall, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
