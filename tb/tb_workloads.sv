// tb_workloads: the transfers the architecture is evaluated with, run on the top at its
// default parameters (16-byte lines, so 64 KB = 4096 lines and 16 KB = 1024 lines).
//   1. 64 KB DMA WRITE from main memory to the SSD.
//   2. 64 KB DMA READ back: larger than the 16 KB cache buffer, every line misses.
//   3. 16 KB DMA READ of lines resident in the cache buffer: every line hits.
//   4. Network download: two 16 KB packets arrive in memory and are stored to the SSD as one
//      packed pair, DMA1 and DMA2 working at the same time.
// Data are checked after every step, hit and miss counts are exact, and the cycle counts are
// printed. The page-fault workload is part of the end-to-end test of the top. The operating
// system's traces cannot be reproduced here; the LAN controller is replaced by CPU writes.
module tb_workloads;
  import ssd_pkg::*;
  localparam int PAGE = 1024;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  dma_cmd_t cmd;
  logic cpu_valid, cpu_we, cpu_ready, cpu_rvalid;
  logic [MA_W-1:0] cpu_addr;
  line_t cpu_wdata, cpu_rdata;
  logic irq_dma1, irq_dma2, dma1_busy, dma2_busy;
  logic ev_pack, ev_timeout, ev_incompat, ev_cpu_conflict, ev_mm_int_stall, ev_dqs_wait;
  logic [1:0] ev_hit, ev_miss, ev_cb_int_stall, ev_ch_conflict;
  int checks = 0, failures = 0;

  nbdp_system dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #60ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_pack = 0, n_to = 0, n_inc = 0, n_cc = 0, n_mms = 0, n_dqs = 0, n_irq1 = 0, n_irq2 = 0;
  int n_hit = 0, n_miss = 0, n_cbs = 0, n_chc = 0;
  always @(posedge clk) if (rst_n) begin
    n_pack += int'(ev_pack); n_to += int'(ev_timeout); n_inc += int'(ev_incompat);
    n_cc += int'(ev_cpu_conflict); n_mms += int'(ev_mm_int_stall); n_dqs += int'(ev_dqs_wait);
    n_irq1 += int'(irq_dma1); n_irq2 += int'(irq_dma2);
    n_hit += $countones(ev_hit); n_miss += $countones(ev_miss);
    n_cbs += $countones(ev_cb_int_stall); n_chc += $countones(ev_ch_conflict);
  end

  function automatic line_t pat(int i); return {32'(i), 32'(~i), 32'(i * 40503), 32'hfeed0000 ^ 32'(i)}; endfunction

  task automatic cpu(input logic w, input int a, input line_t d, output line_t q);
    @(negedge clk);
    cpu_valid = 1; cpu_we = w; cpu_addr = MA_W'(a); cpu_wdata = d;
    #1; while (!cpu_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1; cpu_valid = 0; q = '0;
    if (!w) begin while (!cpu_rvalid) begin @(posedge clk); #1; end q = cpu_rdata; end
  endtask
  task automatic send(input dma_cmd_t c);
    @(negedge clk); cmd_valid = 1; cmd = c;
    #1; while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1; cmd_valid = 0;
  endtask
  task automatic wait_irqs(input int i1, input int i2);
    while (n_irq1 < i1 || n_irq2 < i2) @(posedge clk);
    @(posedge clk); #1;
  endtask

  line_t q;
  longint t0, t_w64, t_rmiss, t_rhit, t_net;
  int h0, m0, p0;
  initial begin
    cmd_valid = 0; cmd = '0; cpu_valid = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 4 * PAGE; i++) cpu(1, i, pat(i), q);
    // 1: 64 KB DMA WRITE, memory 0.. -> SSD lines 0..
    t0 = $time;
    send('{dir: DMA_WRITE, mem_addr: 16'd0, lba: 16'd0, nlines: 16'(4 * PAGE)});
    wait_irqs(1, 0);
    t_w64 = ($time - t0) / 10;
    // 2: 64 KB DMA READ back into memory 4*PAGE..; the 1024-line cache buffer cannot hold it,
    //    and reading from the start evicts what the write left behind: every line misses
    h0 = n_hit; m0 = n_miss; t0 = $time;
    send('{dir: DMA_READ, mem_addr: 16'(4 * PAGE), lba: 16'd0, nlines: 16'(4 * PAGE)});
    wait_irqs(2, 0);
    t_rmiss = ($time - t0) / 10;
    chk(n_miss - m0 == 4 * PAGE, "64 KB DMA READ: every line misses");
    chk(n_hit == h0, "64 KB DMA READ: no hit");
    for (int i = 0; i < 4 * PAGE; i++) begin cpu(0, 4 * PAGE + i, '0, q); chk(q == pat(i), "64 KB DMA READ data"); end
    // 3: 16 KB DMA READ of the last lines read, all resident: every line hits
    h0 = n_hit; m0 = n_miss; t0 = $time;
    send('{dir: DMA_READ, mem_addr: 16'd0, lba: 16'(3 * PAGE), nlines: 16'(PAGE)});
    wait_irqs(3, 0);
    t_rhit = ($time - t0) / 10;
    chk(n_hit - h0 == PAGE, "16 KB DMA READ: every line hits");
    chk(n_miss == m0, "16 KB DMA READ: no miss");
    for (int i = 0; i < PAGE; i++) begin cpu(0, i, '0, q); chk(q == pat(3 * PAGE + i), "16 KB hit read data"); end
    chk(t_rhit * 4 < t_rmiss, "hit read per line faster than miss read");
    // 4: network download: two 16 KB packets land in memory (CPU port stands in for the LAN
    //    controller) and are stored to the SSD; different regions, so they are packed
    for (int i = 0; i < 2 * PAGE; i++) cpu(1, PAGE + i, ~pat(i), q);
    p0 = n_pack; t0 = $time;
    send('{dir: DMA_WRITE, mem_addr: 16'(PAGE),     lba: 16'd5000, nlines: 16'(PAGE)});
    send('{dir: DMA_WRITE, mem_addr: 16'(2 * PAGE), lba: 16'd6100, nlines: 16'(PAGE)});
    wait_irqs(4, 1);
    t_net = ($time - t0) / 10;
    chk(n_pack == p0 + 1, "download packets packed");
    chk(t_net * 4 < t_w64 * 3, "two packets stored concurrently (less than 3/4 of the 64 KB write time)");
    // read the tails of both packets back from the SSD
    send('{dir: DMA_READ, mem_addr: 16'd7000, lba: 16'(5000 + PAGE - 16), nlines: 16'd16});
    wait_irqs(5, 1);
    send('{dir: DMA_READ, mem_addr: 16'd7100, lba: 16'(6100 + PAGE - 16), nlines: 16'd16});
    wait_irqs(6, 1);
    for (int i = 0; i < 16; i++) begin cpu(0, 7000 + i, '0, q); chk(q == ~pat(PAGE - 16 + i), "packet 1 stored"); end
    for (int i = 0; i < 16; i++) begin cpu(0, 7100 + i, '0, q); chk(q == ~pat(2 * PAGE - 16 + i), "packet 2 stored"); end
    $display("64 KB DMA WRITE %0d cycles (%0d per line); 64 KB DMA READ, all miss %0d cycles (%0d per line)",
             t_w64, t_w64 / (4 * PAGE), t_rmiss, t_rmiss / (4 * PAGE));
    $display("16 KB DMA READ, all hit %0d cycles (%0d per line); download of two 16 KB packets %0d cycles",
             t_rhit, t_rhit / PAGE, t_net);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
