// tb_nbdp_system: end-to-end test of the NBDP storage subsystem at its default sizes.
//
// Line = 16 bytes, so a 16 KB page is PAGE = 1024 lines.
//   1. The CPU writes two pages of known data into main memory.
//   2. A lone DMA WRITE saves page 0 to the SSD (leaves the packer by time-out, runs on DMA1
//      over the DQS link).
//   3. Page fault: the victim page (page 1) is written out and page 0 is read back from the SSD
//      into a third memory page. The two commands are packed; DMA2 takes the victim write over
//      the direct path while DMA1 reads the new page over the DDR link. The CPU keeps reading
//      memory meanwhile. A third command, reading back the lines DMA2 is still writing, is
//      queued during the page fault: it must wait until both DMA controllers are done, and
//      then return the new data.
//   4. Two DMA READs into overlapping memory are queued: they must not be packed.
//   5. Two DMA READs of lines that are resident in the cache buffer, into different memory
//      regions, are packed: both SSD ports then hit at the same time and meet on the cache
//      buffer banks (INT stalls inside the SSD).
//   6. All results are read back by the CPU and compared with the data of step 1.
// Every mechanism is counted and must occur: packing, time-out, refused packing, both
// interrupts, cache hits and misses, INT stalls on both DRAMs, channel conflicts, CPU/DMA
// conflicts, DQS waits. The page fault must also finish faster than the same two transfers
// run one after the other (measured in step 2 for one page).
module tb_nbdp_system;
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
    #20ms; failures++; $display("watchdog expired");
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

  // commands never overlap except the two halves of one packed pair (DMA2 starts first)
  logic b1_q = 0, b2_q = 0; int since2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma2_busy && !b2_q) begin chk(!dma1_busy, "DMA2 starts only when DMA1 is idle"); since2 = 0; end
    else since2++;
    if (dma1_busy && !b1_q && dma2_busy) chk(since2 < 8, "DMA1 overlaps DMA2 only within one pair");
    b1_q <= dma1_busy; b2_q <= dma2_busy;
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
  longint t0, t_single, t_fault;
  initial begin
    cmd_valid = 0; cmd = '0; cpu_valid = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // 1
    for (int i = 0; i < 2 * PAGE; i++) cpu(1, i, pat(i), q);
    // 2: page 0 -> SSD lines 0..
    t0 = $time;
    send('{dir: DMA_WRITE, mem_addr: 16'd0, lba: 16'd0, nlines: 16'(PAGE)});
    wait_irqs(1, 0);
    t_single = ($time - t0) / 10;
    chk(n_to == 1, "lone command left by time-out");
    // 3: page fault, victim page 1 -> SSD lines 4096.., page 0 back -> memory 2*PAGE..
    t0 = $time;
    send('{dir: DMA_WRITE, mem_addr: 16'(PAGE), lba: 16'd4096, nlines: 16'(PAGE)});
    send('{dir: DMA_READ,  mem_addr: 16'(2 * PAGE), lba: 16'd0, nlines: 16'(PAGE)});
    fork
      begin wait_irqs(2, 1); t_fault = ($time - t0) / 10; end
      begin
        repeat (200) @(posedge clk);
        send('{dir: DMA_READ, mem_addr: 16'd6500, lba: 16'(4096 + PAGE - 16), nlines: 16'd16});
      end
      for (int i = 0; i < 200; i++) begin
        cpu(0, i, '0, q); chk(q == pat(i), "CPU reads memory during the page fault");
      end
    join
    wait_irqs(3, 1);
    for (int i = 0; i < 16; i++) begin cpu(0, 6500 + i, '0, q); chk(q == pat(2 * PAGE - 16 + i), "command queued behind a pair sees its data"); end
    chk(n_pack == 1, "page-fault commands packed");
    $display("one-page DMA WRITE: %0d cycles; page fault (write + read): %0d cycles", t_single, t_fault);
    chk(t_fault < 2 * t_single, "page fault runs both transfers concurrently");
    // 4: overlapping destinations: not packed, issued one by one
    send('{dir: DMA_READ, mem_addr: 16'd6000, lba: 16'd4096, nlines: 16'd16});
    send('{dir: DMA_READ, mem_addr: 16'd6008, lba: 16'd8,    nlines: 16'd16});
    wait_irqs(5, 1);
    chk(n_inc == 1, "overlapping commands not packed");
    chk(n_pack == 1, "no further packing");
    // 5: SSD lines 4096+j now hold page 1 line j (victim write, allocated in the cache)
    send('{dir: DMA_READ, mem_addr: 16'd7000, lba: 16'd4200, nlines: 16'd64});
    send('{dir: DMA_READ, mem_addr: 16'd7100, lba: 16'd4400, nlines: 16'd64});
    wait_irqs(6, 2);
    chk(n_pack == 2, "two hit reads packed");
    // 6
    for (int i = 0; i < 64; i++) begin cpu(0, 7000 + i, '0, q); chk(q == pat(PAGE + 104 + i), "packed read (DMA2)"); end
    for (int i = 0; i < 64; i++) begin cpu(0, 7100 + i, '0, q); chk(q == pat(PAGE + 304 + i), "packed read (DMA1)"); end
    for (int i = 0; i < PAGE; i++) begin cpu(0, 2 * PAGE + i, '0, q); chk(q == pat(i), "new page in memory"); end
    for (int i = 0; i < 8; i++)    begin cpu(0, 6000 + i, '0, q); chk(q == pat(PAGE + i), "first overlapping read"); end
    for (int i = 0; i < 16; i++)   begin cpu(0, 6008 + i, '0, q); chk(q == pat(8 + i), "second overlapping read wins"); end
    // every mechanism happened
    chk(n_pack > 0, "mechanism: command packing");
    chk(n_to > 0, "mechanism: packing time-out");
    chk(n_inc > 0, "mechanism: refused packing");
    chk(n_irq1 > 0 && n_irq2 > 0, "mechanism: both DMA interrupts");
    chk(n_hit > 0, "mechanism: cache hit");
    chk(n_miss > 0, "mechanism: cache miss");
    chk(n_cbs > 0, "mechanism: INT stall in the cache buffer");
    chk(n_mms > 0, "mechanism: INT stall in main memory");
    chk(n_chc > 0, "mechanism: channel conflict");
    chk(n_cc > 0, "mechanism: CPU/DMA conflict on port A");
    chk(n_dqs > 0, "mechanism: DQS wait");
    $display("pack=%0d timeout=%0d incompat=%0d irq1=%0d irq2=%0d hit=%0d miss=%0d cb_int=%0d mm_int=%0d ch_conf=%0d cpu_conf=%0d dqs_wait=%0d",
             n_pack, n_to, n_inc, n_irq1, n_irq2, n_hit, n_miss, n_cbs, n_mms, n_chc, n_cc, n_dqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
