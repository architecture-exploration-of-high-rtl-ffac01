// tb_dma_engine: one DMA engine between a real dual-port DRAM (port A) and an SSD model with
// random latency. A DMA WRITE copies 20 lines from memory to the SSD; a DMA READ copies them back
// to another memory region. Checks: the data in the SSD model and in memory afterwards (read over
// port B), one interrupt per command, addresses advancing line by line, and that each SSD write
// is issued only after the previous one has completed (consecutive DMA WRITE). The DMA READ must
// be pipelined: the memory write of a line and the SSD request for the next line must be
// presented in the same cycle.
module tb_dma_engine;
  import ssd_pkg::*;
  localparam int unsigned NB = 4, ROWS = 64;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, busy, irq;
  dma_cmd_t cmd;
  logic m_valid, m_we, m_ready, m_rvalid;
  logic [1:0] m_bank; logic [5:0] m_row;
  line_t m_wdata, m_rdata;
  logic s_valid, s_we, s_ready, s_done;
  logic [LBA_W-1:0] s_lba;
  line_t s_wdata, s_rdata;
  int checks = 0, failures = 0;

  dma_engine #(.NBANKS(NB), .ROWS(ROWS)) dut (.*);

  // memory: port A to the DMA, port B to the testbench
  logic [1:0] rv, rw, rr, rval; logic [1:0][1:0] rb; logic [1:0][5:0] rrow;
  line_t [1:0] rwd, rrd; logic [1:0][NB-1:0] ib;
  assign rv[0] = m_valid; assign rw[0] = m_we; assign rb[0] = m_bank; assign rrow[0] = m_row;
  assign rwd[0] = m_wdata; assign m_ready = rr[0]; assign m_rvalid = rval[0]; assign m_rdata = rrd[0];
  dp_dram #(.NBANKS(NB), .ROWS(ROWS)) u_mem (.clk, .rst_n, .req_valid(rv), .req_we(rw),
    .req_bank(rb), .req_row(rrow), .req_wdata(rwd), .req_ready(rr), .rvalid(rval), .rdata(rrd),
    .int_busy(ib));
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // SSD model
  line_t ssd [256];
  logic  pend = 0;
  logic [7:0] a_lba; logic a_we; line_t a_wd;   // request as latched at the accept
  int    nirq = 0, expect_lba;
  always @(posedge clk) if (rst_n && irq) nirq++;
  int novl = 0, nsdone = 0, nmw = 0;
  always @(posedge clk) if (rst_n && m_valid && m_we && s_valid && !s_we) novl++;
  always @(posedge clk) if (rst_n && s_done) nsdone++;
  initial begin
    s_ready = 0; s_done = 0; s_rdata = '0;
    forever begin
      @(posedge clk); #1; s_ready = 0;
      if (s_valid) begin
        chk(!pend, "no new SSD request before the previous one completed");
        chk(int'(s_lba) == expect_lba, "SSD address advances by one line");
        expect_lba++;
        pend = 1; s_ready = 1; a_lba = s_lba[7:0]; a_we = s_we; a_wd = s_wdata;
        @(posedge clk); #1; s_ready = 0;
        repeat ($urandom_range(1, 9)) @(posedge clk); #1;
        if (a_we) ssd[a_lba] = a_wd; else s_rdata = ssd[a_lba];
        s_done = 1; @(posedge clk); #1; s_done = 0; pend = 0;
      end
    end
  end

  // testbench access through port B
  task automatic mem(input logic w, input int a, input line_t d, output line_t q);
    rv[1] = 1; rw[1] = w; rb[1] = 2'(a); rrow[1] = 6'(a >> 2); rwd[1] = d;
    #1; while (!rr[1]) begin @(posedge clk); #1; end
    @(posedge clk); #1; rv[1] = 0; q = '0;
    if (!w) begin while (!rval[1]) begin @(posedge clk); #1; end q = rrd[1]; end
    repeat (4) @(posedge clk); #1;
  endtask

  function automatic line_t pat(int i); return {4{32'(i * 977 + 32'hab000000)}} ^ LINE_W'(i); endfunction
  line_t q;
  time t0, t1;
  initial begin
    cmd_valid = 0; cmd = '0; rv[1] = 0; rw[1] = 0; rb[1] = 0; rrow[1] = 0; rwd[1] = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 20; i++) mem(1, 10 + i, pat(i), q);
    // DMA WRITE: memory 10.. -> SSD 100..
    expect_lba = 100;
    cmd = '{dir: DMA_WRITE, mem_addr: 16'd10, lba: 16'd100, nlines: 16'd20}; cmd_valid = 1;
    @(posedge clk); #1; cmd_valid = 0;
    while (busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    for (int i = 0; i < 20; i++) chk(ssd[100 + i] == pat(i), "DMA WRITE delivered the line");
    chk(nirq == 1, "one interrupt after DMA WRITE");
    // DMA READ: SSD 100.. -> memory 40..
    expect_lba = 100;
    cmd = '{dir: DMA_READ, mem_addr: 16'd40, lba: 16'd100, nlines: 16'd20}; cmd_valid = 1;
    @(posedge clk); #1; cmd_valid = 0;
    nsdone = 0; novl = 0; t0 = $time;
    while (busy) begin @(posedge clk); #1; end
    t1 = $time;
    chk(nsdone == 20, "DMA READ requested each line once");
    chk(novl >= 15, "DMA READ requests the next line while writing the current one");
    $display("DMA READ: %0d cycles, %0d cycles with a memory write and the next SSD read both requested", (t1 - t0) / 10, novl);
    @(posedge clk); #1;
    chk(nirq == 2, "one interrupt after DMA READ");
    for (int i = 0; i < 20; i++) begin mem(0, 40 + i, '0, q); chk(q == pat(i), "DMA READ stored the line"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
