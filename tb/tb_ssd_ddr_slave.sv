// tb_ssd_ddr_slave: the SSD's DDR interface driven by a host model in the testbench, with a
// cache-controller model behind it that answers after a random delay. Checks: the logical line
// address assembled from row-active and column commands; write data collected from the strobed
// beats; DQS idle (not driven) while the request is outstanding; then a one-cycle preamble with
// DQS low, and BL words with DQS toggling 1,0,1,0 for reads, or a single DQS pulse for writes.
module tb_ssd_ddr_slave;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  ddr_cmd_e cmd;
  logic [LBA_W/2-1:0] addr;
  logic [DW-1:0] w_dq, r_dq;
  logic w_dqs, w_dqs_en, r_dqs, r_dqs_oe;
  logic s_valid, s_we, s_ready, s_done;
  logic [LBA_W-1:0] s_lba;
  line_t s_wdata, s_rdata;
  int checks = 0, failures = 0;

  ssd_ddr_slave dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // cache buffer controller model
  line_t store [256];
  int    dly;
  logic  outstanding = 0;
  initial begin
    s_ready = 0; s_done = 0; s_rdata = '0;
    forever begin
      @(posedge clk); #1;
      s_ready = 0; s_done = 0;
      if (s_valid && !outstanding) begin
        logic [LBA_W-1:0] a; logic w; line_t d;
        a = s_lba; w = s_we; d = s_wdata;
        s_ready = 1; outstanding = 1;
        @(posedge clk); #1; s_ready = 0;
        repeat (dly) begin @(posedge clk); #1; chk(!r_dqs_oe, "DQS not driven while busy"); end
        if (w) store[a[7:0]] = d;
        s_rdata = store[a[7:0]]; s_done = 1;
        @(posedge clk); #1; s_done = 0; outstanding = 0;
      end
    end
  end

  task automatic host(input logic w, input logic [15:0] a, input line_t d, input int delay, output line_t rd);
    int t;
    dly = delay;
    cmd = DDR_ACT; addr = a[15:8]; @(posedge clk); #1;
    cmd = w ? DDR_WR : DDR_RD; addr = a[7:0]; @(posedge clk); #1;
    cmd = DDR_NOP;
    if (w) for (int k = 0; k < BL; k++) begin
      w_dqs_en = 1; w_dqs = ~k[0]; w_dq = d[k*DW +: DW]; @(posedge clk); #1;
    end
    w_dqs_en = 0; w_dqs = 0;
    t = 0;
    while (!r_dqs_oe) begin @(posedge clk); #1; t++; end
    chk(r_dqs == 0, "preamble drives DQS low");
    chk(s_lba == a, "line address from row and column");
    rd = '0;
    if (w) begin
      @(posedge clk); #1; chk(r_dqs_oe && r_dqs, "write acknowledge pulse");
    end else for (int k = 0; k < BL; k++) begin
      @(posedge clk); #1;
      chk(r_dqs_oe && r_dqs == ~k[0], "DQS toggles with each word");
      rd[k*DW +: DW] = r_dq;
    end
    @(posedge clk); #1; chk(!r_dqs_oe, "DQS released after the burst");
    chk(t >= delay, "no data before the SSD is ready");
  endtask

  line_t rd;
  initial begin
    cmd = DDR_NOP; addr = '0; w_dq = '0; w_dqs = 0; w_dqs_en = 0; dly = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 5; i++) host(1, 16'h1200 + 16'(i), {4{32'(i + 32'h1000)}} + LINE_W'(i), 3 + i, rd);
    chk(store[8'h02] == ({4{32'(2 + 32'h1000)}} + LINE_W'(2)), "write data collected from the beats");
    for (int i = 0; i < 5; i++) begin
      host(0, 16'h1200 + 16'(i), '0, (i % 2) ? 30 : 1, rd);
      chk(rd == ({4{32'(i + 32'h1000)}} + LINE_W'(i)), "read burst carries the line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
