// tb_dqs_host_ctrl: host-side DQS controller against an SSD model in the testbench.
// The model answers each read after a random delay (short for a cache hit, long for a miss),
// with a preamble and four DQS-strobed words, and acknowledges writes the same way. Checks: the
// command sequence ACT(row) then RD/WR(col); write beats with a toggling strobe; the captured
// read line; completion exactly 1 + BL cycles after the preamble whatever the delay; dqs_wait
// high for exactly the delay.
module tb_dqs_host_ctrl;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic c_valid, c_we, c_ready, c_done, dqs_wait;
  logic [LBA_W-1:0] c_lba;
  line_t c_wdata, c_rdata;
  ddr_cmd_e cmd;
  logic [LBA_W/2-1:0] addr;
  logic [DW-1:0] w_dq, r_dq;
  logic w_dqs, w_dqs_en, r_dqs, r_dqs_oe;
  int checks = 0, failures = 0;

  dqs_host_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- SSD model ----
  line_t store [256];
  int    delay_q;
  logic [LBA_W/2-1:0] row_m;
  initial begin
    r_dq = '0; r_dqs = 0; r_dqs_oe = 0;
    forever begin
      @(posedge clk); #1;
      if (cmd == DDR_ACT) row_m = addr;
      else if (cmd == DDR_RD || cmd == DDR_WR) begin
        logic [LBA_W-1:0] a;
        logic w;
        line_t l;
        a = {row_m, addr}; w = (cmd == DDR_WR);
        if (w) begin
          for (int k = 0; k < BL; k++) begin
            @(posedge clk); #1;
            chk(w_dqs_en && w_dqs == ~k[0], "write beat strobe");
            l[k*DW +: DW] = w_dq;
          end
          store[a[7:0]] = l;
        end
        repeat (delay_q) @(posedge clk);
        #1 r_dqs_oe = 1; r_dqs = 0;
        if (w) begin @(posedge clk); #1 r_dqs = 1; end
        else for (int k = 0; k < BL; k++) begin
          @(posedge clk); #1 r_dqs = ~k[0]; r_dq = store[a[7:0]][k*DW +: DW];
        end
        @(posedge clk); #1 r_dqs_oe = 0; r_dqs = 0; r_dq = '0;
      end
    end
  end

  int waitc;
  always @(posedge clk) if (rst_n && dqs_wait) waitc++;

  task automatic xfer(input logic w, input int a, input line_t d, input int dly, output line_t rd);
    int cyc;
    delay_q = dly; waitc = 0;
    c_valid = 1; c_we = w; c_lba = LBA_W'(a); c_wdata = d;
    @(posedge clk); #1; c_valid = 0;
    chk(cmd == DDR_ACT && addr == 8'(a >> 8), "row-active with the upper address");
    @(posedge clk); #1;
    chk(cmd == (w ? DDR_WR : DDR_RD) && addr == 8'(a), "column command with the lower address");
    cyc = 0;
    while (!c_done) begin @(posedge clk); #1; cyc++; end
    rd = c_rdata;
    // after the command: BL write beats (writes), the delay, the preamble, then BL beats or one ack
    chk(cyc == (w ? BL : 0) + dly + 1 + (w ? 1 : BL) + 1, "completion time follows DQS, not a fixed latency");
    chk(waitc == dly - 1, "dqs_wait counts the busy time (model delay counts the command edge)");

  endtask

  line_t rd;
  initial begin
    c_valid = 0; c_we = 0; c_lba = '0; c_wdata = '0; delay_q = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int i = 0; i < 6; i++) xfer(1, 16'h0300 + i, {4{32'(i * 11 + 1)}} ^ LINE_W'(i << 70), 2, rd);
    for (int i = 0; i < 6; i++) begin
      int dly;
      dly = (i % 2) ? 40 : 3;            // miss-like, hit-like
      xfer(0, 16'h0300 + i, '0, dly, rd);
      chk(rd == ({4{32'(i * 11 + 1)}} ^ LINE_W'(i << 70)), "read returns the written line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
