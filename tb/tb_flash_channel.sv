// tb_flash_channel: programs lines into a NAND channel and reads them back, checking the data
// and that a read takes T_READ cycles and a program T_PROG cycles from start to done.
module tb_flash_channel;
  import ssd_pkg::*;
  localparam int unsigned PAGES = 64, TR = 7, TP = 19;
  logic clk = 0, rst_n = 0;
  logic start, we, busy, done;
  logic [5:0] page;
  line_t wdata, rdata;
  int checks = 0, failures = 0;

  flash_channel #(.PAGES(PAGES), .T_READ(TR), .T_PROG(TP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic op(input logic w, input int pg, input line_t d, output int cyc);
    start = 1; we = w; page = 6'(pg); wdata = d;
    @(posedge clk); #1; start = 0; cyc = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
  endtask

  function automatic line_t pat(int p); return {4{32'(p * 3 + 32'hc0de0000)}}; endfunction
  int cyc;
  initial begin
    start = 0; we = 0; page = 0; wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int p = 0; p < 8; p++) begin
      op(1, p * 5, pat(p), cyc);
      chk(cyc == TP, "program latency");
    end
    for (int p = 7; p >= 0; p--) begin
      op(0, p * 5, '0, cyc);
      chk(cyc == TR, "read latency");
      chk(rdata == pat(p), "read returns programmed data");
    end
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
