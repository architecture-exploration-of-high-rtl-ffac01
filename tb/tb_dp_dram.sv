// tb_dp_dram: dual-port DRAM test.
// Writes known lines through port A, reads them back through port B and checks the data and the
// CAS latency (rvalid exactly CL cycles after the accept). Then both ports access the same bank
// in one cycle: only one is accepted, the other sees INT high and is accepted when the bank is
// free (CL + BURST_CYC cycles later). Accesses to different banks are accepted together.
module tb_dp_dram;
  import ssd_pkg::*;
  localparam int unsigned NB = 4, ROWS = 16, CL = 2, BC = 2;
  logic clk = 0, rst_n = 0;
  logic [1:0] req_valid, req_we, req_ready, rvalid;
  logic [1:0][1:0] req_bank;
  logic [1:0][3:0] req_row;
  line_t [1:0] req_wdata, rdata;
  logic [1:0][NB-1:0] int_busy;
  int checks = 0, failures = 0;

  dp_dram #(.NBANKS(NB), .ROWS(ROWS), .CL(CL), .BURST_CYC(BC)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic line_t pat(int b, int r);
    return {4{32'(b * 1000 + r * 7 + 32'h5a000000)}} ^ LINE_W'(r);
  endfunction

  // one access on port p; returns read data and the cycles from accept to rvalid
  task automatic access(input int p, input logic we, input int b, input int r, input line_t wd,
                        output line_t rd, output int lat);
    req_valid[p] = 1; req_we[p] = we; req_bank[p] = 2'(b); req_row[p] = 4'(r); req_wdata[p] = wd;
    #1; while (!(req_ready[p] && !int_busy[p][b])) begin @(posedge clk); #1; end
    @(posedge clk); #1; req_valid[p] = 0;
    lat = 1; rd = '0;
    if (!we) begin
      while (!rvalid[p]) begin @(posedge clk); #1; lat++; end
      rd = rdata[p];
    end
  endtask

  line_t rd; int lat;
  initial begin
    req_valid = '0; req_we = '0; req_bank = '0; req_row = '0; req_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 4; r++) begin
        access(0, 1, b, r, pat(b, r), rd, lat);
        repeat (CL + BC) @(posedge clk); #1;
      end
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 4; r++) begin
        access(1, 0, b, r, '0, rd, lat);
        chk(rd == pat(b, r), "port B reads what port A wrote");
        chk(lat == CL, "read data after CAS latency");
        repeat (BC + 1) @(posedge clk); #1;
      end
    // same bank, same cycle
    req_valid = 2'b11; req_we = 2'b00; req_bank[0] = 2'd3; req_bank[1] = 2'd3;
    req_row[0] = 4'd1; req_row[1] = 4'd2; #1;
    chk(req_ready == 2'b01 || req_ready == 2'b10, "one port accepted on a bank conflict");
    begin
      int w, cyc;
      w = req_ready[0] ? 1 : 0;
      @(posedge clk); #1; req_valid[1-w] = 0;
      chk(int_busy[w][3] == 1, "waiting port sees INT high");
      cyc = 1;
      while (!req_ready[w]) begin @(posedge clk); #1; cyc++; end
      chk(cyc == CL + BC + 1, "waiting port accepted when the bank is released");
      chk(int_busy[w][3] == 0, "INT low when accepted");
      @(posedge clk); #1; req_valid = 0;
      repeat (CL + BC + 2) @(posedge clk); #1;
    end
    // different banks, same cycle
    req_valid = 2'b11; req_we = 2'b00; req_bank[0] = 2'd0; req_bank[1] = 2'd1;
    req_row[0] = 4'd2; req_row[1] = 4'd3; #1;
    chk(req_ready == 2'b11, "different banks accepted together");
    @(posedge clk); #1; req_valid = 0;
    repeat (CL - 1) @(posedge clk); #1;
    chk(rvalid == 2'b11, "both reads return together");
    chk(rdata[0] == pat(0, 2) && rdata[1] == pat(1, 3), "concurrent read data");
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
