// tb_bank_arbiter: directed test of the dual-port DRAM bank arbiter.
// Checks: a lone request is granted at once; the bank is held for HOLD cycles with the other
// port's INT high; simultaneous requests for one bank alternate between the ports; requests for
// different banks are granted together; the waiting port is granted exactly when INT falls.
module tb_bank_arbiter;
  localparam int unsigned NB = 4, HOLD = 4;
  logic clk = 0, rst_n = 0;
  logic [1:0] req;
  logic [1:0][1:0] req_bank;
  logic [1:0] gnt, port_busy;
  logic [1:0][NB-1:0] int_busy;
  int checks = 0, failures = 0;

  bank_arbiter #(.NBANKS(NB), .HOLD(HOLD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // wait for a grant to port p, return the number of cycles waited
  task automatic wait_gnt(input int p, output int cyc);
    cyc = 0;
    while (!gnt[p]) begin @(posedge clk); #1; cyc++; end
  endtask

  int c0, c1;
  initial begin
    req = '0; req_bank = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // 1. lone request
    req[0] = 1; req_bank[0] = 2'd1; #0;
    #1 chk(gnt == 2'b01, "lone request granted in the same cycle");
    @(posedge clk); #1; req[0] = 0;
    for (int i = 0; i < HOLD; i++) begin
      chk(int_busy[1][1] && !int_busy[0][1], "INT of the other port high while bank held");
      chk(int_busy[1][0] == 0 && int_busy[1][2] == 0, "other banks not busy");
      @(posedge clk); #1;
    end
    chk(int_busy[1][1] == 0, "INT falls after HOLD cycles");
    // 2. simultaneous request for bank 2, twice: grants alternate, loser waits HOLD+1 cycles
    for (int round = 0; round < 2; round++) begin
      int first;
      req = 2'b11; req_bank[0] = 2'd2; req_bank[1] = 2'd2; #1;
      chk(gnt == 2'b01 || gnt == 2'b10, "only one port granted on a conflict");
      first = gnt[1] ? 1 : 0;
      chk(first == 1, "round-robin: the port that did not use the bank last wins");
      @(posedge clk); #1; req[first] = 0;
      chk(int_busy[1-first][2], "loser sees INT high");
      wait_gnt(1 - first, c1);
      chk(c1 == HOLD, "loser granted as soon as the bank is released");
      @(posedge clk); #1; req = 0;
      chk(int_busy[first][2], "INT of the first port high during the second access");
      repeat (HOLD) @(posedge clk); #1;
    end
    // 3. different banks together
    req = 2'b11; req_bank[0] = 2'd0; req_bank[1] = 2'd3; #1;
    chk(gnt == 2'b11, "different banks granted together");
    @(posedge clk); #1; req = 0;
    chk(int_busy[0][3] && int_busy[1][0], "each port sees the other's bank busy");
    // 4. a port that owns a bank gets no second grant
    req[0] = 1; req_bank[0] = 2'd1; #1;
    chk(gnt[0] == 0 && port_busy[0], "no second grant while the port is busy");
    wait_gnt(0, c0);
    chk(c0 == HOLD, "second request granted after the first access ends");
    @(posedge clk); #1; req = 0;
    repeat (HOLD + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
