// tb_channel_allocator: Channel Allocator test.
// Checks: requests for different channels are granted together; simultaneous requests for one
// channel are served one after the other, the port granted last going second; a request for a
// channel in use stays pending until the owner releases it; a grant is never given to two ports
// for one channel (checked every cycle during a random phase).
module tb_channel_allocator;
  localparam int unsigned NP = 2, NCH = 2;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] req, gnt, conflict;
  logic [NP-1:0][0:0] req_ch;
  int checks = 0, failures = 0;

  channel_allocator #(.NPORTS(NP), .NCH(NCH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int first_prev = -1;
  initial begin
    req = '0; req_ch = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // different channels
    req = 2'b11; req_ch[0] = 0; req_ch[1] = 1;
    @(posedge clk); #1;
    chk(gnt == 2'b11, "different channels granted together");
    req = 0; repeat (2) @(posedge clk); #1;
    // same channel, three rounds
    for (int round = 0; round < 3; round++) begin
      int first, hold;
      req = 2'b11; req_ch[0] = 1; req_ch[1] = 1;
      @(posedge clk); #1;
      chk(gnt == 2'b01 || gnt == 2'b10, "one owner per channel");
      chk(conflict != 2'b00, "the other port is pending");
      first = gnt[0] ? 0 : 1;
      if (first_prev >= 0) chk(first != 1 - first_prev, "round-robin: the port granted last yields");
      first_prev = first;
      hold = 3 + round;
      repeat (hold) begin @(posedge clk); #1; chk(gnt[first] && !gnt[1-first], "owner keeps the channel"); end
      req[first] = 0;
      @(posedge clk); #1;
      chk(!gnt[1-first], "pending until the release is registered");
      @(posedge clk); #1;
      chk(gnt[1-first], "pending port granted after the release");
      req = 0; @(posedge clk); #1; @(posedge clk); #1;
    end
    // random phase: never two owners of one channel
    for (int n = 0; n < 500; n++) begin
      req = 2'($urandom); req_ch[0] = 1'($urandom); req_ch[1] = 1'($urandom);
      @(posedge clk); #1;
      chk(!(gnt == 2'b11 && req_ch[0] == req_ch[1]), "exclusive channel ownership");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
