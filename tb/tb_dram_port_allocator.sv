// tb_dram_port_allocator: checks the INT gating of the DRAM Port Allocator against a reference
// computed in the testbench, over random requests, banks and INT patterns: a request reaches
// its own DRAM port only while INT for its bank is low, the stall flag marks exactly the
// held-back requests, and the accept comes back only for a request that went through.
module tb_dram_port_allocator;
  import ssd_pkg::*;
  localparam int unsigned NP = 2, NB = 4, ROWS = 64;
  logic clk = 0;
  logic [NP-1:0] c_valid, c_we, c_ready, stall, d_valid, d_we, d_ready;
  logic [NP-1:0][1:0] c_bank, d_bank;
  logic [NP-1:0][5:0] c_row, d_row;
  line_t [NP-1:0] c_wdata, d_wdata;
  logic [NP-1:0][NB-1:0] int_busy;
  int checks = 0, failures = 0;

  dram_port_allocator #(.NPORTS(NP), .NBANKS(NB), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nstall = 0;
  initial begin
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      for (int i = 0; i < NP; i++) begin
        c_valid[i] = 1'($urandom); c_we[i] = 1'($urandom); c_bank[i] = 2'($urandom);
        c_row[i] = 6'($urandom); c_wdata[i] = {4{$urandom}}; d_ready[i] = 1'($urandom);
        int_busy[i] = 4'($urandom);
      end
      #1;
      for (int i = 0; i < NP; i++) begin
        logic blocked;
        blocked = int_busy[i][c_bank[i]];
        chk(d_valid[i] == (c_valid[i] && !blocked), "request passes only when its bank is free");
        chk(stall[i] == (c_valid[i] && blocked), "stall marks a request held back by INT");
        chk(c_ready[i] == (c_valid[i] && !blocked && d_ready[i]), "accept only for a forwarded request");
        chk(d_bank[i] == c_bank[i] && d_row[i] == c_row[i] && d_we[i] == c_we[i] &&
            d_wdata[i] == c_wdata[i], "SSD port i drives DRAM port i");
        if (stall[i]) nstall++;
      end
    end
    chk(nstall > 0, "some requests were held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
