// tb_cache_hit_detector: random fills and lookups on both ports against a reference tag model
// kept in the testbench (direct-mapped, index = low address bits). Checks HIT0/HIT1 on every
// lookup, including misses on a filled index with a different tag.
module tb_cache_hit_detector;
  import ssd_pkg::*;
  localparam int unsigned LINES = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0][LBA_W-1:0] lookup_lba, upd_lba;
  logic [1:0] hit, upd_valid;
  int checks = 0, failures = 0;

  cache_hit_detector #(.NPORTS(2), .LINES(LINES)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic           ref_v [LINES];
  logic [LBA_W-1:0] ref_a [LINES];
  int nhit = 0, nmiss = 0;
  initial begin
    for (int i = 0; i < LINES; i++) begin ref_v[i] = 0; ref_a[i] = '0; end
    upd_valid = 0; upd_lba = '0; lookup_lba = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < 2; p++) lookup_lba[p] = LBA_W'($urandom_range(0, 63));
      #1;
      for (int p = 0; p < 2; p++) begin
        int ix;
        logic exp;
        ix = int'(lookup_lba[p]) % LINES;
        exp = ref_v[ix] && ref_a[ix] == lookup_lba[p];
        chk(hit[p] == exp, "hit matches the reference");
        if (exp) nhit++; else nmiss++;
      end
      // fills on different indices (independent transactions)
      upd_valid = 2'($urandom);
      upd_lba[0] = LBA_W'($urandom_range(0, 63));
      upd_lba[1] = LBA_W'($urandom_range(0, 63));
      if (upd_lba[0][3:0] == upd_lba[1][3:0]) upd_valid[1] = 0;
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++)
        if (upd_valid[p]) begin ref_v[int'(upd_lba[p]) % LINES] = 1; ref_a[int'(upd_lba[p]) % LINES] = upd_lba[p]; end
      upd_valid = 0;
    end
    chk(nhit > 100 && nmiss > 100, "both hits and misses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
