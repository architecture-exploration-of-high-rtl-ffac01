// tb_dma_cmd_packer: command packing procedure.
// Checks: two compatible commands leave as one packed pair in order; a lone command leaves
// alone exactly TIMEOUT cycles after it became the only one waiting; an overlapping second
// command (same memory region, or same SSD region) makes the first leave alone, followed by the
// second; back-pressure holds the output stable; the queue refuses input when full.
module tb_dma_cmd_packer;
  import ssd_pkg::*;
  localparam int unsigned DEPTH = 4, TO = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_pair, out_ready, ev_pack, ev_timeout, ev_incompat;
  dma_cmd_t in_cmd, out_cmd0, out_cmd1;
  int checks = 0, failures = 0;

  dma_cmd_packer #(.DEPTH(DEPTH), .TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic dma_cmd_t mk(dma_dir_e d, int m, int l, int n);
    return '{dir: d, mem_addr: MA_W'(m), lba: LBA_W'(l), nlines: LEN_W'(n)};
  endfunction
  task automatic push(input dma_cmd_t c);
    in_valid = 1; in_cmd = c; #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1; in_valid = 0;
  endtask
  task automatic wait_out(output int cyc);
    cyc = 0; #1;
    while (!out_valid) begin @(posedge clk); #1; cyc++; end
  endtask

  dma_cmd_t a, b, c;
  int cyc;
  initial begin
    in_valid = 0; in_cmd = '0; out_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // 1. compatible pair (page fault: victim out, new page in, different regions)
    a = mk(DMA_WRITE, 0, 100, 8); b = mk(DMA_READ, 8, 200, 8);
    push(a); push(b);
    wait_out(cyc);
    chk(out_pair && out_cmd0 == a && out_cmd1 == b, "compatible commands packed in order");
    repeat (3) begin @(posedge clk); #1; chk(out_valid && out_pair && out_cmd0 == a, "output held under back-pressure"); end
    out_ready = 1; #1; chk(ev_pack, "pack event"); @(posedge clk); #1; out_ready = 0;
    chk(!out_valid, "queue empty after the pair");
    // 2. lone command: time-out
    push(a);
    wait_out(cyc);
    chk(!out_pair && out_cmd0 == a, "lone command issued alone");
    chk(cyc == TO, "issued TIMEOUT cycles after it was queued");
    out_ready = 1; #1; chk(ev_timeout, "time-out event"); @(posedge clk); #1; out_ready = 0;
    // 3. overlapping memory region
    a = mk(DMA_WRITE, 0, 100, 8); b = mk(DMA_READ, 4, 300, 8);
    push(a); push(b); wait_out(cyc);
    chk(!out_pair && out_cmd0 == a, "memory overlap: first alone");
    out_ready = 1; #1; chk(ev_incompat, "incompatible event"); @(posedge clk); #1; out_ready = 0;
    wait_out(cyc); chk(!out_pair && out_cmd0 == b && cyc == TO, "then the second, after the time-out");
    out_ready = 1; @(posedge clk); #1; out_ready = 0;
    // 4. overlapping SSD region
    a = mk(DMA_WRITE, 0, 100, 8); b = mk(DMA_READ, 50, 107, 2);
    push(a); push(b); wait_out(cyc);
    chk(!out_pair, "SSD overlap: not packed");
    out_ready = 1; @(posedge clk); #1;
    out_ready = 0; wait_out(cyc); chk(!out_pair && out_cmd0 == b, "second follows alone");
    out_ready = 1; @(posedge clk); #1; out_ready = 0;
    chk(!out_valid, "queue drained");
    // adjacent but disjoint ranges pack
    a = mk(DMA_WRITE, 0, 100, 8); b = mk(DMA_READ, 8, 108, 2);
    push(a); push(b); wait_out(cyc); chk(out_pair, "adjacent regions pack");
    // 5. full queue
    push(mk(DMA_READ, 100, 500, 1)); push(mk(DMA_READ, 110, 510, 1));
    in_valid = 1; in_cmd = c; #1; chk(!in_ready, "queue full refuses input"); in_valid = 0;
    out_ready = 1; @(posedge clk); @(posedge clk); #1;
    chk(!out_valid, "two pairs drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
