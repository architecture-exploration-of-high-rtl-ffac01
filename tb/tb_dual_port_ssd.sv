// tb_dual_port_ssd: the dual-port SSD with both ports busy at once.
// Port 0 is driven over the DDR link by a host DQS controller; port 1 (DMA2) moves data over the
// direct path to a real dual-port main memory. Phase 1: the host writes 24 lines to SSD
// addresses 0.. while DMA2 copies 24 lines from memory into SSD addresses 64.. (DMA WRITE).
// Phase 2: the host reads back lines 64.. (written by DMA2) while DMA2 copies lines 0.. (written
// by the host) into memory (DMA READ). Checks all data, one DMA2 interrupt per command, and that
// the two ports really overlapped in time.
module tb_dual_port_ssd;
  import ssd_pkg::*;
  localparam int unsigned MNB = 4, MROWS = 64, CNB = 4, CROWS = 4, NCH = 2, PAGES = 128;
  logic clk = 0, rst_n = 0;
  ddr_cmd_e ddr_cmd; logic [7:0] ddr_addr; logic [DW-1:0] ddr_w_dq, ddr_r_dq;
  logic ddr_w_dqs, ddr_w_dqs_en, ddr_r_dqs, ddr_r_dqs_oe;
  logic d2_valid, d2_ready, irq_dma2, dma2_busy;
  dma_cmd_t d2_cmd;
  logic mm_valid, mm_we, mm_ready, mm_rvalid; logic [1:0] mm_bank; logic [5:0] mm_row;
  line_t mm_wdata, mm_rdata; logic [MNB-1:0] mm_int;
  logic [1:0] ev_hit, ev_miss, ev_cb_int_stall, ev_ch_conflict; logic ev_mm_int_stall;
  int checks = 0, failures = 0;

  dual_port_ssd #(.MM_NBANKS(MNB), .MM_ROWS(MROWS), .CB_NBANKS(CNB), .CB_ROWS(CROWS), .NCH(NCH),
    .PAGES(PAGES), .T_READ(10), .T_PROG(24)) dut (.*);

  // host-side DQS controller
  logic h_valid, h_we, h_ready, h_done, h_wait; logic [LBA_W-1:0] h_lba; line_t h_wdata, h_rdata;
  dqs_host_ctrl u_host (.clk, .rst_n, .c_valid(h_valid), .c_we(h_we), .c_lba(h_lba),
    .c_wdata(h_wdata), .c_ready(h_ready), .c_done(h_done), .c_rdata(h_rdata), .dqs_wait(h_wait),
    .cmd(ddr_cmd), .addr(ddr_addr), .w_dq(ddr_w_dq), .w_dqs(ddr_w_dqs), .w_dqs_en(ddr_w_dqs_en),
    .r_dq(ddr_r_dq), .r_dqs(ddr_r_dqs), .r_dqs_oe(ddr_r_dqs_oe));

  // main memory: port A testbench, port B the SSD's direct path
  logic [1:0] rv, rw, rr, rval; logic [1:0][1:0] rb; logic [1:0][5:0] rrow;
  line_t [1:0] rwd, rrd; logic [1:0][MNB-1:0] ib;
  assign rv[1] = mm_valid; assign rw[1] = mm_we; assign rb[1] = mm_bank; assign rrow[1] = mm_row;
  assign rwd[1] = mm_wdata; assign mm_ready = rr[1]; assign mm_rvalid = rval[1];
  assign mm_rdata = rrd[1]; assign mm_int = ib[1];
  dp_dram #(.NBANKS(MNB), .ROWS(MROWS)) u_mem (.clk, .rst_n, .req_valid(rv), .req_we(rw),
    .req_bank(rb), .req_row(rrow), .req_wdata(rwd), .req_ready(rr), .rvalid(rval), .rdata(rrd),
    .int_busy(ib));
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nirq = 0, overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (irq_dma2) nirq++;
    if (dma2_busy && (h_wait || ddr_r_dqs_oe || ddr_w_dqs_en)) overlap++;
  end

  task automatic mem(input logic w, input int a, input line_t d, output line_t q);
    @(negedge clk);
    rv[0] = 1; rw[0] = w; rb[0] = 2'(a); rrow[0] = 6'(a >> 2); rwd[0] = d;
    #1; while (!(rr[0])) begin @(posedge clk); #1; end
    @(posedge clk); #1; rv[0] = 0; q = '0;
    if (!w) begin while (!rval[0]) begin @(posedge clk); #1; end q = rrd[0]; end
  endtask
  task automatic host(input logic w, input int a, input line_t d, output line_t q);
    @(negedge clk);
    h_valid = 1; h_we = w; h_lba = LBA_W'(a); h_wdata = d;
    @(posedge clk); #1; h_valid = 0;
    while (!h_done) begin @(posedge clk); #1; end
    q = h_rdata;
  endtask
  task automatic dma2(input dma_cmd_t c);
    @(negedge clk); d2_valid = 1; d2_cmd = c;
    @(posedge clk); #1; while (!d2_ready) begin @(posedge clk); #1; end
    d2_valid = 0;
  endtask

  function automatic line_t hp(int i); return {4{32'(i + 32'h4e000000)}} ^ LINE_W'(i * 3); endfunction
  function automatic line_t mp(int i); return {4{32'(i * 5 + 32'h3d000000)}}; endfunction
  line_t q;
  initial begin
    h_valid = 0; h_we = 0; h_lba = '0; h_wdata = '0; d2_valid = 0; d2_cmd = '0;
    rv[0] = 0; rw[0] = 0; rb[0] = 0; rrow[0] = 0; rwd[0] = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 24; i++) mem(1, i, mp(i), q);
    // phase 1
    fork
      for (int i = 0; i < 24; i++) host(1, i, hp(i), q);
      begin
        dma2('{dir: DMA_WRITE, mem_addr: 16'd0, lba: 16'd64, nlines: 16'd24});
        @(posedge clk); while (dma2_busy) @(posedge clk);
      end
    join
    repeat (2) @(posedge clk);
    chk(nirq == 1, "DMA2 interrupt after its DMA WRITE");
    // phase 2
    fork
      for (int i = 0; i < 24; i++) begin host(0, 64 + i, '0, q); chk(q == mp(i), "host reads what DMA2 wrote"); end
      begin
        dma2('{dir: DMA_READ, mem_addr: 16'd32, lba: 16'd0, nlines: 16'd24});
        @(posedge clk); while (dma2_busy) @(posedge clk);
      end
    join
    repeat (2) @(posedge clk);
    chk(nirq == 2, "DMA2 interrupt after its DMA READ");
    for (int i = 0; i < 24; i++) begin mem(0, 32 + i, '0, q); chk(q == hp(i), "DMA2 read what the host wrote"); end
    chk(overlap > 0, "the two SSD ports worked concurrently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
