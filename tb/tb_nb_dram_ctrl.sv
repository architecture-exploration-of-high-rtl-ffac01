// tb_nb_dram_ctrl: North Bridge DRAM controller with a real dual-port main memory and, behind
// the DDR link, the SSD's DDR interface in front of a simple storage model.
// Checks: a single command runs on DMA1 only; of a packed pair the first command is handed to
// DMA2 (the d2 sideband) before DMA1 starts the second; DMA1 moves the data correctly in both
// directions over the DQS link; CPU accesses made while DMA1 runs are served (round-robin with
// DMA1) and return the right data; an access on port B to a bank DMA1 is using shows up as an
// INT stall on port A.
module tb_nb_dram_ctrl;
  import ssd_pkg::*;
  localparam int unsigned NB = 4, ROWS = 64;
  logic clk = 0, rst_n = 0;
  logic pk_valid, pk_pair, pk_ready, d2_valid, d2_ready, irq_dma1, dma1_busy;
  dma_cmd_t pk_cmd0, pk_cmd1, d2_cmd;
  logic cpu_valid, cpu_we, cpu_ready, cpu_rvalid; logic [MA_W-1:0] cpu_addr; line_t cpu_wdata, cpu_rdata;
  logic mem_valid, mem_we, mem_ready, mem_rvalid; logic [1:0] mem_bank; logic [5:0] mem_row;
  line_t mem_wdata, mem_rdata; logic [NB-1:0] mem_int;
  ddr_cmd_e ddr_cmd; logic [7:0] ddr_addr; logic [DW-1:0] ddr_w_dq, ddr_r_dq;
  logic ddr_w_dqs, ddr_w_dqs_en, ddr_r_dqs, ddr_r_dqs_oe;
  logic ev_cpu_conflict, ev_int_stall, ev_dqs_wait;
  int checks = 0, failures = 0;

  nb_dram_ctrl #(.NBANKS(NB), .ROWS(ROWS)) dut (.*);

  // main memory
  logic [1:0] rv, rw, rr, rval; logic [1:0][1:0] rb; logic [1:0][5:0] rrow;
  line_t [1:0] rwd, rrd; logic [1:0][NB-1:0] ib;
  assign rv[0] = mem_valid; assign rw[0] = mem_we; assign rb[0] = mem_bank; assign rrow[0] = mem_row;
  assign rwd[0] = mem_wdata; assign mem_ready = rr[0]; assign mem_rvalid = rval[0];
  assign mem_rdata = rrd[0]; assign mem_int = ib[0];
  dp_dram #(.NBANKS(NB), .ROWS(ROWS)) u_mem (.clk, .rst_n, .req_valid(rv), .req_we(rw),
    .req_bank(rb), .req_row(rrow), .req_wdata(rwd), .req_ready(rr), .rvalid(rval), .rdata(rrd),
    .int_busy(ib));

  // SSD: DDR interface plus storage model
  logic s_valid, s_we, s_ready, s_done; logic [LBA_W-1:0] s_lba; line_t s_wdata, s_rdata;
  ssd_ddr_slave u_ssd_if (.clk, .rst_n, .cmd(ddr_cmd), .addr(ddr_addr), .w_dq(ddr_w_dq),
    .w_dqs(ddr_w_dqs), .w_dqs_en(ddr_w_dqs_en), .r_dq(ddr_r_dq), .r_dqs(ddr_r_dqs),
    .r_dqs_oe(ddr_r_dqs_oe), .s_valid, .s_we, .s_lba, .s_wdata, .s_ready, .s_done, .s_rdata);
  line_t ssd [256];
  initial begin
    s_ready = 0; s_done = 0; s_rdata = '0;
    forever begin
      @(posedge clk); #1;
      if (s_valid) begin
        s_ready = 1; @(posedge clk); #1; s_ready = 0;
        repeat ($urandom_range(2, 20)) @(posedge clk); #1;
        if (s_we) ssd[s_lba[7:0]] = s_wdata; else s_rdata = ssd[s_lba[7:0]];
        s_done = 1; @(posedge clk); #1; s_done = 0;
      end
    end
  end
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask
  initial begin
    #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // DMA2 model: records the command and the time DMA1 was seen busy
  int n_d2 = 0, n_irq = 0, n_conf = 0, n_stall = 0, n_wait = 0;
  logic busy_at_d2;
  dma_cmd_t got_d2;
  initial begin
    d2_ready = 0;
    forever begin
      @(posedge clk); #1; d2_ready = 0;
      if (d2_valid) begin
        repeat (3) @(posedge clk); #1;
        busy_at_d2 = dma1_busy; got_d2 = d2_cmd; n_d2++;
        d2_ready = 1;
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (irq_dma1) n_irq++;
    if (ev_cpu_conflict) n_conf++;
    if (ev_int_stall) n_stall++;
    if (ev_dqs_wait) n_wait++;
  end

  task automatic cpu(input logic w, input int a, input line_t d, output line_t q);
    @(negedge clk);
    cpu_valid = 1; cpu_we = w; cpu_addr = MA_W'(a); cpu_wdata = d;
    #1; while (!cpu_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1; cpu_valid = 0; q = '0;
    if (!w) begin while (!cpu_rvalid) begin @(posedge clk); #1; end q = cpu_rdata; end
  endtask
  task automatic issue(input logic pair, input dma_cmd_t c0, input dma_cmd_t c1);
    @(negedge clk); while (!pk_ready) @(negedge clk);
    pk_valid = 1; pk_pair = pair; pk_cmd0 = c0; pk_cmd1 = c1;
    @(posedge clk); #1; pk_valid = 0;
  endtask
  task automatic wait_dma1();
    @(posedge clk); #1;
    while (dma1_busy || nb_busy()) begin @(posedge clk); #1; end
  endtask
  function automatic logic nb_busy(); return !pk_ready; endfunction

  function automatic line_t pat(int i); return {4{32'(i * 13 + 32'h77000000)}} ^ LINE_W'(i); endfunction
  line_t q;
  dma_cmd_t cA, cB;
  initial begin
    pk_valid = 0; pk_pair = 0; pk_cmd0 = '0; pk_cmd1 = '0;
    cpu_valid = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0;
    rv[1] = 0; rw[1] = 0; rb[1] = 0; rrow[1] = 0; rwd[1] = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 16; i++) cpu(1, i, pat(i), q);
    // single DMA WRITE of 16 lines, CPU reads in parallel
    cA = '{dir: DMA_WRITE, mem_addr: 16'd0, lba: 16'd20, nlines: 16'd16};
    issue(0, cA, cA);
    for (int i = 0; i < 16; i++) begin cpu(0, i, '0, q); chk(q == pat(i), "CPU read during DMA"); end
    wait_dma1();
    repeat (2) @(posedge clk);
    chk(n_d2 == 0, "single command not sent to DMA2");
    chk(n_irq == 1, "DMA1 interrupt");
    for (int i = 0; i < 16; i++) chk(ssd[20 + i] == pat(i), "DMA1 wrote the line to the SSD");
    // packed pair: first to DMA2, second (DMA READ) on DMA1
    cA = '{dir: DMA_WRITE, mem_addr: 16'd0, lba: 16'd100, nlines: 16'd4};
    cB = '{dir: DMA_READ, mem_addr: 16'd32, lba: 16'd20, nlines: 16'd16};
    issue(1, cA, cB);
    // while DMA1 works, hammer port B on the banks it uses
    fork
      wait_dma1();
      repeat (200) begin
        @(negedge clk); rv[1] = 1; rw[1] = 0; rb[1] = 2'($urandom); rrow[1] = 6'd60;
        @(posedge clk); #1; while (!rr[1]) begin @(posedge clk); #1; end
        rv[1] = 0;
      end
    join
    repeat (2) @(posedge clk);
    chk(n_d2 == 1 && got_d2 == cA, "first command of the pair handed to DMA2");
    chk(!busy_at_d2, "DMA1 starts only after DMA2 took its command");
    chk(n_irq == 2, "DMA1 interrupt for the second command");
    for (int i = 0; i < 16; i++) begin cpu(0, 32 + i, '0, q); chk(q == pat(i), "DMA1 read the line into memory"); end
    chk(n_conf > 0, "CPU and DMA1 competed for port A");
    chk(n_stall > 0, "port A waited on INT");
    chk(n_wait > 0, "DMA1 waited for DQS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
