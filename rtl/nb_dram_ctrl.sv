// nb_dram_ctrl: North Bridge DRAM controller of the NBDP architecture.
//
// It takes DMA commands from the command packer. A single command goes to DMA1, the DMA
// controller built into this DRAM controller. A packed pair is split as the document orders it:
// the first command is handed to DMA2 in the SSD (over the command sideband) and only then the
// second is started on DMA1, so that when the two touch one memory region the SSD's DMA gets
// there first. DMA1 reaches the SSD through the DQS-scheme DDR link (dqs_host_ctrl) and main
// memory through port A of the dual-port DRAM, obeying that port's INT lines. The CPU shares
// port A with DMA1; the two are served round-robin when both ask. DMA1 completion raises
// irq_dma1.
//
// Interface: pk_* packed command in (held until pk_ready); d2_* command to DMA2 (held until
// d2_ready); cpu_* CPU memory port; mem_* main-memory port A; ddr_* the SSD's DDR link.
// ev_cpu_conflict is high in each cycle both the CPU and DMA1 want port A; ev_int_stall when the
// selected request is held back by INT; ev_dqs_wait while waiting for the SSD's DQS.
// Port A read data reach the CPU and DMA1 on a shared bus (cpu_rdata is mem_rdata); each uses it
// only when its own read is answered.
module nb_dram_ctrl
  import ssd_pkg::*;
#(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned ROWS   = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // packed commands
  input  logic                       pk_valid,
  input  logic                       pk_pair,
  input  dma_cmd_t                   pk_cmd0,
  input  dma_cmd_t                   pk_cmd1,
  output logic                       pk_ready,
  // to DMA2 in the SSD
  output logic                       d2_valid,
  output dma_cmd_t                   d2_cmd,
  input  logic                       d2_ready,
  output logic                       irq_dma1,
  output logic                       dma1_busy,
  // CPU memory port
  input  logic                       cpu_valid,
  input  logic                       cpu_we,
  input  logic [MA_W-1:0]            cpu_addr,
  input  line_t                      cpu_wdata,
  output logic                       cpu_ready,
  output logic                       cpu_rvalid,
  output line_t                      cpu_rdata,
  // main memory port A
  output logic                       mem_valid,
  output logic                       mem_we,
  output logic [$clog2(NBANKS)-1:0]  mem_bank,
  output logic [$clog2(ROWS)-1:0]    mem_row,
  output line_t                      mem_wdata,
  input  logic                       mem_ready,
  input  logic                       mem_rvalid,
  input  line_t                      mem_rdata,
  input  logic [NBANKS-1:0]          mem_int,
  // DDR link to the SSD
  output ddr_cmd_e                   ddr_cmd,
  output logic [LBA_W/2-1:0]         ddr_addr,
  output logic [DW-1:0]              ddr_w_dq,
  output logic                       ddr_w_dqs,
  output logic                       ddr_w_dqs_en,
  input  logic [DW-1:0]              ddr_r_dq,
  input  logic                       ddr_r_dqs,
  input  logic                       ddr_r_dqs_oe,
  // monitoring
  output logic                       ev_cpu_conflict,
  output logic                       ev_int_stall,
  output logic                       ev_dqs_wait
);
  localparam int unsigned BW = $clog2(NBANKS);
  localparam int unsigned RW = $clog2(ROWS);

  // ---- command split ----
  typedef enum logic [1:0] {N_IDLE, N_D2, N_D1} nst_e;
  nst_e     nst;
  dma_cmd_t c0_q, c1_q;
  logic     d1_valid, d1_ready;

  assign pk_ready = (nst == N_IDLE);
  assign d2_valid = (nst == N_D2);
  assign d2_cmd   = c0_q;
  assign d1_valid = (nst == N_D1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nst <= N_IDLE; c0_q <= '0; c1_q <= '0;
    end else begin
      unique case (nst)
        N_IDLE: if (pk_valid) begin
          c0_q <= pk_cmd0;
          c1_q <= pk_pair ? pk_cmd1 : pk_cmd0;
          nst  <= pk_pair ? N_D2 : N_D1;
        end
        N_D2:   if (d2_ready) nst <= N_D1;
        N_D1:   if (d1_ready) nst <= N_IDLE;
        default: nst <= N_IDLE;
      endcase
    end
  end

  // ---- DMA1 ----
  logic              dm_valid, dm_we, dm_ready, dm_rvalid;
  logic [BW-1:0]     dm_bank;
  logic [RW-1:0]     dm_row;
  line_t             dm_wdata;
  logic              ds_valid, ds_we, ds_ready, ds_done;
  logic [LBA_W-1:0]  ds_lba;
  line_t             ds_wdata, ds_rdata;

  dma_engine #(.NBANKS(NBANKS), .ROWS(ROWS)) u_dma1 (
    .clk, .rst_n, .cmd_valid(d1_valid), .cmd(c1_q), .cmd_ready(d1_ready), .busy(dma1_busy),
    .irq(irq_dma1),
    .m_valid(dm_valid), .m_we(dm_we), .m_bank(dm_bank), .m_row(dm_row), .m_wdata(dm_wdata),
    .m_ready(dm_ready), .m_rvalid(dm_rvalid), .m_rdata(mem_rdata),
    .s_valid(ds_valid), .s_we(ds_we), .s_lba(ds_lba), .s_wdata(ds_wdata), .s_ready(ds_ready),
    .s_done(ds_done), .s_rdata(ds_rdata)
  );

  dqs_host_ctrl u_link (
    .clk, .rst_n, .c_valid(ds_valid), .c_we(ds_we), .c_lba(ds_lba), .c_wdata(ds_wdata),
    .c_ready(ds_ready), .c_done(ds_done), .c_rdata(ds_rdata), .dqs_wait(ev_dqs_wait),
    .cmd(ddr_cmd), .addr(ddr_addr), .w_dq(ddr_w_dq), .w_dqs(ddr_w_dqs), .w_dqs_en(ddr_w_dqs_en),
    .r_dq(ddr_r_dq), .r_dqs(ddr_r_dqs), .r_dqs_oe(ddr_r_dqs_oe)
  );

  // ---- CPU / DMA1 arbitration for port A ----
  logic          sel_cpu, rr_cpu_last, rd_owner_cpu;
  logic          a_valid, a_we, a_ready;
  logic [BW-1:0] a_bank;
  logic [RW-1:0] a_row;
  line_t         a_wdata;

  always_comb begin
    if (cpu_valid && dm_valid) sel_cpu = !rr_cpu_last;
    else                       sel_cpu = cpu_valid;
    a_valid = sel_cpu ? cpu_valid : dm_valid;
    a_we    = sel_cpu ? cpu_we : dm_we;
    a_bank  = sel_cpu ? cpu_addr[BW-1:0] : dm_bank;
    a_row   = sel_cpu ? RW'(cpu_addr >> BW) : dm_row;
    a_wdata = sel_cpu ? cpu_wdata : dm_wdata;
    cpu_ready = sel_cpu && a_ready;
    dm_ready  = !sel_cpu && a_ready;
    ev_cpu_conflict = cpu_valid && dm_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_cpu_last <= 1'b0; rd_owner_cpu <= 1'b0;
    end else if (a_ready) begin
      rr_cpu_last <= sel_cpu;
      if (!a_we) rd_owner_cpu <= sel_cpu;
    end
  end

  assign cpu_rvalid = mem_rvalid && rd_owner_cpu;
  assign cpu_rdata  = mem_rdata;
  assign dm_rvalid  = mem_rvalid && !rd_owner_cpu;

  // INT-aware front end of port A
  logic [0:0] pa_stall;
  dram_port_allocator #(.NPORTS(1), .NBANKS(NBANKS), .ROWS(ROWS)) u_porta (
    .c_valid(a_valid), .c_we(a_we), .c_bank(a_bank), .c_row(a_row), .c_wdata(a_wdata),
    .c_ready(a_ready), .stall(pa_stall),
    .d_valid(mem_valid), .d_we(mem_we), .d_bank(mem_bank), .d_row(mem_row), .d_wdata(mem_wdata),
    .d_ready(mem_ready), .int_busy(mem_int)
  );
  assign ev_int_stall = pa_stall[0];
endmodule
