// nbdp_system: PC storage subsystem in the North Bridge Dual Port (NBDP) architecture.
//
// The SSD sits on the North Bridge through a DDR DRAM interface instead of behind the South
// Bridge's SATA controller, and it has a second, direct path to main memory. DMA commands from
// the host first pass the command packer, which pairs commands that touch different regions.
// The North Bridge DRAM controller hands the first command of a pair to DMA2 in the SSD and runs
// the second on its own DMA1, so two page transfers (for example the victim page written out
// and the missing page read in on a page fault) proceed at the same time: DMA1 over port A of
// the dual-port main memory and the DDR link, DMA2 over the direct path on port B. Inside the
// SSD the two transactions share a dual-port cache buffer and NAND channels through the cache
// buffer controller. Each DMA controller raises its own completion interrupt. As the document
// requires for data consistency, the next command leaves the packer only after both DMA
// controllers have finished: concurrency exists inside a packed pair, never between commands.
//
// Ports: cmd_* host DMA commands (held until cmd_ready); cpu_* CPU accesses to main memory
// through the North Bridge; irq_dma1/irq_dma2 completion interrupts (to the PC's interrupt
// controller, which is not part of this design); ev_* one-cycle or level monitoring strobes.
// The CPU, the operating system and the interrupt controller are outside.
module nbdp_system
  import ssd_pkg::*;
#(
  parameter int unsigned MM_NBANKS = 4,
  parameter int unsigned MM_ROWS   = 2048,
  parameter int unsigned CB_NBANKS = 4,
  parameter int unsigned CB_ROWS   = 256,
  parameter int unsigned CL        = 2,
  parameter int unsigned NCH       = 2,
  parameter int unsigned PAGES     = 4096,
  parameter int unsigned T_READ    = 25,
  parameter int unsigned T_PROG    = 100,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned TIMEOUT   = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  dma_cmd_t        cmd,
  output logic            cmd_ready,
  input  logic            cpu_valid,
  input  logic            cpu_we,
  input  logic [MA_W-1:0] cpu_addr,
  input  line_t           cpu_wdata,
  output logic            cpu_ready,
  output logic            cpu_rvalid,
  output line_t           cpu_rdata,
  output logic            irq_dma1,
  output logic            irq_dma2,
  output logic            dma1_busy,
  output logic            dma2_busy,
  output logic            ev_pack,
  output logic            ev_timeout,
  output logic            ev_incompat,
  output logic            ev_cpu_conflict,
  output logic            ev_mm_int_stall,
  output logic            ev_dqs_wait,
  output logic [1:0]      ev_hit,
  output logic [1:0]      ev_miss,
  output logic [1:0]      ev_cb_int_stall,
  output logic [1:0]      ev_ch_conflict
);
  localparam int unsigned MBW = $clog2(MM_NBANKS);
  localparam int unsigned MRW = $clog2(MM_ROWS);

  // command packing; the next (packed or single) command is handed over only when both DMA
  // controllers have finished the previous one
  logic     pk_valid, pk_pair, pk_ready, pk_go;
  dma_cmd_t pk_cmd0, pk_cmd1;
  assign pk_go = !dma1_busy && !dma2_busy;
  dma_cmd_packer #(.DEPTH(QDEPTH), .TIMEOUT(TIMEOUT)) u_packer (
    .clk, .rst_n, .in_valid(cmd_valid), .in_cmd(cmd), .in_ready(cmd_ready),
    .out_valid(pk_valid), .out_pair(pk_pair), .out_cmd0(pk_cmd0), .out_cmd1(pk_cmd1),
    .out_ready(pk_ready && pk_go), .ev_pack, .ev_timeout, .ev_incompat
  );

  // main memory, both ports
  logic [1:0]            mm_valid, mm_we, mm_ready, mm_rvalid;
  logic [1:0][MBW-1:0]   mm_bank;
  logic [1:0][MRW-1:0]   mm_row;
  line_t [1:0]           mm_wdata, mm_rdata;
  logic [1:0][MM_NBANKS-1:0] mm_int;

  dp_dram #(.NBANKS(MM_NBANKS), .ROWS(MM_ROWS), .CL(CL)) u_main_mem (
    .clk, .rst_n, .req_valid(mm_valid), .req_we(mm_we), .req_bank(mm_bank), .req_row(mm_row),
    .req_wdata(mm_wdata), .req_ready(mm_ready), .rvalid(mm_rvalid), .rdata(mm_rdata),
    .int_busy(mm_int)
  );

  // DDR link and DMA2 command sideband
  ddr_cmd_e              ddr_cmd;
  logic [LBA_W/2-1:0]    ddr_addr;
  logic [DW-1:0]         ddr_w_dq, ddr_r_dq;
  logic                  ddr_w_dqs, ddr_w_dqs_en, ddr_r_dqs, ddr_r_dqs_oe;
  logic                  d2_valid, d2_ready;
  dma_cmd_t              d2_cmd;
  logic                  nb_int_stall, ssd_mm_stall;

  nb_dram_ctrl #(.NBANKS(MM_NBANKS), .ROWS(MM_ROWS)) u_nb (
    .clk, .rst_n,
    .pk_valid(pk_valid && pk_go), .pk_pair, .pk_cmd0, .pk_cmd1, .pk_ready,
    .d2_valid, .d2_cmd, .d2_ready, .irq_dma1, .dma1_busy,
    .cpu_valid, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_ready, .cpu_rvalid, .cpu_rdata,
    .mem_valid(mm_valid[0]), .mem_we(mm_we[0]), .mem_bank(mm_bank[0]), .mem_row(mm_row[0]),
    .mem_wdata(mm_wdata[0]), .mem_ready(mm_ready[0]), .mem_rvalid(mm_rvalid[0]),
    .mem_rdata(mm_rdata[0]), .mem_int(mm_int[0]),
    .ddr_cmd, .ddr_addr, .ddr_w_dq, .ddr_w_dqs, .ddr_w_dqs_en,
    .ddr_r_dq, .ddr_r_dqs, .ddr_r_dqs_oe,
    .ev_cpu_conflict, .ev_int_stall(nb_int_stall), .ev_dqs_wait
  );

  dual_port_ssd #(
    .MM_NBANKS(MM_NBANKS), .MM_ROWS(MM_ROWS), .CB_NBANKS(CB_NBANKS), .CB_ROWS(CB_ROWS),
    .CL(CL), .NCH(NCH), .PAGES(PAGES), .T_READ(T_READ), .T_PROG(T_PROG)
  ) u_ssd (
    .clk, .rst_n,
    .ddr_cmd, .ddr_addr, .ddr_w_dq, .ddr_w_dqs, .ddr_w_dqs_en,
    .ddr_r_dq, .ddr_r_dqs, .ddr_r_dqs_oe,
    .d2_valid, .d2_cmd, .d2_ready, .irq_dma2, .dma2_busy,
    .mm_valid(mm_valid[1]), .mm_we(mm_we[1]), .mm_bank(mm_bank[1]), .mm_row(mm_row[1]),
    .mm_wdata(mm_wdata[1]), .mm_ready(mm_ready[1]), .mm_rvalid(mm_rvalid[1]),
    .mm_rdata(mm_rdata[1]), .mm_int(mm_int[1]),
    .ev_hit, .ev_miss, .ev_cb_int_stall, .ev_ch_conflict, .ev_mm_int_stall(ssd_mm_stall)
  );

  // an INT stall on main memory, seen from either side
  assign ev_mm_int_stall = nb_int_stall || ssd_mm_stall;
endmodule
