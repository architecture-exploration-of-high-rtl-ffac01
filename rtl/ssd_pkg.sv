// ssd_pkg: types and constants shared by the NBDP storage subsystem.
//
// A "line" is the unit every block moves: one DRAM burst of BL words of DW bits (Fig. 5 of the
// dual-port DRAM shows bursts D0..D3, so BL = 4). Addresses in main memory, in the SSD cache
// buffer and in NAND are counted in lines. The word width, the address widths and the command
// format are this design's own choices; the burst length follows the timing diagrams.
package ssd_pkg;
  localparam int unsigned DW     = 32;        // data word on the DDR link
  localparam int unsigned BL     = 4;         // burst length (D0..D3)
  localparam int unsigned LINE_W = DW * BL;   // one burst = one line
  localparam int unsigned MA_W   = 16;        // main-memory line address
  localparam int unsigned LBA_W  = 16;        // SSD logical line address
  localparam int unsigned LEN_W  = 16;        // transfer length in lines

  typedef logic [LINE_W-1:0] line_t;

  // DMA WRITE moves main memory -> SSD, DMA READ moves SSD -> main memory (Sec. 3.2).
  typedef enum logic {DMA_WRITE = 1'b0, DMA_READ = 1'b1} dma_dir_e;

  typedef struct packed {
    dma_dir_e         dir;
    logic [MA_W-1:0]  mem_addr;  // first main-memory line
    logic [LBA_W-1:0] lba;       // first SSD line
    logic [LEN_W-1:0] nlines;    // number of lines, at least 1
  } dma_cmd_t;

  // Command bus of the SSD's DDR DRAM interface (row-active, read, write; Fig. 4).
  typedef enum logic [1:0] {DDR_NOP = 2'd0, DDR_ACT = 2'd1, DDR_RD = 2'd2, DDR_WR = 2'd3} ddr_cmd_e;

  // Two commands may be packed when neither their memory nor their SSD ranges overlap (Sec. 4.2.3).
  function automatic logic cmds_compatible(dma_cmd_t a, dma_cmd_t b);
    logic [MA_W:0]  a_me, b_me;
    logic [LBA_W:0] a_le, b_le;
    logic mem_apart, ssd_apart;
    a_me = {1'b0, a.mem_addr} + (MA_W+1)'(a.nlines);
    b_me = {1'b0, b.mem_addr} + (MA_W+1)'(b.nlines);
    a_le = {1'b0, a.lba} + (LBA_W+1)'(a.nlines);
    b_le = {1'b0, b.lba} + (LBA_W+1)'(b.nlines);
    mem_apart = (a_me <= {1'b0, b.mem_addr}) || (b_me <= {1'b0, a.mem_addr});
    ssd_apart = (a_le <= {1'b0, b.lba}) || (b_le <= {1'b0, a.lba});
    return mem_apart && ssd_apart;
  endfunction
endpackage
