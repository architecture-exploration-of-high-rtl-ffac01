// flash_channel: one NAND flash channel (Flash I/F) together with the NAND pages behind it.
//
// A started operation reads or programs one line-sized page slot. The channel is busy for
// T_READ cycles on a read (array-to-register time plus transfer) and T_PROG cycles on a program,
// then pulses done; a read returns the page in rdata with done. The document only names the
// channel and says that NAND program latency is long and hidden by using several channels and
// ways; the latencies, the page size of one line and the single way per channel are this
// design's own choices, and the NAND storage is an array inside the channel.
//
// Interface: start (one cycle, only while !busy), we, page, wdata; busy; done (one cycle); rdata.
module flash_channel
  import ssd_pkg::*;
#(
  parameter int unsigned PAGES  = 4096,
  parameter int unsigned T_READ = 25,
  parameter int unsigned T_PROG = 100
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      we,
  input  logic [$clog2(PAGES)-1:0]  page,
  input  line_t                     wdata,
  output logic                      busy,
  output logic                      done,
  output line_t                     rdata
);
  localparam int unsigned TMAX = (T_PROG > T_READ) ? T_PROG : T_READ;
  localparam int unsigned CW   = $clog2(TMAX + 1);

  line_t         nand_array [PAGES];
  logic [CW-1:0] cnt;
  logic          op_we;
  logic [$clog2(PAGES)-1:0] op_page;
  line_t         op_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; op_we <= 1'b0; op_page <= '0; op_wdata <= '0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy     <= 1'b1;
        op_we    <= we;
        op_page  <= page;
        op_wdata <= wdata;
        cnt      <= we ? CW'(T_PROG) : CW'(T_READ);
      end else if (busy) begin
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (!op_we) rdata <= nand_array[op_page];
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (busy && cnt == CW'(1) && op_we) nand_array[op_page] <= op_wdata;

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (start) |-> (!busy))
    else $error("flash_channel: start while busy");
endmodule
