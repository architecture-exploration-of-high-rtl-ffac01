// dma_cmd_packer: DMA command packing in front of the North Bridge DRAM controller.
//
// Commands enter a small queue. Following the document's flowchart: when a first command is
// queued, the packer looks for a second one. If a second command is there and the two touch
// different main-memory and SSD regions, both leave together as one packed command, which the
// dual-port SSD architecture can run on its two paths at once. If the second command overlaps
// the first, the first leaves alone, to keep the data consistent. If no second command arrives
// within TIMEOUT cycles, the first leaves alone. In the document this is an operating-system
// procedure; here it is built as hardware so that the whole command path can be simulated.
//
// Interface: in_valid/in_cmd held until in_ready; out_valid with out_pair, out_cmd0 (first
// command), out_cmd1 (second, valid when out_pair) held until out_ready. ev_pack/ev_timeout/
// ev_incompat are one-cycle strobes telling why a command left.
module dma_cmd_packer
  import ssd_pkg::*;
#(
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned TIMEOUT = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  dma_cmd_t  in_cmd,
  output logic      in_ready,
  output logic      out_valid,
  output logic      out_pair,
  output dma_cmd_t  out_cmd0,
  output dma_cmd_t  out_cmd1,
  input  logic      out_ready,
  output logic      ev_pack,
  output logic      ev_timeout,
  output logic      ev_incompat
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  dma_cmd_t      q [DEPTH];
  logic [CW-1:0] count;
  logic [TW-1:0] timer;
  logic          compat, timed_out, push, pop1, pop2;

  assign compat    = cmds_compatible(q[0], q[1]);
  assign timed_out = (timer == TW'(TIMEOUT));
  assign in_ready  = (count < CW'(DEPTH));
  assign push      = in_valid && in_ready;

  always_comb begin
    out_valid = 1'b0; out_pair = 1'b0;
    out_cmd0 = q[0]; out_cmd1 = q[1];
    if (count >= CW'(2)) begin
      out_valid = 1'b1;
      out_pair  = compat;
    end else if (count == CW'(1) && timed_out) begin
      out_valid = 1'b1;
    end
    pop1 = out_valid && out_ready && !out_pair;
    pop2 = out_valid && out_ready && out_pair;
    ev_pack     = pop2;
    ev_incompat = pop1 && count >= CW'(2);
    ev_timeout  = pop1 && count == CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; timer <= '0;
    end else begin
      logic [CW-1:0] n;
      n = count - (pop2 ? CW'(2) : pop1 ? CW'(1) : CW'(0));
      count <= n + (push ? CW'(1) : CW'(0));
      // the time-out runs while exactly one command waits
      if (pop1 || pop2 || count != CW'(1)) timer <= '0;
      else if (!timed_out) timer <= timer + TW'(1);
    end
  end

  always_ff @(posedge clk) begin
    logic [CW-1:0] sh;
    logic [CW-1:0] n;
    sh = pop2 ? CW'(2) : pop1 ? CW'(1) : CW'(0);
    n  = count - sh;
    for (int i = 0; i < DEPTH; i++)
      if (i + int'(sh) < DEPTH) q[i] <= q[i + int'(sh)];
    if (push) q[n[$clog2(DEPTH)-1:0]] <= in_cmd;
  end
endmodule
