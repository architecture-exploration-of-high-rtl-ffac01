// channel_allocator: the Channel Allocator of the dual-port SSD.
//
// Each SSD port asks for the NAND channel its physical address maps to. A free channel goes to
// the only port asking for it, or, when both ports ask for the same free channel in one cycle,
// alternately to one and then the other (round-robin per channel). A port keeps the channel for
// as long as it holds its request; the other port's request for that channel stays pending until
// then. Ports asking for different channels proceed together.
//
// Interface: req[p], req_ch[p]; gnt[p] is high while port p owns the channel it asks for;
// conflict[p] is high while port p waits for a channel owned by, or just given to, the other.
// Timing: the grant appears the cycle after the request (ownership is registered).
module channel_allocator #(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned NCH    = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NPORTS-1:0]                    req,
  input  logic [NPORTS-1:0][$clog2(NCH)-1:0]   req_ch,
  output logic [NPORTS-1:0]                    gnt,
  output logic [NPORTS-1:0]                    conflict
);
  localparam int unsigned CHW = $clog2(NCH);
  localparam int unsigned PW  = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [NCH-1:0]         own_v;
  logic [NCH-1:0][PW-1:0] own_p;
  logic [NCH-1:0][PW-1:0] rr_last;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      gnt[p]      = req[p] && own_v[req_ch[p]] && own_p[req_ch[p]] == PW'(p);
      conflict[p] = req[p] && !gnt[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_v <= '0; own_p <= '0; rr_last <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        if (own_v[c]) begin
          // release when the owner no longer asks for this channel
          if (!(req[own_p[c]] && req_ch[own_p[c]] == CHW'(c))) own_v[c] <= 1'b0;
        end else begin
          // round-robin: search starting after the last granted port
          logic found;
          found = 1'b0;
          for (int k = 1; k <= NPORTS; k++) begin
            int p;
            p = (int'(rr_last[c]) + k) % NPORTS;
            if (!found && req[p] && req_ch[p] == CHW'(c)) begin
              found = 1'b1;
              own_v[c]   <= 1'b1;
              own_p[c]   <= PW'(p);
              rr_last[c] <= PW'(p);
            end
          end
        end
      end
    end
  end
endmodule
