// Status buffers of one inlink.
//
// Each virtual channel has a 4-bit status buffer. It takes the status code that
// the next switching element (or the receiving port controller) returned for the
// channel, or a code the element itself raises (route error from the claim unit,
// flit on a channel without connection). When the next flit of that channel
// arrives, the receiver reads the buffer, sends the code back upstream on the
// reverse path and clears it, so a code ripples back hop by hop to the source.
//
// Interface: NWR write ports (wr_en/wr_vc/wr_stat) and one read-and-clear port
// (rd_en/rd_vc, rd_stat_o combinational). Timing: writes and the clear act at the
// clock edge; a write wins over a clear of the same buffer, and a higher-numbered
// write port wins over a lower one. The 4-bit buffer per channel and the return
// on the next flit are the document's; the priorities are this design's choice.
module status_buffers
  import rs_pkg::*;
#(
  parameter int unsigned N_VC = NUM_VC,
  parameter int unsigned NWR  = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    wr_en   [NWR],
  input  logic [$clog2(N_VC)-1:0] wr_vc [NWR],
  input  status_t wr_stat [NWR],
  input  logic    rd_en,
  input  logic [$clog2(N_VC)-1:0] rd_vc,
  output status_t rd_stat_o
);
  status_t st [N_VC];

  assign rd_stat_o = st[rd_vc];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VC; v++) st[v] <= '0;
    end else begin
      if (rd_en) st[rd_vc] <= '0;
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) st[wr_vc[w]] <= wr_stat[w];
    end
  end
endmodule
