// Mapping table of one inlink.
//
// One entry per virtual channel of the inlink, with only local meaning: whether
// the channel carries a connection, the outlink it was routed to and the new
// virtual channel number to use towards the next switching element. The claim
// unit writes an entry when it sets up a connection; the inlink invalidates it
// when the connection's release flit has been passed on.
//
// Interface: write port (we, wvc, wentry), invalidate port (inv_en, inv_vc), all
// entries on entries_o. Timing: both act at the clock edge; a write wins over an
// invalidate of the same entry. Contents and use are the document's; the valid
// bit and the port layout are this design's choice.
module mapping_table
  import rs_pkg::*;
#(
  parameter int unsigned N_VC = NUM_VC
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [$clog2(N_VC)-1:0] wvc,
  input  map_entry_t wentry,
  input  logic       inv_en,
  input  logic [$clog2(N_VC)-1:0] inv_vc,
  output map_entry_t entries_o [N_VC]
);
  map_entry_t tbl [N_VC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VC; v++) tbl[v] <= '0;
    end else begin
      if (inv_en) tbl[inv_vc].valid <= 1'b0;
      if (we)     tbl[wvc] <= wentry;
    end
  end

  assign entries_o = tbl;
endmodule
