// Parallel flit buffers of one inlink.
//
// Each virtual channel of the link owns one flit buffer, so a flit blocked on
// one channel never holds up the others (no head-of-line blocking). Every buffer
// holds one flit (type and 32-bit data; the channel number is the index) and a
// full register that tells whether it holds data.
//
// Interface: one write port from the receiver (wr_en, wr_vc, wr_slot), a clear
// mask (clr_i) with which the inlink empties buffers whose flit has been
// forwarded, consumed by the claim unit or dropped, and every buffer's contents
// and full flag on the outputs. Timing: writes and clears take effect at the
// clock edge; if both hit one buffer, the write wins. The one-flit buffer per
// channel and the full register are the document's; the write priority is this
// design's choice.
module flit_buffers
  import rs_pkg::*;
#(
  parameter int unsigned N_VC = NUM_VC
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  logic [$clog2(N_VC)-1:0] wr_vc,
  input  slot_t  wr_slot,
  input  logic [N_VC-1:0] clr_i,
  output logic [N_VC-1:0] full_o,
  output slot_t  slot_o [N_VC]
);
  slot_t mem [N_VC];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_vc] <= wr_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) full_o <= '0;
    else begin
      for (int v = 0; v < N_VC; v++) begin
        if (wr_en && wr_vc == v[$clog2(N_VC)-1:0]) full_o[v] <= 1'b1;
        else if (clr_i[v])                         full_o[v] <= 1'b0;
      end
    end
  end

  assign slot_o = mem;
endmodule
