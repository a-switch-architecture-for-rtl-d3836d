// Flit-cycle phase counter.
//
// Every flit occupies five clock cycles on a link and inside the switch: phase 0
// carries the identification byte, phases 1 to 4 the data bytes. All sections of
// a switching element, and the peers at the ends of its links, run from one
// clock and are reset together, so their counters stay aligned. The five-phase
// flit is the document's; the shared clock and reset alignment are this design's.
// Output: phase_o counts 0,1,2,3,4,0,... starting at 0 after reset.
module phase_counter
  import rs_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output phase_t phase_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     phase_o <= '0;
    else if (phase_o == LAST_PHASE) phase_o <= '0;
    else                            phase_o <= phase_o + 3'd1;
  end
endmodule
