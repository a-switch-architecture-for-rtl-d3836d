// Request arbiter of one outlink.
//
// In each scheduling iteration (phases 0..3 of a flit cycle) the inlinks that
// still look for an outlink send their requests. If this outlink is not yet
// taken and receives requests, it grants one of them, round robin, and is then
// taken for the next flit cycle. The round-robin pointer moves once per flit
// cycle, to the inlink after the one granted.
//
// Interface: req_i has one bit per inlink; gnt_o is combinational and one-hot.
// matched_o/src_o tell, from the cycle after the grant until the end of phase 4,
// which inlink owns the outlink in the next flit cycle. Round robin is the
// document's; the pointer rule is this design's choice.
module outlink_arbiter
  import rs_pkg::*;
#(
  parameter int unsigned N_IN = NUM_LINKS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic [N_IN-1:0] req_i,
  output logic [N_IN-1:0] gnt_o,
  output logic            matched_o,
  output logic [1:0]      src_o
);
  logic [1:0] ptr_q;
  logic [1:0] pick;

  always_comb begin
    gnt_o = '0;
    pick  = '0;
    if (phase < phase_t'(ITERS) && !matched_o) begin
      for (int k = 2 * N_IN - 1; k >= 0; k--) begin
        if (k >= int'(ptr_q) && k < int'(ptr_q) + N_IN && req_i[k % N_IN]) pick = 2'(k % N_IN);
      end
      if (req_i[pick]) gnt_o[pick] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q     <= '0;
      matched_o <= 1'b0;
      src_o     <= '0;
    end else if (phase == LAST_PHASE) begin
      matched_o <= 1'b0;
      if (matched_o) ptr_q <= (int'(src_o) == N_IN - 1) ? 2'd0 : src_o + 2'd1;
    end else if (|gnt_o) begin
      matched_o <= 1'b1;
      src_o     <= pick;
    end
  end
endmodule
