// Scheduler of one inlink.
//
// Picks, round robin, a flit buffer that holds data and sends a request to the
// outlink its mapping table entry names. The selection for the next flit cycle is
// negotiated while the current flit is on the links: each of the first ITERS (4)
// phases of a flit cycle is one scheduling iteration. An inlink that has not been
// granted yet requests again in the next iteration, skipping buffers whose
// outlink has already been granted to another inlink, so outlinks left idle by a
// collision in the first iteration can still be filled. The round-robin pointer
// moves only once per flit cycle, to the buffer after the one that was granted,
// which rules out starvation.
//
// Interface: cand_i marks buffers that may be sent (full, with a connection, not
// already on a link); link_of_i gives each buffer's outlink; out_busy_i marks
// outlinks granted in an earlier iteration; grant_i is the answer to req_o in the
// same cycle. Timing: req_o is combinational in phases 0..3; the result
// (matched_o, sel_vc_o, sel_link_o, match_iter_o) is stable in phase 4 and is
// cleared at the end of it. Round robin, four iterations per flit and the
// once-per-flit priority change are the document's; the exact skipping rule is
// this design's choice.
module inlink_scheduler
  import rs_pkg::*;
#(
  parameter int unsigned N_VC    = NUM_VC,
  parameter int unsigned N_LINKS = NUM_LINKS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic [N_VC-1:0]    cand_i,
  input  logic [1:0]         link_of_i [N_VC],
  input  logic [N_LINKS-1:0] out_busy_i,
  input  logic               grant_i,
  output logic               req_o,
  output logic [1:0]         req_link_o,
  output logic [$clog2(N_VC)-1:0] req_vc_o,
  output logic               matched_o,
  output logic [$clog2(N_VC)-1:0] sel_vc_o,
  output logic [1:0]         sel_link_o,
  output logic [1:0]         match_iter_o
);
  localparam int unsigned VW = $clog2(N_VC);
  logic [VW-1:0] ptr_q;

  always_comb begin
    req_o      = 1'b0;
    req_link_o = '0;
    req_vc_o   = '0;
    if (phase < phase_t'(ITERS) && !matched_o) begin
      for (int k = N_VC - 1; k >= 0; k--) begin
        automatic logic [VW-1:0] v = ptr_q + VW'(k);
        if (cand_i[v] && !out_busy_i[link_of_i[v]]) begin
          req_o      = 1'b1;
          req_link_o = link_of_i[v];
          req_vc_o   = v;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q        <= '0;
      matched_o    <= 1'b0;
      sel_vc_o     <= '0;
      sel_link_o   <= '0;
      match_iter_o <= '0;
    end else if (phase == LAST_PHASE) begin
      matched_o <= 1'b0;
      if (matched_o) ptr_q <= sel_vc_o + VW'(1);
    end else if (req_o && grant_i) begin
      matched_o    <= 1'b1;
      sel_vc_o     <= req_vc_o;
      sel_link_o   <= req_link_o;
      match_iter_o <= phase[1:0];
    end
  end
endmodule
