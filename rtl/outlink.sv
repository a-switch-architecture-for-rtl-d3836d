// Output section of a switching element (one per link).
//
// Combines the outlink's request arbiter with the link transmitter. During the
// scheduling iterations of a flit cycle the arbiter grants one requesting inlink;
// at the end of phase 4 the transmitter takes that inlink's flit from the
// crossbar (or an IDLE flit if nobody was granted) and sends it during the next
// flit cycle. The status that the next element returns for the flit is complete
// in phase 4 of that cycle; status_o hands it to the inlinks, and the inlink that
// sent the flit stores its code in the status buffer of its own channel and
// learns whether the flit was accepted.
//
// Interface: req_i/gnt_o per inlink, busy_o (this outlink already granted for
// the next flit cycle), sel_valid_o/sel_src_o to steer the crossbar, flit_i from
// the crossbar, the physical channel (fwd_o, rev_i), and status_o/cur_o for the
// flit on the link. Passing the status back to the sending inlink is the
// document's; the timing is this design's.
module outlink
  import rs_pkg::*;
#(
  parameter int unsigned N_IN = NUM_LINKS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic [N_IN-1:0] req_i,
  output logic [N_IN-1:0] gnt_o,
  output logic            busy_o,
  output logic            sel_valid_o,
  output logic [1:0]      sel_src_o,
  input  flit_t           flit_i,
  output logic [7:0]      fwd_o,
  input  logic            rev_i,
  output status_t         status_o,
  output flit_t           cur_o
);
  outlink_arbiter #(.N_IN(N_IN)) u_arb (
    .clk, .rst_n, .phase, .req_i, .gnt_o, .matched_o(busy_o), .src_o(sel_src_o)
  );
  assign sel_valid_o = busy_o;

  link_tx u_tx (
    .clk, .rst_n, .phase, .flit_i, .fwd_o, .rev_i, .cur_o, .status_o
  );
endmodule
