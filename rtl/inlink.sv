// Input section of a switching element (one per link).
//
// Holds everything the figure of the input part of a link shows: the receiver,
// the parallel flit buffers (one per virtual channel), the status buffers, the
// mapping table and the control and scheduling logic.
//
// A flit arriving on channel v is stored in flit buffer v unless that buffer is
// still occupied; then it is refused through bit 0 of the returned status and the
// sender keeps it. A buffered flit whose channel has a mapping is scheduled
// towards the mapped outlink and leaves with the new channel number from the
// table. It is cleared only when the next element has accepted it, so a refused
// flit is simply scheduled again. A claim flit on a channel without mapping goes
// to the claim unit, which writes the mapping (or reports a route error) and
// consumes it. A release flit is forwarded like data; once accepted downstream
// the mapping is invalidated and the outlink channel is given back to the claim
// unit. Any other flit on a channel without mapping is dropped and answered with
// a "no connection" status. Status codes coming back from downstream are stored
// per channel and returned upstream with the next flit of that channel.
//
// Timing: flit cycles of five clocks (see phase_counter). Buffers, mappings and
// status change only at the end of phase 4. Scheduling runs in phases 0..3 of
// one flit cycle for the next; a flit that arrives in flit cycle F leaves in
// F+2 at the earliest. The structure and the mechanisms are the document's; the
// refuse-and-retry flow control, dropping and all timing are this design's.
module inlink
  import rs_pkg::*;
#(
  parameter int unsigned N_VC    = NUM_VC,
  parameter int unsigned N_LINKS = NUM_LINKS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  // physical channel from the previous element
  input  logic [7:0] fwd_i,
  output logic       rev_o,
  // scheduling
  output logic       req_o,
  output logic [1:0] req_link_o,
  input  logic       grant_i,
  input  logic [N_LINKS-1:0] out_busy_i,
  output logic       matched_o,
  output logic [1:0] match_iter_o,
  output flit_t      xfer_flit_o,    // flit for the crossbar, phase 4
  // status of the flits on the outlinks, phase 4
  input  status_t    out_status_i [N_LINKS],
  // claim unit
  output logic       claim_req_o,
  output logic [1:0] claim_digit_o,
  input  logic       claim_done_i,
  input  logic       map_we_i,
  input  map_entry_t map_entry_i,
  input  logic       err_we_i,
  output logic       rel_en_o,
  output logic [1:0] rel_link_o,
  output logic [$clog2(N_VC)-1:0] rel_vc_o,
  // events, for monitoring
  output logic       ev_refused_o,   // a flit sent from here was refused downstream
  output logic       ev_dropped_o    // a flit without connection was dropped
);
  localparam int unsigned VW = $clog2(N_VC);

  typedef struct packed {
    logic          valid;
    logic [VW-1:0] vc;
    logic [1:0]    link;
  } inflight_t;

  wire last = (phase == LAST_PHASE);

  // receiver
  logic          lk_en;
  logic [VW-1:0] lk_vc;
  status_t       lk_status;
  status_t       st_rd;  // its refused bit is always 0: the live full flag replaces it
  flit_t         rx_flit;
  logic          rx_valid;
  logic [N_VC-1:0] full;
  slot_t         slots [N_VC];
  map_entry_t    map   [N_VC];

  link_rx u_rx (
    .clk, .rst_n, .phase, .fwd_i, .rev_o,
    .lk_en_o(lk_en), .lk_vc_o(lk_vc), .lk_status_i(lk_status),
    .flit_o(rx_flit), .flit_valid_o(rx_valid)
  );
  assign lk_status = '{code: st_rd.code, refused: full[lk_vc]};

  // flit in transit on an outlink and its outcome
  inflight_t infl_q;
  status_t   infl_st;
  logic      accepted;
  logic      is_release;
  assign infl_st    = out_status_i[infl_q.link];
  assign accepted   = last && infl_q.valid && !infl_st.refused;
  assign is_release = slots[infl_q.vc].ftype == FT_RELEASE;

  // first claim and first orphan flit
  logic          orphan, claim_any;
  logic [VW-1:0] orphan_vc, claim_vc;
  always_comb begin
    orphan = 1'b0; orphan_vc = '0; claim_any = 1'b0; claim_vc = '0;
    for (int v = N_VC - 1; v >= 0; v--) begin
      if (full[v] && !map[v].valid) begin
        if (slots[v].ftype == FT_CLAIM) begin claim_any = 1'b1; claim_vc = VW'(v); end
        else                            begin orphan    = 1'b1; orphan_vc = VW'(v); end
      end
    end
  end
  assign claim_req_o   = claim_any;
  assign claim_digit_o = slots[claim_vc].data[1:0];

  // buffer clears, all at the end of phase 4
  logic [N_VC-1:0] clr;
  always_comb begin
    clr = '0;
    if (accepted)             clr[infl_q.vc] = 1'b1;
    if (last && claim_done_i) clr[claim_vc]  = 1'b1;
    if (last && orphan)       clr[orphan_vc] = 1'b1;
  end

  flit_buffers #(.N_VC(N_VC)) u_buf (
    .clk, .rst_n,
    .wr_en(rx_valid), .wr_vc(rx_flit.vc[VW-1:0]),
    .wr_slot('{ftype: rx_flit.ftype, data: rx_flit.data}),
    .clr_i(clr), .full_o(full), .slot_o(slots)
  );

  // status buffers: 0 = code from downstream, 1 = route error, 2 = no connection
  logic          sw_en   [3];
  logic [VW-1:0] sw_vc   [3];
  status_t       sw_stat [3];
  always_comb begin
    sw_en[0]   = last && infl_q.valid && infl_st.code != SC_NONE;
    sw_vc[0]   = infl_q.vc;
    sw_stat[0] = '{code: infl_st.code, refused: 1'b0};
    sw_en[1]   = last && err_we_i;
    sw_vc[1]   = claim_vc;
    sw_stat[1] = '{code: SC_ROUTE_ERROR, refused: 1'b0};
    sw_en[2]   = last && orphan;
    sw_vc[2]   = orphan_vc;
    sw_stat[2] = '{code: SC_NO_CONN, refused: 1'b0};
  end

  status_buffers #(.N_VC(N_VC), .NWR(3)) u_stat (
    .clk, .rst_n, .wr_en(sw_en), .wr_vc(sw_vc), .wr_stat(sw_stat),
    .rd_en(lk_en), .rd_vc(lk_vc), .rd_stat_o(st_rd)
  );

  // mapping table
  assign rel_en_o   = accepted && is_release;
  assign rel_link_o = infl_q.link;
  assign rel_vc_o   = map[infl_q.vc].vc[VW-1:0];

  mapping_table #(.N_VC(N_VC)) u_map (
    .clk, .rst_n,
    .we(last && map_we_i), .wvc(claim_vc), .wentry(map_entry_i),
    .inv_en(rel_en_o), .inv_vc(infl_q.vc),
    .entries_o(map)
  );

  // scheduling
  logic [N_VC-1:0] cand;
  logic [1:0]      link_of [N_VC];
  logic [VW-1:0]   req_vc, sel_vc;
  logic [1:0]      sel_link;
  always_comb begin
    for (int v = 0; v < N_VC; v++) begin
      cand[v]    = full[v] && map[v].valid && !(infl_q.valid && infl_q.vc == VW'(v));
      link_of[v] = map[v].link;
    end
  end

  inlink_scheduler #(.N_VC(N_VC), .N_LINKS(N_LINKS)) u_sched (
    .clk, .rst_n, .phase,
    .cand_i(cand), .link_of_i(link_of), .out_busy_i, .grant_i,
    .req_o, .req_link_o, .req_vc_o(req_vc),
    .matched_o, .sel_vc_o(sel_vc), .sel_link_o(sel_link), .match_iter_o
  );

  assign xfer_flit_o = '{vc: map[sel_vc].vc, ftype: slots[sel_vc].ftype, data: slots[sel_vc].data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) infl_q <= '0;
    else if (last) infl_q <= '{valid: matched_o, vc: sel_vc, link: sel_link};
  end

  assign ev_refused_o = last && infl_q.valid && infl_st.refused;
  assign ev_dropped_o = last && orphan;

  // A flit is only written into an empty buffer.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    rx_valid |-> !full[rx_flit.vc[VW-1:0]]);
endmodule
