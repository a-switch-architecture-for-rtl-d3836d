// Port controller ("Snake Control") between a station and its switching element.
//
// Only the flit-level side of the controller is built here. The station hands
// over flits that are already cut to flit size, in two queues: real-time and
// non-real-time. A hybrid TDM slot scheduler (htdm_scheduler) decides in every
// flit cycle which queue may send: real-time flits in real-time slots,
// non-real-time flits in non-real-time slots and in real-time slots left unused.
// The chosen flit goes out on the link to the switching element. It leaves its
// queue only when the element accepts it; a refused flit stays at the head and
// is sent again in the next slot its class may use. For every flit sent the
// status the element returns (refusal and status code, e.g. a route error that
// rippled back from further down the path) is reported to the station. Flits
// arriving from the switching element are always accepted and handed to the
// station; returning status codes towards the element is left to the station
// side and the link carries code 0.
//
// Timing: five-clock flit cycles, aligned with those of the switching element by
// a common clock and reset. A flit queued before phase 4 of flit cycle F can go
// out in F+1. The status report (st_valid_o ...) is valid for one clock, in
// phase 4 of the flit cycle in which the flit was on the link. The slot scheme
// and the flit format are the document's; the queues, their depth and the
// station-side interface are this design's choice.
module snake_control
  import rs_pkg::*;
#(
  parameter int unsigned FRAME_SLOTS = 16,
  parameter int unsigned QDEPTH      = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // station side: transmit queues
  input  logic   rt_push_i,
  input  flit_t  rt_flit_i,
  output logic   rt_full_o,
  input  logic   nrt_push_i,
  input  flit_t  nrt_flit_i,
  output logic   nrt_full_o,
  // slot table
  input  logic   cfg_we,
  input  logic [$clog2(FRAME_SLOTS)-1:0] cfg_slot,
  input  logic   cfg_rt,
  // link to the switching element
  output logic [7:0] tx_fwd_o,
  input  logic       tx_rev_i,
  input  logic [7:0] rx_fwd_i,
  output logic       rx_rev_o,
  // station side: received flits and returned status
  output logic   rx_valid_o,
  output flit_t  rx_flit_o,
  output logic   st_valid_o,
  output logic [VC_W-1:0] st_vc_o,
  output logic [2:0] st_code_o,
  output logic   st_refused_o,
  output logic   ev_seize_o,       // a non-real-time flit took a real-time slot
  output logic   ev_rt_sent_o      // a real-time flit was sent in a real-time slot
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  phase_t phase;
  phase_counter u_phase (.clk, .rst_n, .phase_o(phase));
  wire last = (phase == LAST_PHASE);

  // transmit queues
  flit_t rt_h0, rt_h1, nrt_h0, nrt_h1;
  logic [CW-1:0] rt_cnt, nrt_cnt;
  logic rt_pop, nrt_pop;

  flit_fifo #(.DEPTH(QDEPTH)) u_rtq (
    .clk, .rst_n, .push_i(rt_push_i), .push_flit_i(rt_flit_i), .pop_i(rt_pop),
    .head0_o(rt_h0), .head1_o(rt_h1), .count_o(rt_cnt), .full_o(rt_full_o)
  );
  flit_fifo #(.DEPTH(QDEPTH)) u_nrtq (
    .clk, .rst_n, .push_i(nrt_push_i), .push_flit_i(nrt_flit_i), .pop_i(nrt_pop),
    .head0_o(nrt_h0), .head1_o(nrt_h1), .count_o(nrt_cnt), .full_o(nrt_full_o)
  );

  // flit on the link and its outcome
  logic    infl_valid_q, infl_rt_q;
  flit_t   cur;
  status_t st;
  logic    accepted;
  assign accepted = last && infl_valid_q && !st.refused;
  assign rt_pop   = accepted && infl_rt_q;
  assign nrt_pop  = accepted && !infl_rt_q;

  // what is left after this edge's pop
  logic  rt_avail, nrt_avail, pick_rt, pick_nrt, seize, rt_slot;
  flit_t next_flit;
  assign rt_avail  = rt_cnt  > CW'(rt_pop);
  assign nrt_avail = nrt_cnt > CW'(nrt_pop);

  htdm_scheduler #(.FRAME_SLOTS(FRAME_SLOTS)) u_htdm (
    .clk, .rst_n, .adv_i(last), .cfg_we, .cfg_slot, .cfg_rt,
    .rt_avail_i(rt_avail), .nrt_avail_i(nrt_avail),
    .pick_rt_o(pick_rt), .pick_nrt_o(pick_nrt), .seize_o(seize), .rt_slot_o(rt_slot),
    .slot_o()
  );

  always_comb begin
    next_flit = '{vc: '0, ftype: FT_IDLE, data: '0};
    if (pick_rt)       next_flit = rt_pop  ? rt_h1  : rt_h0;
    else if (pick_nrt) next_flit = nrt_pop ? nrt_h1 : nrt_h0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      infl_valid_q <= 1'b0;
      infl_rt_q    <= 1'b0;
    end else if (last) begin
      infl_valid_q <= pick_rt || pick_nrt;
      infl_rt_q    <= pick_rt;
    end
  end

  link_tx u_tx (
    .clk, .rst_n, .phase, .flit_i(next_flit), .fwd_o(tx_fwd_o), .rev_i(tx_rev_i),
    .cur_o(cur), .status_o(st)
  );

  assign st_valid_o   = last && infl_valid_q;
  assign st_vc_o      = cur.vc;
  assign st_code_o    = st.code;
  assign st_refused_o = st.refused;
  assign ev_seize_o   = last && seize;
  assign ev_rt_sent_o = last && pick_rt && rt_slot;

  // receive side: the station memory always has room
  logic          lk_en;
  logic [VC_W-1:0] lk_vc;
  link_rx u_rx (
    .clk, .rst_n, .phase, .fwd_i(rx_fwd_i), .rev_o(rx_rev_o),
    .lk_en_o(lk_en), .lk_vc_o(lk_vc), .lk_status_i('0),
    .flit_o(rx_flit_o), .flit_valid_o(rx_valid_o)
  );
endmodule
