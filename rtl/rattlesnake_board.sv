// Prototype board: a switching element with its port controller.
//
// One switching element with three links; its link 0 is wired to the port
// controller (Snake Control), which connects the station to the switch, and
// links 1 and 2 are brought out to the pins to reach other switching elements.
// Both devices share clock and reset, which keeps the five-phase flit cycles of
// the two ends of every link aligned; equipment on links 1 and 2 must follow the
// same clock and reset.
//
// Station side (see snake_control): two transmit queues (real-time and
// non-real-time), the HTDM slot table, received flits and the status returned
// for each flit sent. Link side: for links 1 and 2, an 8-bit forward path and a
// 1-bit reverse path in each direction. The monitoring outputs of the switching
// element are left to simulation. The partitioning into switching element and
// port controller is the document's; wiring the controller to link 0 is this
// design's choice.
module rattlesnake_board
  import rs_pkg::*;
#(
  parameter int unsigned N_VC        = NUM_VC,
  parameter int unsigned FRAME_SLOTS = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // station side
  input  logic   rt_push_i,
  input  flit_t  rt_flit_i,
  output logic   rt_full_o,
  input  logic   nrt_push_i,
  input  flit_t  nrt_flit_i,
  output logic   nrt_full_o,
  input  logic   cfg_we,
  input  logic [$clog2(FRAME_SLOTS)-1:0] cfg_slot,
  input  logic   cfg_rt,
  output logic   rx_valid_o,
  output flit_t  rx_flit_o,
  output logic   st_valid_o,
  output logic [VC_W-1:0] st_vc_o,
  output logic [2:0] st_code_o,
  output logic   st_refused_o,
  // links 1 and 2 of the switching element
  input  logic [7:0] ext_in_fwd_i  [2],
  output logic       ext_in_rev_o  [2],
  output logic [7:0] ext_out_fwd_o [2],
  input  logic       ext_out_rev_i [2]
);
  logic [7:0] in_fwd  [NUM_LINKS];
  logic       in_rev  [NUM_LINKS];
  logic [7:0] out_fwd [NUM_LINKS];
  logic       out_rev [NUM_LINKS];
  logic [7:0] sc_tx_fwd;
  logic       sc_rx_rev;

  snake_control #(.FRAME_SLOTS(FRAME_SLOTS)) u_sc (
    .clk, .rst_n,
    .rt_push_i, .rt_flit_i, .rt_full_o, .nrt_push_i, .nrt_flit_i, .nrt_full_o,
    .cfg_we, .cfg_slot, .cfg_rt,
    .tx_fwd_o(sc_tx_fwd), .tx_rev_i(in_rev[0]),
    .rx_fwd_i(out_fwd[0]), .rx_rev_o(sc_rx_rev),
    .rx_valid_o, .rx_flit_o, .st_valid_o, .st_vc_o, .st_code_o, .st_refused_o,
    .ev_seize_o(), .ev_rt_sent_o()
  );

  always_comb begin
    in_fwd[0]  = sc_tx_fwd;
    out_rev[0] = sc_rx_rev;
    for (int l = 1; l < NUM_LINKS; l++) begin
      in_fwd[l]          = ext_in_fwd_i[l-1];
      out_rev[l]         = ext_out_rev_i[l-1];
      ext_in_rev_o[l-1]  = in_rev[l];
      ext_out_fwd_o[l-1] = out_fwd[l];
    end
  end

  switching_element #(.N_VC(N_VC), .N_LINKS(NUM_LINKS)) u_se (
    .clk, .rst_n,
    .in_fwd_i(in_fwd), .in_rev_o(in_rev), .out_fwd_o(out_fwd), .out_rev_i(out_rev),
    .phase_o(),
    .out_flit_o(), .vc_used_o(), .ev_refused_o(), .ev_dropped_o(), .ev_late_match_o(),
    .ev_claim_ok_o(), .ev_claim_err_o(), .ev_release_o()
  );
endmodule
