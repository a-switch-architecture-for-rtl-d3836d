// Switching element: a 3x3 switch with 16 virtual channels per link.
//
// Three input sections and three output sections are joined by a crossbar; the
// claim unit assigns virtual channels to connections. Each link is a physical
// channel of 9 wires: an 8-bit forward path carrying a flit in five phases and a
// 1-bit reverse path returning a 4-bit status per flit. Connections are circuits
// of virtual channels set up hop by hop by claim flits and torn down by release
// flits; data flits follow the mappings the claims left behind.
//
// Scheduling: in phases 0..3 of every flit cycle the inlinks and outlinks run
// up to four request/grant iterations (round robin on both sides) to choose the
// flits of the next flit cycle; at the end of phase 4 the outlinks load them from
// the crossbar and the inlinks learn whether the flits of the cycle now ending
// were accepted downstream.
//
// Timing: a flit whose identification byte enters in phase 0 of flit cycle F
// leaves, if uncontended, with its identification byte in phase 0 of F+2 (ten
// clocks). Each outlink carries at most one flit per flit cycle. Both ends of a
// link must be clocked and reset together (see phase_counter). The structure,
// sizes and mechanisms are the document's; timing, flit encodings and the
// refuse-and-retry flow control are this design's.
module switching_element
  import rs_pkg::*;
#(
  parameter int unsigned N_VC    = NUM_VC,
  parameter int unsigned N_LINKS = NUM_LINKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_fwd_i  [N_LINKS],
  output logic       in_rev_o  [N_LINKS],
  output logic [7:0] out_fwd_o [N_LINKS],
  input  logic       out_rev_i [N_LINKS],
  output phase_t     phase_o,
  // monitoring
  output flit_t      out_flit_o     [N_LINKS], // flit now on each outlink
  output logic [N_VC-1:0] vc_used_o [N_LINKS], // outlink channels in use
  output logic       ev_refused_o   [N_LINKS], // flit from inlink i refused downstream
  output logic       ev_dropped_o   [N_LINKS], // flit without connection dropped
  output logic       ev_late_match_o[N_LINKS], // inlink i matched in iteration 2..4
  output logic       ev_claim_ok_o  [N_LINKS], // claim from inlink i mapped
  output logic       ev_claim_err_o [N_LINKS], // claim from inlink i gave a route error
  output logic       ev_release_o   [N_LINKS]  // release from inlink i passed on
);
  localparam int unsigned VW = $clog2(N_VC);

  phase_t phase;
  phase_counter u_phase (.clk, .rst_n, .phase_o(phase));
  assign phase_o = phase;

  // inlink side
  logic        in_req      [N_LINKS];
  logic [1:0]  in_req_link [N_LINKS];
  logic        in_grant    [N_LINKS];
  logic        in_matched  [N_LINKS];
  logic [1:0]  in_iter     [N_LINKS];
  flit_t       in_flit     [N_LINKS];
  logic        claim_req   [N_LINKS];
  logic [1:0]  claim_digit [N_LINKS];
  logic        claim_done  [N_LINKS];
  logic        map_we      [N_LINKS];
  map_entry_t  map_entry   [N_LINKS];
  logic        err_we      [N_LINKS];
  logic        rel_en      [N_LINKS];
  logic [1:0]  rel_link    [N_LINKS];
  logic [VW-1:0] rel_vc    [N_LINKS];

  // outlink side
  logic [N_LINKS-1:0] out_req  [N_LINKS];
  logic [N_LINKS-1:0] out_gnt  [N_LINKS];
  logic [N_LINKS-1:0] out_busy;
  logic        sel_valid [N_LINKS];
  logic [1:0]  sel_src   [N_LINKS];
  flit_t       xbar_out  [N_LINKS];
  status_t     out_status [N_LINKS];

  // request and grant wiring
  always_comb begin
    for (int o = 0; o < N_LINKS; o++)
      for (int i = 0; i < N_LINKS; i++)
        out_req[o][i] = in_req[i] && int'(in_req_link[i]) == o;
    for (int i = 0; i < N_LINKS; i++) begin
      in_grant[i] = 1'b0;
      for (int o = 0; o < N_LINKS; o++)
        if (out_gnt[o][i]) in_grant[i] = 1'b1;
    end
  end

  for (genvar i = 0; i < N_LINKS; i++) begin : g_in
    inlink #(.N_VC(N_VC), .N_LINKS(N_LINKS)) u_in (
      .clk, .rst_n, .phase,
      .fwd_i(in_fwd_i[i]), .rev_o(in_rev_o[i]),
      .req_o(in_req[i]), .req_link_o(in_req_link[i]), .grant_i(in_grant[i]),
      .out_busy_i(out_busy), .matched_o(in_matched[i]), .match_iter_o(in_iter[i]),
      .xfer_flit_o(in_flit[i]), .out_status_i(out_status),
      .claim_req_o(claim_req[i]), .claim_digit_o(claim_digit[i]),
      .claim_done_i(claim_done[i]), .map_we_i(map_we[i]), .map_entry_i(map_entry[i]),
      .err_we_i(err_we[i]),
      .rel_en_o(rel_en[i]), .rel_link_o(rel_link[i]), .rel_vc_o(rel_vc[i]),
      .ev_refused_o(ev_refused_o[i]), .ev_dropped_o(ev_dropped_o[i])
    );
  end

  for (genvar o = 0; o < N_LINKS; o++) begin : g_out
    outlink #(.N_IN(N_LINKS)) u_out (
      .clk, .rst_n, .phase,
      .req_i(out_req[o]), .gnt_o(out_gnt[o]), .busy_o(out_busy[o]),
      .sel_valid_o(sel_valid[o]), .sel_src_o(sel_src[o]),
      .flit_i(xbar_out[o]), .fwd_o(out_fwd_o[o]), .rev_i(out_rev_i[o]),
      .status_o(out_status[o]), .cur_o(out_flit_o[o])
    );
  end

  crossbar #(.N_IN(N_LINKS), .N_OUT(N_LINKS)) u_xbar (
    .in_flit_i(in_flit), .sel_valid_i(sel_valid), .sel_src_i(sel_src),
    .out_flit_o(xbar_out)
  );

  claim_unit #(.N_LINKS(N_LINKS), .N_VC(N_VC)) u_claim (
    .clk, .rst_n, .phase,
    .claim_req_i(claim_req), .claim_digit_i(claim_digit),
    .done_o(claim_done), .map_we_o(map_we), .map_entry_o(map_entry), .err_we_o(err_we),
    .rel_en_i(rel_en), .rel_link_i(rel_link), .rel_vc_i(rel_vc), .used_o(vc_used_o)
  );

  always_comb begin
    for (int i = 0; i < N_LINKS; i++) begin
      ev_late_match_o[i] = phase == LAST_PHASE && in_matched[i] && in_iter[i] != 2'd0;
      ev_claim_ok_o[i]   = map_we[i];
      ev_claim_err_o[i]  = err_we[i];
      ev_release_o[i]    = rel_en[i];
    end
  end
endmodule
