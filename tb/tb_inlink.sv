// Testbench of inlink. A behavioural sender drives the link; the testbench
// plays the outlinks (grants, returned status) and the claim unit. It checks:
// a first claim flit is offered to the claim unit with its digit and consumed;
// data on a mapped channel is requested towards the mapped outlink and offered
// to the crossbar with the new channel number; a flit refused downstream stays
// and is sent again; a second flit arriving while the buffer is occupied is
// refused on the reverse path and retried by the sender; a code returned from
// downstream goes back upstream with the next flit of the channel; flits on a
// channel without connection are dropped and answered "no connection"; a route
// error from the claim unit is returned; a release is forwarded and then frees
// the mapping and the outlink channel.
`define WATCHDOG_CYCLES 40000
module tb_inlink;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  phase_t phase = 0;
  always @(posedge clk) if (rst_n) phase <= (phase == 3'd4) ? 3'd0 : phase + 3'd1;

  logic [7:0] fwd;
  logic rev, req, matched, claim_req, rel_en, ev_ref, ev_drop;
  logic [1:0] req_link, iter, claim_digit, rel_link;
  logic [3:0] rel_vc;
  flit_t xfer;
  status_t out_status [3];
  logic grant_en = 1, claim_done = 0, map_we = 0, err_we = 0;
  map_entry_t map_entry = '0;
  logic claim_ok = 1;

  inlink dut (.clk, .rst_n, .phase, .fwd_i(fwd), .rev_o(rev),
    .req_o(req), .req_link_o(req_link), .grant_i(req && grant_en), .out_busy_i(3'b000),
    .matched_o(matched), .match_iter_o(iter), .xfer_flit_o(xfer), .out_status_i(out_status),
    .claim_req_o(claim_req), .claim_digit_o(claim_digit), .claim_done_i(claim_done),
    .map_we_i(map_we), .map_entry_i(map_entry), .err_we_i(err_we),
    .rel_en_o(rel_en), .rel_link_o(rel_link), .rel_vc_o(rel_vc),
    .ev_refused_o(ev_ref), .ev_dropped_o(ev_drop));

  logic push = 0, sent;
  flit_t push_flit = '0, sent_flit;
  logic [3:0] sent_stat;
  int pend;
  tb_link_source u_src (.clk, .phase_i(phase), .push_i(push), .push_flit_i(push_flit), .fwd_o(fwd),
    .rev_i(rev), .sent_o(sent), .sent_flit_o(sent_flit), .sent_stat_o(sent_stat), .pending_o(pend));

  // downstream answer for the flit now on the outlink
  logic ds_refuse = 0;
  logic [2:0] ds_code = 0;
  always_comb for (int l = 0; l < 3; l++) out_status[l] = '{code: ds_code, refused: ds_refuse};

  // claim unit model: answer in phase 4 with channel 7 of the named outlink
  always @(negedge clk) begin
    claim_done = 0; map_we = 0; err_we = 0;
    if (phase == 3'd4 && claim_req) begin
      claim_done = 1;
      if (claim_ok) begin map_we = 1; map_entry = '{valid: 1, link: claim_digit, vc: 4'd7}; end
      else err_we = 1;
    end
  end

  flit_t xq [$];
  int n_xfer = 0, n_ref = 0, n_drop = 0, n_rel = 0, n_claims = 0;
  logic [1:0] last_digit;
  logic [3:0] last_stat [16];
  always @(posedge clk) begin
    if (phase == 3'd4 && matched) begin xq.push_back(xfer); n_xfer++; end
    if (ev_ref) n_ref++;
    if (ev_drop) n_drop++;
    if (rel_en) begin n_rel++; check(rel_link == 2'd2 && rel_vc == 4'd7, "release frees outlink 2 channel 7"); end
    if (claim_done) begin n_claims++; last_digit <= claim_digit; end
    if (sent) last_stat[sent_flit.vc] <= sent_stat;
  end

  task automatic send(logic [3:0] vc, flit_type_e t, logic [31:0] d);
    @(negedge clk); push = 1; push_flit = '{vc: vc, ftype: t, data: d};
    @(negedge clk); push = 0;
  endtask
  task automatic flits(int n); repeat (5 * n) @(posedge clk); endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // claim on channel 3, digit 2
    send(4'd3, FT_CLAIM, 32'h0000_0002);
    flits(4);
    check(n_claims == 1 && last_digit == 2'd2, "claim offered with its digit");
    check(!dut.full[3] && dut.map[3].valid && dut.map[3].link == 2'd2 && dut.map[3].vc == 4'd7, "mapping written, claim consumed");
    check(xq.size() == 0, "claim not forwarded");
    // data: forwarded with new channel number
    send(4'd3, FT_DATA, 32'h1111_0001);
    flits(4);
    check(xq.size() == 1 && xq[0] == '{vc: 4'd7, ftype: FT_DATA, data: 32'h1111_0001}, "data forwarded to crossbar");
    xq.delete();
    // downstream refuses: sent again
    ds_refuse = 1;
    send(4'd3, FT_DATA, 32'h1111_0002);
    flits(6);
    ds_refuse = 0;
    flits(4);
    check(n_ref > 0, "downstream refusal seen");
    check(xq.size() >= 2 && xq[0].data == 32'h1111_0002 && xq[xq.size()-1].data == 32'h1111_0002, "refused flit sent again");
    check(!dut.full[3], "buffer freed after acceptance");
    xq.delete();
    // two flits back to back while the outlink is held: the second is refused upstream
    grant_en = 0;
    send(4'd3, FT_DATA, 32'h1111_0003);
    send(4'd3, FT_DATA, 32'h1111_0004);
    flits(4);
    check(last_stat[3][0] == 1'b1, "occupied buffer refuses the next flit");
    grant_en = 1;
    flits(8);
    check(xq.size() == 2 && xq[0].data == 32'h1111_0003 && xq[1].data == 32'h1111_0004, "both delivered in order");
    xq.delete();
    // downstream code returns upstream with the next flit
    ds_code = SC_ROUTE_ERROR;
    send(4'd3, FT_DATA, 32'h1111_0005);
    flits(4);
    ds_code = SC_NONE;
    send(4'd3, FT_DATA, 32'h1111_0006);
    flits(4);
    check(last_stat[3] == {SC_ROUTE_ERROR, 1'b0}, "downstream code returned upstream");
    // orphan data
    send(4'd9, FT_DATA, 32'h2222_0001);
    flits(3);
    send(4'd9, FT_DATA, 32'h2222_0002);
    flits(3);
    check(n_drop == 2, "flits without connection dropped");
    check(last_stat[9] == {SC_NO_CONN, 1'b0}, "no-connection status returned");
    // claim error
    claim_ok = 0;
    send(4'd10, FT_CLAIM, 32'h0000_0001);
    flits(3);
    claim_ok = 1;
    send(4'd10, FT_DATA, 32'h3333_0001);
    flits(3);
    check(last_stat[10] == {SC_ROUTE_ERROR, 1'b0}, "route error returned");
    // release
    xq.delete();
    send(4'd3, FT_RELEASE, 32'h4444_0001);
    flits(4);
    check(xq.size() == 1 && xq[0].ftype == FT_RELEASE && xq[0].vc == 4'd7, "release forwarded");
    check(n_rel == 1 && !dut.map[3].valid, "mapping invalid after release");
    finish_tb();
  end
endmodule
