// Self-checking testbench of the switching element.
//
// Behavioural senders drive the three inlinks and behavioural receivers take
// the three outlinks. The test sets up connections with claim flits, sends data
// over them and checks every delivered flit against a scoreboard (outlink, new
// channel number, type, data, per-channel order, exactly-once delivery). It also
// checks: the ten-clock latency through an idle element; refusal and retry when
// the receiver holds its buffer; a status code returned downstream being handed
// back on the next flit of the channel; route errors for a bad digit and for an
// outlink without free channels; release freeing the channel; dropping of flits
// without connection; and a match in a later scheduling iteration.
module tb_switching_element;
  import rs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic [7:0] in_fwd [3], out_fwd [3];
  logic       in_rev [3], out_rev [3];
  phase_t     phase;
  flit_t      out_flit [3];
  logic [15:0] vc_used [3];
  logic ev_ref [3], ev_drop [3], ev_late [3], ev_cok [3], ev_cerr [3], ev_rel [3];

  switching_element dut (
    .clk, .rst_n, .in_fwd_i(in_fwd), .in_rev_o(in_rev), .out_fwd_o(out_fwd), .out_rev_i(out_rev),
    .phase_o(phase), .out_flit_o(out_flit), .vc_used_o(vc_used),
    .ev_refused_o(ev_ref), .ev_dropped_o(ev_drop), .ev_late_match_o(ev_late),
    .ev_claim_ok_o(ev_cok), .ev_claim_err_o(ev_cerr), .ev_release_o(ev_rel)
  );

  logic  push [3];
  flit_t push_flit [3];
  logic  sent [3];
  flit_t sent_flit [3];
  logic [3:0] sent_stat [3];
  int    pending [3];
  logic  refuse [3];
  logic [2:0] code [3];
  logic  got [3], got_ref [3];
  flit_t got_flit [3];

  for (genvar l = 0; l < 3; l++) begin : g_l
    tb_link_source u_src (.clk, .phase_i(phase), .push_i(push[l]), .push_flit_i(push_flit[l]),
      .fwd_o(in_fwd[l]), .rev_i(in_rev[l]), .sent_o(sent[l]), .sent_flit_o(sent_flit[l]),
      .sent_stat_o(sent_stat[l]), .pending_o(pending[l]));
    tb_link_sink u_snk (.clk, .phase_i(phase), .fwd_i(out_fwd[l]), .rev_o(out_rev[l]),
      .refuse_i(refuse[l]), .code_i(code[l]), .got_o(got[l]), .got_flit_o(got_flit[l]),
      .got_refused_o(got_ref[l]));
  end

  // ---- scoreboard: data word = {tag, seq}; expected outlink/vc per tag
  typedef struct { int link; int vc; logic [3:0] ftype; } exp_t;
  exp_t expd [logic [31:0]];
  int   last_seq [int];
  int   n_cok = 0, n_cerr = 0, n_rel = 0, n_ref = 0, n_drop = 0, n_late = 0, n_got = 0;
  int   n_sink_refused = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    for (int l = 0; l < 3; l++) begin
      if (ev_cok[l])  n_cok++;
      if (ev_cerr[l]) n_cerr++;
      if (ev_rel[l])  n_rel++;
      if (ev_ref[l])  n_ref++;
      if (ev_drop[l]) n_drop++;
      if (ev_late[l]) n_late++;
      if (got_ref[l]) n_sink_refused++;
      if (got[l]) begin
        n_got++;
        if (!expd.exists(got_flit[l].data)) check(0, $sformatf("unexpected flit on out%0d data %h", l, got_flit[l].data));
        else begin
          exp_t e;
          int key;
          e   = expd[got_flit[l].data];
          key = l * 16 + int'(got_flit[l].vc);
          check(e.link == l && e.vc == int'(got_flit[l].vc) && e.ftype == got_flit[l].ftype,
                $sformatf("flit %h on out%0d vc%0d, expected out%0d vc%0d", got_flit[l].data, l, got_flit[l].vc, e.link, e.vc));
          if (last_seq.exists(key)) check(int'(got_flit[l].data[15:0]) > last_seq[key], "per-channel order");
          last_seq[key] = int'(got_flit[l].data[15:0]);
          expd.delete(got_flit[l].data);
        end
      end
    end
  end

  task automatic send(int l, logic [3:0] vc, flit_type_e t, logic [31:0] d);
    @(negedge clk);
    push[l] = 1'b1; push_flit[l] = '{vc: vc, ftype: t, data: d};
    @(negedge clk);
    push[l] = 1'b0;
  endtask

  task automatic flits(int n);
    repeat (5 * n) @(posedge clk);
  endtask

  task automatic drain();
    int guard = 0;
    while ((pending[0] + pending[1] + pending[2] > 0) && guard < 400) begin flits(1); guard++; end
    flits(4);
  endtask

  int seq = 1;
  function automatic logic [31:0] dw(int tag);
    seq++;
    return {tag[15:0], seq[15:0]};
  endfunction

  // expect a data/release flit at (outlink, out vc)
  task automatic expect_fwd(logic [31:0] d, int link, int vc, flit_type_e t);
    expd[d] = '{link: link, vc: vc, ftype: t};
  endtask

  logic [3:0] last_stat [3][16];
  always @(posedge clk)
    for (int l = 0; l < 3; l++) if (sent[l]) last_stat[l][sent_flit[l].vc] <= sent_stat[l];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    longint t_sent, t_got;
    for (int l = 0; l < 3; l++) begin push[l] = 0; push_flit[l] = '0; refuse[l] = 0; code[l] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. claim in0 vc2 -> out1 (gets out1 vc0), then one data flit: latency
    send(0, 4'd2, FT_CLAIM, 32'd1);
    drain();
    check(n_cok == 1 && vc_used[1] == 16'h0001, "claim in0/vc2 -> out1/vc0");
    d = dw(16'h0002);
    expect_fwd(d, 1, 0, FT_DATA);
    send(0, 4'd2, FT_DATA, d);
    wait (sent[0]); t_sent = cyc;
    wait (got[1]);  t_got = cyc;
    check(t_got - t_sent == 10, $sformatf("latency %0d clocks, expected 10 (two flit cycles)", t_got - t_sent));
    drain();

    // 2. more connections: in1 vc3 -> out1 (vc1), in2 vc4 -> out1 (vc2), in2 vc5 -> out2 (vc0)
    send(1, 4'd3, FT_CLAIM, 32'd1);
    send(2, 4'd4, FT_CLAIM, 32'd1);
    send(2, 4'd5, FT_CLAIM, 32'd2);
    drain();
    check(vc_used[1] == 16'h0007 && vc_used[2] == 16'h0001, "three more claims mapped");

    // 3. contention on out1, with in2 finding out2 in a later iteration
    for (int k = 0; k < 12; k++) begin
      logic [31:0] a, b, c, e;
      refuse[1] = (k % 2 == 1);
      a = dw(16'h0102); b = dw(16'h1103); c = dw(16'h2104); e = dw(16'h2205);
      expect_fwd(a, 1, 0, FT_DATA); expect_fwd(b, 1, 1, FT_DATA);
      expect_fwd(c, 1, 2, FT_DATA); expect_fwd(e, 2, 0, FT_DATA);
      fork
        send(0, 4'd2, FT_DATA, a);
        send(1, 4'd3, FT_DATA, b);
        begin send(2, 4'd4, FT_DATA, c); send(2, 4'd5, FT_DATA, e); end
      join
      if (refuse[1]) begin flits(8); refuse[1] = 1'b0; drain(); end
    end
    drain();
    check(n_late > 0, "a match was made in a later scheduling iteration");

    // 4. receiver on out1 holds its buffers: flits are refused and retried
    refuse[1] = 1'b1;
    for (int k = 0; k < 3; k++) begin
      d = dw(16'h0302); expect_fwd(d, 1, 0, FT_DATA); send(0, 4'd2, FT_DATA, d);
    end
    flits(8);
    check(n_ref > 0, "refusals seen by the inlink");
    refuse[1] = 1'b0;
    drain();

    // 5. a status code from downstream rides back to the source on the next flit
    code[1] = SC_ROUTE_ERROR;
    d = dw(16'h0402); expect_fwd(d, 1, 0, FT_DATA); send(0, 4'd2, FT_DATA, d);
    flits(4);
    code[1] = SC_NONE;
    d = dw(16'h0403); expect_fwd(d, 1, 0, FT_DATA); send(0, 4'd2, FT_DATA, d);
    drain();
    check(last_stat[0][2][3:1] == SC_ROUTE_ERROR, "downstream status returned upstream");
    d = dw(16'h0404); expect_fwd(d, 1, 0, FT_DATA); send(0, 4'd2, FT_DATA, d);
    drain();
    check(last_stat[0][2] == 4'h0, "status cleared after it was returned");

    // 6. route error for a digit that names no link; following flits see it
    send(1, 4'd9, FT_CLAIM, 32'd3);
    drain();
    check(n_cerr == 1, "claim with digit 3 rejected");
    send(1, 4'd9, FT_DATA, 32'hdead0001);
    drain();
    check(last_stat[1][9][3:1] == SC_ROUTE_ERROR, "route error returned with next flit");
    check(n_drop == 1, "flit without connection dropped");
    send(1, 4'd9, FT_DATA, 32'hdead0002);
    drain();
    check(last_stat[1][9][3:1] == SC_NO_CONN, "no-connection status returned");

    // 7. exhaust the channels of out2 (one already used): 17 more claims, 15 fit
    for (int v = 6; v < 16; v++) send(0, 4'(v), FT_CLAIM, 32'd2);
    for (int v = 10; v < 16; v++) send(2, 4'(v), FT_CLAIM, 32'd2);
    send(1, 4'd10, FT_CLAIM, 32'd2);
    drain();
    flits(20);
    check(vc_used[2] == 16'hffff, "all 16 channels of out2 assigned");
    check(n_cok == 4 + 15, $sformatf("claims mapped: %0d", n_cok));
    check(n_cerr == 1 + 2, $sformatf("route errors: %0d", n_cerr));

    // 8. release in0 vc2 (out1 vc0): forwarded, then channel free again
    d = dw(16'h0802); expect_fwd(d, 1, 0, FT_RELEASE);
    send(0, 4'd2, FT_RELEASE, d);
    drain();
    check(n_rel == 1 && vc_used[1] == 16'h0006, "release frees out1 vc0");
    send(0, 4'd2, FT_DATA, 32'hdead0003);
    drain();
    check(n_drop == 3, "flit after release dropped");

    check(expd.size() == 0, $sformatf("%0d flits not delivered", expd.size()));
    check(n_sink_refused > 0, "receiver refused at least one flit");
    $display("mechanisms: claims=%0d route_errors=%0d releases=%0d refusals=%0d drops=%0d late_matches=%0d delivered=%0d",
             n_cok, n_cerr, n_rel, n_ref, n_drop, n_late, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
