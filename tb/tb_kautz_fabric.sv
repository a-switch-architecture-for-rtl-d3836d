// Network testbench: six boards wired as the Kautz graph K(2,2).
//
// A switching element has three links; on each board link 0 goes to the port
// controller, so two links per element are left for the network and the
// largest Kautz graph this element can form with a station on every node has
// degree 2. K(2,2) has the six nodes xy (x, y in {0,1,2}, x != y) and an arc
// from xy to yz for each z != y; its diameter is 2. Outlink j+1 of node xy
// leads to y z_j, z_0 < z_1 the two letters other than y; at node yz the arc
// from the predecessor with the smaller first letter arrives on inlink 1, the
// other on inlink 2. The routing tag of a route is the list of outlinks taken,
// one claim flit per hop, and a last digit 0 that hands the flits to the
// destination station.
//
// The test:
//   - every station sets up a connection to every other station (30 routes of
//     one or two hops, all at once) and sends three data flits on each; every
//     destination must receive exactly the flits addressed to it, in order;
//   - station 0 asks for a route whose second hop names no link: the route
//     error must ripple back over two hops to station 0;
//   - every connection is released; all channels of all elements must be free.
// All boards share clock and reset, so their flit cycles are aligned.
module tb_kautz_fabric;
  import rs_pkg::*;

  localparam int NN = 6;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // node n is the word LX[n] LY[n]
  function automatic int lx(int n);
    return n / 2;
  endfunction
  function automatic int ly(int n);
    return (n % 2 < n / 2) ? n % 2 : n % 2 + 1;
  endfunction
  function automatic int node_of(int x, int y);
    return 2 * x + ((y > x) ? y - 1 : y);
  endfunction
  // j-th successor (j = 0, 1) of node n, reached over outlink j+1
  function automatic int succ(int n, int j);
    int y, z;
    y = ly(n);
    z = (j == 0) ? ((y == 0) ? 1 : 0) : ((y == 2) ? 1 : 2);
    return node_of(y, z);
  endfunction
  // inlink (0 = link 1, 1 = link 2) on which the arcs of node n arrive
  function automatic int inport(int n);
    int x, y, xo;
    x = lx(n);
    y = ly(n);
    xo = 3 - x - y;
    return (x < xo) ? 0 : 1;
  endfunction

  // boards
  logic  nrt_push [NN], rt_full [NN], nrt_full [NN];
  flit_t nrt_flit [NN];
  logic  rx_valid [NN], st_valid [NN], st_refused [NN];
  flit_t rx_flit  [NN];
  logic [3:0] st_vc [NN];
  logic [2:0] st_code [NN];
  logic [7:0] in_fwd [NN][2], out_fwd [NN][2];
  logic       in_rev [NN][2], out_rev [NN][2];
  // event outputs of the switching elements
  logic ev_claim_ok [NN][3], ev_claim_err [NN][3], ev_release [NN][3];
  logic ev_refused [NN][3], ev_dropped [NN][3], ev_late [NN][3];
  logic [NUM_VC-1:0] vc_used [NN][3];

  for (genvar n = 0; n < NN; n++) begin : g_node
    rattlesnake_board u_b (
      .clk, .rst_n,
      .rt_push_i(1'b0), .rt_flit_i('0), .rt_full_o(rt_full[n]),
      .nrt_push_i(nrt_push[n]), .nrt_flit_i(nrt_flit[n]), .nrt_full_o(nrt_full[n]),
      .cfg_we(1'b0), .cfg_slot('0), .cfg_rt(1'b0),
      .rx_valid_o(rx_valid[n]), .rx_flit_o(rx_flit[n]),
      .st_valid_o(st_valid[n]), .st_vc_o(st_vc[n]), .st_code_o(st_code[n]),
      .st_refused_o(st_refused[n]),
      .ext_in_fwd_i(in_fwd[n]), .ext_in_rev_o(in_rev[n]),
      .ext_out_fwd_o(out_fwd[n]), .ext_out_rev_i(out_rev[n])
    );
    assign ev_claim_ok[n]  = u_b.u_se.ev_claim_ok_o;
    assign ev_claim_err[n] = u_b.u_se.ev_claim_err_o;
    assign ev_release[n]   = u_b.u_se.ev_release_o;
    assign ev_refused[n]   = u_b.u_se.ev_refused_o;
    assign ev_dropped[n]   = u_b.u_se.ev_dropped_o;
    assign ev_late[n]      = u_b.u_se.ev_late_match_o;
    assign vc_used[n]      = u_b.u_se.vc_used_o;
    for (genvar j = 0; j < 2; j++) begin : g_arc
      localparam int M = succ(n, j);
      localparam int I = inport(n);
      assign in_fwd[M][I] = out_fwd[n][j];
      assign out_rev[n][j] = in_rev[M][I];
    end
  end

  // routing tag from s to t: outlink digits, then 0; returns the hop count
  function automatic int route(int s, int t, output logic [1:0] tag [3]);
    tag = '{default: 2'd0};
    for (int j = 0; j < 2; j++)
      if (succ(s, j) == t) begin tag[0] = 2'(j + 1); return 1; end
    for (int j = 0; j < 2; j++)
      for (int k = 0; k < 2; k++)
        if (succ(succ(s, j), k) == t) begin
          tag[0] = 2'(j + 1); tag[1] = 2'(k + 1); return 2;
        end
    return -1;
  endfunction

  // monitors
  int exp_k [NN][NN];     // next data index expected at t from s
  int n_data = 0, n_relrx = 0, n_err0 = 0, n_claim = 0, n_claim_err = 0;
  int n_rel = 0, n_ref = 0, n_drop = 0, n_late = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NN; t++) begin
      if (rx_valid[t]) begin
        int s, k;
        s = int'(rx_flit[t].data[31:24]);
        k = int'(rx_flit[t].data[15:0]);
        if (rx_flit[t].ftype == FT_DATA) begin
          n_data++;
          check(s < NN && s != t && int'(rx_flit[t].data[23:16]) == t,
                $sformatf("station %0d got flit %h addressed elsewhere", t, rx_flit[t].data));
          if (s < NN) begin
            check(k == exp_k[t][s], $sformatf("station %0d from %0d: index %0d, expected %0d",
                                             t, s, k, exp_k[t][s]));
            exp_k[t][s] = k + 1;
          end
        end else if (rx_flit[t].ftype == FT_RELEASE) n_relrx++;
        else check(0, $sformatf("station %0d got flit type %0d", t, rx_flit[t].ftype));
      end
    end
    if (st_valid[0] && st_vc[0] == 4'd10 && st_code[0] == SC_ROUTE_ERROR) n_err0++;
    for (int n = 0; n < NN; n++)
      for (int l = 0; l < 3; l++) begin
        if (ev_claim_ok[n][l])   n_claim++;
        if (ev_claim_err[n][l])  n_claim_err++;
        if (ev_release[n][l])    n_rel++;
        if (ev_refused[n][l])    n_ref++;
        if (ev_dropped[n][l])    n_drop++;
        if (ev_late[n][l])       n_late++;
      end
  end

  // station n queues one non-real-time flit
  task automatic push(int n, flit_type_e t, int vc, logic [31:0] d);
    @(negedge clk);
    while (nrt_full[n]) @(negedge clk);
    nrt_push[n] = 1'b1;
    nrt_flit[n] = '{vc: 4'(vc), ftype: t, data: d};
    @(negedge clk);
    nrt_push[n] = 1'b0;
  endtask

  task automatic station_connect(int s);
    for (int t = 0; t < NN; t++) begin
      logic [1:0] tag [3];
      int h;
      if (t == s) continue;
      h = route(s, t, tag);
      for (int d = 0; d <= h; d++) push(s, FT_CLAIM, t, 32'(tag[d]));
      for (int k = 0; k < 3; k++) push(s, FT_DATA, t, {8'(s), 8'(t), 16'(k)});
    end
  endtask

  task automatic station_release(int s);
    for (int t = 0; t < NN; t++)
      if (t != s) push(s, FT_RELEASE, t, {8'(s), 8'(t), 16'hffff});
  endtask

  function automatic bit all_free();
    bit ok;
    ok = 1'b1;
    for (int n = 0; n < NN; n++)
      for (int l = 0; l < 3; l++)
        if (vc_used[n][l] != '0) ok = 1'b0;
    return ok;
  endfunction

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_claims, hops2;
    for (int n = 0; n < NN; n++) begin
      nrt_push[n] = 1'b0;
      nrt_flit[n] = '0;
      for (int s = 0; s < NN; s++) exp_k[n][s] = 0;
    end
    // the wiring is the Kautz graph: every node has two distinct successors
    // and two distinct predecessors
    for (int n = 0; n < NN; n++) begin
      check(succ(n, 0) != succ(n, 1) && lx(succ(n, 0)) == ly(n) && lx(succ(n, 1)) == ly(n),
            $sformatf("successors of node %0d", n));
      check(node_of(lx(n), ly(n)) == n, "node numbering");
    end
    exp_claims = 0;
    hops2 = 0;
    for (int s = 0; s < NN; s++)
      for (int t = 0; t < NN; t++)
        if (s != t) begin
          logic [1:0] tag [3];
          int h;
          h = route(s, t, tag);
          check(h == 1 || h == 2, $sformatf("route %0d -> %0d within the diameter", s, t));
          exp_claims += h + 1;
          if (h == 2) hops2++;
        end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // all stations connect to all others at once
    fork
      station_connect(0); station_connect(1); station_connect(2);
      station_connect(3); station_connect(4); station_connect(5);
    join
    repeat (5 * 60) @(posedge clk);
    check(n_claim == exp_claims, $sformatf("claims %0d, expected %0d", n_claim, exp_claims));
    check(n_data == 3 * NN * (NN - 1), $sformatf("data flits delivered %0d, expected %0d",
                                                  n_data, 3 * NN * (NN - 1)));
    for (int t = 0; t < NN; t++)
      for (int s = 0; s < NN; s++)
        if (s != t) check(exp_k[t][s] == 3, $sformatf("all flits %0d -> %0d", s, t));

    // route error two hops away ripples back to station 0
    push(0, FT_CLAIM, 10, 32'd1);
    push(0, FT_CLAIM, 10, 32'd3);
    for (int k = 0; k < 8 && n_err0 == 0; k++) begin
      push(0, FT_DATA, 10, 32'hEEEE_0000 + k);
      repeat (5 * 4) @(posedge clk);
    end
    check(n_claim_err == 1, $sformatf("route error raised once (%0d)", n_claim_err));
    check(n_err0 >= 1, "route error reached station 0 over two hops");
    check(n_drop > 0, "flits behind the failed claim dropped");
    push(0, FT_RELEASE, 10, 32'hEEEE_FFFF);

    // release everything
    fork
      station_release(0); station_release(1); station_release(2);
      station_release(3); station_release(4); station_release(5);
    join
    repeat (5 * 40) @(posedge clk);
    check(n_relrx == NN * (NN - 1), $sformatf("releases at the stations %0d", n_relrx));
    check(all_free(), "all channels of all elements free after release");
    check(n_ref > 0, "refusals inside the network");

    $display("network: routes=%0d (two-hop %0d) claims=%0d route_errors=%0d releases=%0d refusals=%0d drops=%0d late_matches=%0d data=%0d",
             NN * (NN - 1), hops2, n_claim, n_claim_err, n_rel, n_ref, n_drop, n_late, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
