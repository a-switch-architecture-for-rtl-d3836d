// End-to-end testbench of the prototype board at its default parameters.
//
// The station pushes flits into the port controller, which sends them under
// the HTDM slot table into link 0 of the switching element. Link 1 and link 2
// are looped back to the testbench: a behavioural receiver takes link 1 and a
// behavioural sender drives link 2. The test:
//   - sets up a connection station -> link 1 with a claim flit, sends real-time
//     and non-real-time data over it and checks the flits that arrive on link 1
//     (channel number from the claim unit, data, order);
//   - sets up link 2 -> station and checks the flits handed to the station;
//   - makes the receiver on link 1 refuse flits, so they are retried inside the
//     switch, and makes it return a status code, which must reach the station;
//   - asks for a link that does not exist and checks the route error reported
//     to the station;
//   - releases the connection and checks that the channel is free again.
// Every mechanism is counted and a mechanism that never happens is a failure.
module tb_rattlesnake_board;
  import rs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  logic  rt_push = 0, nrt_push = 0, rt_full, nrt_full;
  flit_t rt_flit = '0, nrt_flit = '0;
  logic  cfg_we = 0, cfg_rt = 0;
  logic [3:0] cfg_slot = '0;
  logic  rx_valid, st_valid, st_refused;
  flit_t rx_flit;
  logic [3:0] st_vc;
  logic [2:0] st_code;
  logic [7:0] ext_in_fwd [2], ext_out_fwd [2];
  logic       ext_in_rev [2], ext_out_rev [2];

  rattlesnake_board dut (
    .clk, .rst_n,
    .rt_push_i(rt_push), .rt_flit_i(rt_flit), .rt_full_o(rt_full),
    .nrt_push_i(nrt_push), .nrt_flit_i(nrt_flit), .nrt_full_o(nrt_full),
    .cfg_we, .cfg_slot, .cfg_rt,
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit),
    .st_valid_o(st_valid), .st_vc_o(st_vc), .st_code_o(st_code), .st_refused_o(st_refused),
    .ext_in_fwd_i(ext_in_fwd), .ext_in_rev_o(ext_in_rev),
    .ext_out_fwd_o(ext_out_fwd), .ext_out_rev_i(ext_out_rev)
  );

  phase_t phase;
  assign phase = dut.u_se.phase;

  // link 1 out: receiver; link 2 in: sender; unused directions idle
  logic refuse1 = 0;
  logic [2:0] code1 = '0;
  logic got1, got1_ref;
  flit_t got1_flit;
  tb_link_sink u_snk (.clk, .phase_i(phase), .fwd_i(ext_out_fwd[0]), .rev_o(ext_out_rev[0]),
    .refuse_i(refuse1), .code_i(code1), .got_o(got1), .got_flit_o(got1_flit), .got_refused_o(got1_ref));
  assign ext_out_rev[1] = 1'b0;

  logic  push2 = 0;
  flit_t push2_flit = '0;
  logic  sent2;
  flit_t sent2_flit;
  logic [3:0] sent2_stat;
  int    pend2;
  tb_link_source u_src (.clk, .phase_i(phase), .push_i(push2), .push_flit_i(push2_flit),
    .fwd_o(ext_in_fwd[1]), .rev_i(ext_in_rev[1]), .sent_o(sent2), .sent_flit_o(sent2_flit),
    .sent_stat_o(sent2_stat), .pending_o(pend2));
  assign ext_in_fwd[0] = 8'h00;

  // expected traffic
  logic [31:0] exp1 [$];   // data expected on link 1 (out vc 0, non-real-time)
  logic [31:0] exp1r [$];  // data expected on link 1 (out vc 1, real-time)
  logic [31:0] exp_st [$]; // data expected at the station
  int n_got1 = 0, n_station = 0, n_sink_ref = 0, n_se_ref = 0, n_seize = 0, n_rt = 0;
  int n_err = 0, n_code = 0, n_claim = 0, n_rel = 0, n_late = 0;

  always @(posedge clk) begin
    if (got1) begin
      n_got1++;
      if (got1_flit.vc == 4'd1) begin
        if (exp1r.size() == 0) check(0, $sformatf("unexpected real-time flit on link 1: %h", got1_flit.data));
        else begin
          check(got1_flit.data == exp1r[0], $sformatf("link 1 vc1 got %h, expected %h", got1_flit.data, exp1r[0]));
          void'(exp1r.pop_front());
        end
      end else if (exp1.size() == 0) check(0, $sformatf("unexpected flit on link 1: %h", got1_flit.data));
      else begin
        check(got1_flit.data == exp1[0] && got1_flit.vc == 4'd0,
              $sformatf("link 1 got vc%0d %h, expected vc0 %h", got1_flit.vc, got1_flit.data, exp1[0]));
        void'(exp1.pop_front());
      end
    end
    if (got1_ref) n_sink_ref++;
    if (rx_valid) begin
      n_station++;
      if (exp_st.size() == 0) check(0, "unexpected flit at the station");
      else begin
        check(rx_flit.data == exp_st[0] && rx_flit.ftype == FT_DATA, "station flit data");
        void'(exp_st.pop_front());
      end
    end
    if (st_valid && st_code == SC_ROUTE_ERROR) n_err++;
    if (st_valid && st_code != SC_NONE) n_code++;
    if (dut.u_sc.ev_seize_o)   n_seize++;
    if (dut.u_sc.ev_rt_sent_o) n_rt++;
    for (int l = 0; l < 3; l++) begin
      if (dut.u_se.ev_refused_o[l])    n_se_ref++;
      if (dut.u_se.ev_claim_ok_o[l])   n_claim++;
      if (dut.u_se.ev_release_o[l])    n_rel++;
      if (dut.u_se.ev_late_match_o[l]) n_late++;
    end
  end

  task automatic push_rt(flit_type_e t, logic [3:0] vc, logic [31:0] d);
    while (rt_full) @(negedge clk);
    @(negedge clk); rt_push = 1; rt_flit = '{vc: vc, ftype: t, data: d};
    @(negedge clk); rt_push = 0;
  endtask
  task automatic push_nrt(flit_type_e t, logic [3:0] vc, logic [31:0] d);
    while (nrt_full) @(negedge clk);
    @(negedge clk); nrt_push = 1; nrt_flit = '{vc: vc, ftype: t, data: d};
    @(negedge clk); nrt_push = 0;
  endtask
  task automatic push_link2(flit_type_e t, logic [3:0] vc, logic [31:0] d);
    @(negedge clk); push2 = 1; push2_flit = '{vc: vc, ftype: t, data: d};
    @(negedge clk); push2 = 0;
  endtask
  task automatic flits(int n);
    repeat (5 * n) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // slot table: every fourth slot real-time
    for (int s = 0; s < 16; s += 4) begin
      @(negedge clk); cfg_we = 1; cfg_slot = 4'(s); cfg_rt = 1;
    end
    @(negedge clk); cfg_we = 0;

    // connection station -> link 1 on station channel 1; first hop digit 1
    push_nrt(FT_CLAIM, 4'd1, 32'd1);
    flits(20);
    check(n_claim == 1 && dut.u_se.vc_used_o[1] == 16'h0001, "station claim mapped to link 1 channel 0");

    // a real-time connection on station channel 2 (gets link 1 channel 1)
    push_rt(FT_CLAIM, 4'd2, 32'd1);
    flits(20);
    check(n_claim == 2 && dut.u_se.vc_used_o[1] == 16'h0003, "real-time claim mapped to link 1 channel 1");

    // real-time and non-real-time data
    for (int k = 0; k < 12; k++) begin
      logic [31:0] d;
      d = 32'hA000_0000 + k;
      if (k % 3 == 0) begin exp1r.push_back(d); push_rt(FT_DATA, 4'd2, d); end
      else begin exp1.push_back(d); push_nrt(FT_DATA, 4'd1, d); end
    end
    flits(40);
    check(exp1.size() == 0 && exp1r.size() == 0, "all data delivered on link 1");
    check(n_rt > 0, "real-time flits sent in real-time slots");

    // receiver on link 1 holds its buffer: retries inside the switch
    refuse1 = 1;
    exp1.push_back(32'hB000_0001);
    push_nrt(FT_DATA, 4'd1, 32'hB000_0001);
    flits(10);
    refuse1 = 0;
    flits(10);
    check(exp1.size() == 0, "refused flit delivered after retry");

    // status code from downstream reaches the station with the next flit
    code1 = SC_ROUTE_ERROR;
    exp1.push_back(32'hC000_0001);
    push_nrt(FT_DATA, 4'd1, 32'hC000_0001);
    flits(6);
    code1 = SC_NONE;
    exp1.push_back(32'hC000_0002);
    push_nrt(FT_DATA, 4'd1, 32'hC000_0002);
    flits(6);
    exp1.push_back(32'hC000_0003);
    push_nrt(FT_DATA, 4'd1, 32'hC000_0003);
    flits(10);
    check(n_err == 1, $sformatf("downstream error reached the station (%0d)", n_err));

    // route error: claim for a link that does not exist
    push_nrt(FT_CLAIM, 4'd7, 32'd3);
    flits(6);
    push_nrt(FT_DATA, 4'd7, 32'hD000_0001);
    flits(10);
    check(n_err == 2, "route error reported to the station");

    // connection link 2 -> station (digit 0), data to the station
    push_link2(FT_CLAIM, 4'd6, 32'd0);
    flits(6);
    for (int k = 0; k < 5; k++) begin
      exp_st.push_back(32'hE000_0000 + k);
      push_link2(FT_DATA, 4'd6, 32'hE000_0000 + k);
    end
    // meanwhile real-time traffic only in the real-time slots and NRT seizing
    flits(30);
    check(exp_st.size() == 0, "all data from link 2 reached the station");

    // release station connection: forwarded, channel free
    exp1.push_back(32'hF000_0001);
    push_nrt(FT_RELEASE, 4'd1, 32'hF000_0001);
    flits(10);
    check(n_rel == 1 && dut.u_se.vc_used_o[1] == 16'h0002, "release frees link 1 channel 0");

    check(n_seize > 0, "non-real-time flit seized a real-time slot");
    check(n_sink_ref > 0 && n_se_ref > 0, "refusal and retry happened");
    check(n_code > 0, "status code returned to the station");
    $display("mechanisms: claims=%0d releases=%0d rt_slot_sends=%0d seizes=%0d refusals=%0d codes=%0d route_errors=%0d link1=%0d station=%0d",
             n_claim, n_rel, n_rt, n_seize, n_se_ref, n_code, n_err, n_got1, n_station);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
