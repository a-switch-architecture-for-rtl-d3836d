// Testbench of snake_control. A behavioural receiver plays the switching
// element's inlink (refusing flits at random and returning random codes), a
// behavioural sender plays its outlink. Checks: real-time and non-real-time
// flits arrive in order within their class; with a single real-time slot per
// 16-slot frame, real-time flits are at least 16 flit cycles apart; non-real-
// time flits use the real-time slot when no real-time flit waits; refused flits
// are re-sent and none is lost or duplicated; every flit's status is reported
// to the station with the code the receiver returned; flits from the switch
// side reach the station.
`define WATCHDOG_CYCLES 60000
module tb_snake_control;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  logic rt_push = 0, nrt_push = 0, rt_full, nrt_full, cfg_we = 0, cfg_rt = 0;
  flit_t rt_flit = '0, nrt_flit = '0;
  logic [3:0] cfg_slot = 0;
  logic [7:0] tx_fwd, rx_fwd;
  logic tx_rev, rx_rev, rx_valid, st_valid, st_ref, ev_seize, ev_rt;
  flit_t rx_flit;
  logic [3:0] st_vc;
  logic [2:0] st_code;

  snake_control dut (.clk, .rst_n, .rt_push_i(rt_push), .rt_flit_i(rt_flit), .rt_full_o(rt_full),
    .nrt_push_i(nrt_push), .nrt_flit_i(nrt_flit), .nrt_full_o(nrt_full), .cfg_we, .cfg_slot, .cfg_rt,
    .tx_fwd_o(tx_fwd), .tx_rev_i(tx_rev), .rx_fwd_i(rx_fwd), .rx_rev_o(rx_rev),
    .rx_valid_o(rx_valid), .rx_flit_o(rx_flit), .st_valid_o(st_valid), .st_vc_o(st_vc),
    .st_code_o(st_code), .st_refused_o(st_ref), .ev_seize_o(ev_seize), .ev_rt_sent_o(ev_rt));

  phase_t phase;
  assign phase = dut.phase;

  logic refuse = 0, got, got_ref;
  logic [2:0] code = 0;
  flit_t got_flit;
  tb_link_sink u_snk (.clk, .phase_i(phase), .fwd_i(tx_fwd), .rev_o(tx_rev), .refuse_i(refuse),
    .code_i(code), .got_o(got), .got_flit_o(got_flit), .got_refused_o(got_ref));

  logic push2 = 0, sent2;
  flit_t push2_flit = '0, sent2_flit;
  logic [3:0] sent2_stat;
  int pend2;
  tb_link_source u_src (.clk, .phase_i(phase), .push_i(push2), .push_flit_i(push2_flit), .fwd_o(rx_fwd),
    .rev_i(rx_rev), .sent_o(sent2), .sent_flit_o(sent2_flit), .sent_stat_o(sent2_stat), .pending_o(pend2));

  logic [31:0] exp_rt [$], exp_nrt [$], exp_st [$];
  logic [3:0] exp_word [$];
  int n_rt = 0, n_nrt = 0, n_ref = 0, n_seize = 0, n_station = 0, n_code = 0;
  longint cyc = 0, last_rt = -1000;
  always @(posedge clk) cyc++;

  // every flit on the link (accepted or refused) gives one status report
  always @(posedge clk) begin
    if (got || got_ref) exp_word.push_back({code_w_q, got_ref});
    if (got) begin
      if (got_flit.data[31]) begin
        n_rt++;
        check(exp_rt.size() > 0 && got_flit.data == exp_rt[0], "real-time order");
        if (exp_rt.size() > 0) void'(exp_rt.pop_front());
        check(cyc - last_rt >= 16 * 5, $sformatf("real-time flits %0d clocks apart", cyc - last_rt));
        last_rt = cyc;
      end else begin
        n_nrt++;
        check(exp_nrt.size() > 0 && got_flit.data == exp_nrt[0], "non-real-time order");
        if (exp_nrt.size() > 0) void'(exp_nrt.pop_front());
      end
    end
    if (got_ref) n_ref++;
    if (sent2) check(sent2_stat == 4'h0, "switch-side flits are never refused");
    if (ev_seize) n_seize++;
    if (rx_valid) begin
      n_station++;
      check(exp_st.size() > 0 && rx_flit.data == exp_st[0], "flit to the station");
      if (exp_st.size() > 0) void'(exp_st.pop_front());
    end
  end

  // code sampled by the receiver for the flit now on the link
  logic [2:0] code_w_q;
  always @(negedge clk) if (phase == 3'd0) code_w_q <= code;

  // status report to the station follows the receiver's answer
  always @(posedge clk) begin
    if (st_valid) begin
      #2;
      if (exp_word.size() == 0) check(0, "status report without flit");
      else begin
        check({st_code, st_ref} == exp_word[0], $sformatf("status %h expected %h", {st_code, st_ref}, exp_word[0]));
        void'(exp_word.pop_front());
      end
      if (st_code != 0) n_code++;
    end
  end

  always @(negedge clk) begin
    refuse = ($urandom % 4 == 0);
    code   = ($urandom % 5 == 0) ? 3'($urandom_range(1, 7)) : 3'd0;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_slot = 0; cfg_rt = 1;
    @(negedge clk); cfg_we = 0;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      if (!rt_full && k % 2 == 0 && k < 30) begin
        rt_push = 1; rt_flit = '{vc: 4'd1, ftype: FT_DATA, data: 32'h8000_0000 | k};
        exp_rt.push_back(32'h8000_0000 | k);
      end
      if (!nrt_full) begin
        nrt_push = 1; nrt_flit = '{vc: 4'd2, ftype: FT_DATA, data: 32'h0000_0000 | k};
        exp_nrt.push_back(k);
      end
      if (k % 6 == 0) begin
        push2 = 1; push2_flit = '{vc: 4'(k), ftype: FT_DATA, data: 32'h5500_0000 | k};
        exp_st.push_back(32'h5500_0000 | k);
      end
      @(negedge clk);
      rt_push = 0; nrt_push = 0; push2 = 0;
      repeat (20) @(negedge clk);
    end
    while (exp_rt.size() > 0 || exp_nrt.size() > 0) @(negedge clk);
    repeat (40) @(negedge clk);
    check(exp_st.size() == 0, "all switch-side flits reached the station");
    check(n_ref > 0 && n_seize > 0 && n_code > 0 && n_rt > 0 && n_nrt > 0, "all mechanisms seen");
    $display("rt=%0d nrt=%0d refused=%0d seizes=%0d codes=%0d station=%0d", n_rt, n_nrt, n_ref, n_seize, n_code, n_station);
    finish_tb();
  end
endmodule
