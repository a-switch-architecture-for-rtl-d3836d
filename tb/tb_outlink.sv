// Testbench of outlink. Random requests from three inlinks in the scheduling
// iterations; the testbench plays the crossbar (offering a distinct flit per
// inlink) and a behavioural receiver on the link that answers with random
// status words. Checks: exactly one inlink is granted per flit cycle when any
// requests, grants rotate, the granted inlink's flit arrives on the link in the
// next flit cycle, an idle flit cycle delivers nothing, and status_o in phase 4
// equals the receiver's answer.
`define WATCHDOG_CYCLES 60000
module tb_outlink;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  phase_t phase = 0;
  always @(posedge clk) if (rst_n) phase <= (phase == 3'd4) ? 3'd0 : phase + 3'd1;

  logic [2:0] req = 0, gnt;
  logic busy, sel_valid, rev, got, got_ref, refuse = 0;
  logic [1:0] sel_src;
  logic [2:0] code = 0;
  logic [7:0] fwd;
  flit_t flit_in, cur, got_flit;
  flit_t offer [3];
  status_t st;

  assign flit_in = sel_valid ? offer[sel_src] : '{vc: 4'd0, ftype: FT_IDLE, data: 32'd0};

  outlink dut (.clk, .rst_n, .phase, .req_i(req), .gnt_o(gnt), .busy_o(busy), .sel_valid_o(sel_valid),
    .sel_src_o(sel_src), .flit_i(flit_in), .fwd_o(fwd), .rev_i(rev), .status_o(st), .cur_o(cur));
  tb_link_sink u_snk (.clk, .phase_i(phase), .fwd_i(fwd), .rev_o(rev), .refuse_i(refuse), .code_i(code),
    .got_o(got), .got_flit_o(got_flit), .got_refused_o(got_ref));

  int n_g [3] = '{0, 0, 0};
  int n_idle = 0;

  initial begin
    flit_t expq [$];
    logic [3:0] wexp [$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk iff phase == 3'd4);
    for (int fc = 0; fc < 400; fc++) begin
      int granted;
      granted = -1;
      // phases 0..3: iterations
      for (int it = 0; it < 4; it++) begin
        @(negedge clk);
        if (it == 0) begin
          for (int i = 0; i < 3; i++) offer[i] = '{vc: 4'($urandom), ftype: FT_DATA, data: {8'(i), 24'($urandom)}};
        end
        if (it == 2) begin refuse = $urandom % 2; code = 3'($urandom); end
        req = (granted >= 0 || $urandom % 4 == 0) ? 3'b000 : 3'($urandom);
        #1;
        check($countones(gnt) <= 1, "one-hot grant");
        check((gnt & ~req) == 0, "grant only to a requester");
        if (granted < 0 && req != 0) check(gnt != 0, "some requester granted");
        if (granted >= 0) check(gnt == 0, "no second grant");
        for (int i = 0; i < 3; i++) if (gnt[i]) granted = i;
      end
      @(negedge clk); req = 0;   // phase 4
      #1;
      // the flit on the link now (chosen in the previous flit cycle)
      if (wexp.size() > 0) begin
        check(st == status_t'(wexp[0]), $sformatf("status %h expected %h", st, wexp[0]));
        void'(wexp.pop_front());
      end
      if (granted >= 0) begin
        n_g[granted]++;
        expq.push_back(offer[granted]);
        wexp.push_back({code, refuse});   // answer given in the next flit cycle's phase 0
      end else begin
        n_idle++;
        expq.push_back('{vc: 4'd0, ftype: FT_IDLE, data: 32'd0});
        wexp.push_back(4'hf);  // placeholder, not checked
      end
      @(posedge clk); #1;
      check(cur == expq[0], "flit loaded for the next flit cycle");
      if (expq[0].ftype == FT_IDLE) void'(wexp.pop_back());
      if (expq[0].ftype == FT_IDLE) wexp.push_back(4'h0);
      void'(expq.pop_front());
    end
    check(n_g[0] > 0 && n_g[1] > 0 && n_g[2] > 0 && n_idle > 0, "every inlink granted, idle cycles seen");
    finish_tb();
  end

  // every delivered flit must be what was loaded
  always @(posedge clk) if (got) check(got_flit.data[31:24] < 8'd3, "delivered flit came from an inlink");
endmodule
