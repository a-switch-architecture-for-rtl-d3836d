// Testbench of inlink_scheduler against a reference model: random candidate
// sets, outlink mappings, busy outlinks and grants in each of the four
// iterations. Checks the request (round robin from the pointer, skipping busy
// outlinks), that a granted inlink stops requesting, the result in phase 4,
// the iteration of the match, and that the pointer moves only once per flit
// cycle, to the buffer after the granted one.
`define WATCHDOG_CYCLES 40000
module tb_inlink_scheduler;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  phase_t phase = 0;
  logic [15:0] cand = '0;
  logic [1:0]  link_of [16];
  logic [2:0]  busy = '0;
  logic        grant = 0;
  logic        req, matched;
  logic [1:0]  req_link, sel_link, iter;
  logic [3:0]  req_vc, sel_vc;

  inlink_scheduler dut (.clk, .rst_n, .phase, .cand_i(cand), .link_of_i(link_of), .out_busy_i(busy),
    .grant_i(grant), .req_o(req), .req_link_o(req_link), .req_vc_o(req_vc),
    .matched_o(matched), .sel_vc_o(sel_vc), .sel_link_o(sel_link), .match_iter_o(iter));

  int ptr = 0;
  int n_late = 0, n_match = 0;

  initial begin
    for (int v = 0; v < 16; v++) link_of[v] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int fc = 0; fc < 500; fc++) begin
      bit m_matched; int m_sel, m_iter;
      m_matched = 0; m_sel = 0; m_iter = 0;
      for (int it = 0; it < 4; it++) begin
        int exp_v;
        @(negedge clk);
        phase = 3'(it);
        if (it == 0) begin
          cand = 16'($urandom) & 16'($urandom);
          for (int v = 0; v < 16; v++) link_of[v] = 2'($urandom_range(0, 2));
          busy = '0;
        end
        busy = busy | (3'($urandom) & 3'($urandom));
        grant = $urandom % 2;
        exp_v = -1;
        if (!m_matched)
          for (int k = 0; k < 16; k++) begin
            int v;
            v = (ptr + k) % 16;
            if (exp_v < 0 && cand[v] && !busy[link_of[v]]) exp_v = v;
          end
        #1;
        check(req == (exp_v >= 0), $sformatf("fc%0d it%0d request %0d expected %0d", fc, it, req, exp_v >= 0));
        if (exp_v >= 0) check(int'(req_vc) == exp_v && req_link == link_of[exp_v],
                              $sformatf("requested vc%0d expected vc%0d", req_vc, exp_v));
        if (exp_v >= 0 && grant) begin m_matched = 1; m_sel = exp_v; m_iter = it; end
      end
      @(negedge clk);
      phase = 3'd4; grant = 0;
      #1;
      check(matched == m_matched, "matched in phase 4");
      check(!req, "no request in phase 4");
      if (m_matched) begin
        n_match++; if (m_iter > 0) n_late++;
        check(int'(sel_vc) == m_sel && sel_link == link_of[m_sel] && int'(iter) == m_iter, "selection result");
        ptr = (m_sel + 1) % 16;
      end
    end
    check(n_late > 0 && n_match > 0, "matches in first and later iterations");
    finish_tb();
  end
endmodule
