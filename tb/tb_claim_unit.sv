// Testbench of claim_unit against a reference model: random claims from the
// three inlinks (digits 0..3) and random releases of channels in use. Checks
// that one claim per flit cycle is served round robin over the inlinks, that it
// gets the lowest free channel of the named outlink, that a digit naming no link
// or a full outlink gives a route error, and that released channels are reused.
`define WATCHDOG_CYCLES 40000
module tb_claim_unit;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  phase_t phase = 0;
  logic creq [3], done [3], mwe [3], ewe [3], rel [3];
  logic [1:0] dig [3], rlink [3];
  logic [3:0] rvc [3];
  map_entry_t ment [3];
  logic [15:0] used [3];
  logic [15:0] m_used [3];
  int ptr = 0, n_ok = 0, n_err = 0, n_full_err = 0, n_rel = 0;

  claim_unit dut (.clk, .rst_n, .phase, .claim_req_i(creq), .claim_digit_i(dig), .done_o(done),
    .map_we_o(mwe), .map_entry_o(ment), .err_we_o(ewe), .rel_en_i(rel), .rel_link_i(rlink),
    .rel_vc_i(rvc), .used_o(used));

  initial begin
    for (int i = 0; i < 3; i++) begin creq[i] = 0; dig[i] = 0; rel[i] = 0; rlink[i] = 0; rvc[i] = 0; m_used[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int fc = 0; fc < 1500; fc++) begin
      int who, d, fv;
      @(negedge clk);
      phase = 3'd4;
      for (int i = 0; i < 3; i++) begin
        creq[i] = $urandom % 2;
        dig[i]  = ($urandom % 8 == 0) ? 2'd3 : 2'($urandom_range(0, 2));
        rel[i]  = 0;
      end
      // releases: at most one per outlink, of a channel in use
      for (int i = 0; i < 3; i++)
        if ($urandom % 12 == 0 && m_used[i] != 0) begin
          int v;
          v = $urandom % 16;
          while (!m_used[i][v]) v = (v + 1) % 16;
          rel[i] = 1; rlink[i] = 2'(i); rvc[i] = 4'(v);
        end
      who = -1;
      for (int k = 0; k < 3; k++) if (who < 0 && creq[(ptr + k) % 3]) who = (ptr + k) % 3;
      fv = -1;
      if (who >= 0) begin
        d = int'(dig[who]);
        if (d < 3) for (int v = 0; v < 16; v++) if (fv < 0 && !m_used[d][v]) fv = v;
      end
      #1;
      for (int i = 0; i < 3; i++) begin
        check(done[i] == (i == who), $sformatf("fc%0d done[%0d]", fc, i));
        check(mwe[i] == (i == who && fv >= 0), "map write");
        check(ewe[i] == (i == who && fv < 0), "route error");
      end
      if (who >= 0 && fv >= 0) begin
        n_ok++;
        check(ment[who].valid && int'(ment[who].link) == d && int'(ment[who].vc) == fv,
              $sformatf("entry %p expected link %0d vc %0d", ment[who], d, fv));
      end
      if (who >= 0 && fv < 0) begin n_err++; if (d < 3) n_full_err++; end
      @(posedge clk);
      for (int i = 0; i < 3; i++) if (rel[i]) begin m_used[i][rvc[i]] = 0; n_rel++; end
      if (who >= 0) begin
        if (fv >= 0) m_used[d][fv] = 1;
        ptr = (who + 1) % 3;
      end
      #1;
      for (int i = 0; i < 3; i++) check(used[i] == m_used[i], "channel use table");
      // four phases without a decision
      @(negedge clk);
      phase = 3'd0;
      for (int i = 0; i < 3; i++) rel[i] = 0;
      #1;
      for (int i = 0; i < 3; i++) check(!done[i], "no decision outside phase 4");
      repeat (3) @(negedge clk);
    end
    check(n_ok > 0 && n_err > 0 && n_full_err > 0 && n_rel > 0, "all cases seen");
    finish_tb();
  end
endmodule
