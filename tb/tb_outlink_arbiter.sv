// Testbench of outlink_arbiter against a reference model: random requests in
// each of the four iterations of a flit cycle. Checks the one-hot round-robin
// grant, that no grant is given once the outlink is taken, the owner reported
// in phase 4, and the once-per-flit-cycle pointer move.
`define WATCHDOG_CYCLES 40000
module tb_outlink_arbiter;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  phase_t phase = 0;
  logic [2:0] req = '0, gnt;
  logic matched;
  logic [1:0] src;
  int ptr = 0;
  int hist [3] = '{0, 0, 0};

  outlink_arbiter dut (.clk, .rst_n, .phase, .req_i(req), .gnt_o(gnt), .matched_o(matched), .src_o(src));

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int fc = 0; fc < 600; fc++) begin
      bit m_matched; int m_src;
      m_matched = 0; m_src = 0;
      for (int it = 0; it < 4; it++) begin
        int e;
        @(negedge clk);
        phase = 3'(it);
        req = 3'($urandom) & 3'($urandom);
        e = -1;
        if (!m_matched)
          for (int k = 0; k < 3; k++) if (e < 0 && req[(ptr + k) % 3]) e = (ptr + k) % 3;
        #1;
        check(gnt == ((e >= 0) ? 3'(1 << e) : 3'b000), $sformatf("grant %b expected src %0d", gnt, e));
        check(matched == m_matched, "taken flag");
        if (e >= 0) begin m_matched = 1; m_src = e; end
      end
      @(negedge clk);
      phase = 3'd4; req = 3'b111;
      #1;
      check(gnt == 3'b000, "no grant in phase 4");
      check(matched == m_matched && (!m_matched || int'(src) == m_src), "owner in phase 4");
      if (m_matched) begin ptr = (m_src + 1) % 3; hist[m_src]++; end
    end
    check(hist[0] > 0 && hist[1] > 0 && hist[2] > 0, "every inlink granted");
    finish_tb();
  end
endmodule
