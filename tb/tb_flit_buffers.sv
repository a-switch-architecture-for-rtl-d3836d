// Testbench of flit_buffers: random writes and clear masks against a model of
// 16 one-flit buffers with full flags (write wins over clear).
`define WATCHDOG_CYCLES 20000
module tb_flit_buffers;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0, wr_en = 0;
  logic [3:0] wr_vc = 0;
  slot_t wr_slot = '0;
  logic [15:0] clr = '0, full;
  slot_t slots [16];
  slot_t m_slot [16];
  logic [15:0] m_full;

  flit_buffers dut (.clk, .rst_n, .wr_en, .wr_vc, .wr_slot, .clr_i(clr), .full_o(full), .slot_o(slots));

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    m_full = '0;
    check(full == 16'h0, "empty after reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom % 2; wr_vc = 4'($urandom);
      wr_slot = '{ftype: 4'($urandom), data: $urandom};
      clr = 16'($urandom) & 16'($urandom);
      @(posedge clk);
      for (int v = 0; v < 16; v++) begin
        if (wr_en && wr_vc == 4'(v)) begin m_full[v] = 1; m_slot[v] = wr_slot; end
        else if (clr[v]) m_full[v] = 0;
      end
      #1;
      check(full == m_full, $sformatf("full %h expected %h", full, m_full));
      for (int v = 0; v < 16; v++)
        if (m_full[v]) check(slots[v] == m_slot[v], $sformatf("buffer %0d contents", v));
    end
    finish_tb();
  end
endmodule
