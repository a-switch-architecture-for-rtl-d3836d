// Testbench of status_buffers: random writes on three ports and random
// read-and-clear accesses against a model (writes win over the clear, the
// highest write port wins); the combinational read must show the stored word.
`define WATCHDOG_CYCLES 20000
module tb_status_buffers;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0;
  logic wr_en [3];
  logic [3:0] wr_vc [3];
  status_t wr_stat [3];
  logic rd_en = 0;
  logic [3:0] rd_vc = 0;
  status_t rd_stat;
  status_t m [16];

  status_buffers dut (.clk, .rst_n, .wr_en, .wr_vc, .wr_stat, .rd_en, .rd_vc, .rd_stat_o(rd_stat));

  initial begin
    for (int w = 0; w < 3; w++) begin wr_en[w] = 0; wr_vc[w] = 0; wr_stat[w] = '0; end
    for (int v = 0; v < 16; v++) m[v] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int w = 0; w < 3; w++) begin
        wr_en[w] = ($urandom % 3 == 0); wr_vc[w] = 4'($urandom); wr_stat[w] = status_t'(4'($urandom));
      end
      rd_en = $urandom % 2; rd_vc = 4'($urandom);
      #1;
      check(rd_stat == m[rd_vc], $sformatf("read vc%0d %h expected %h", rd_vc, rd_stat, m[rd_vc]));
      @(posedge clk);
      if (rd_en) m[rd_vc] = '0;
      for (int w = 0; w < 3; w++) if (wr_en[w]) m[wr_vc[w]] = wr_stat[w];
    end
    finish_tb();
  end
endmodule
