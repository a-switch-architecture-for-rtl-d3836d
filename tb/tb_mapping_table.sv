// Testbench of mapping_table: random entry writes and invalidations against a
// model; every entry is compared after every clock.
`define WATCHDOG_CYCLES 20000
module tb_mapping_table;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0, we = 0, inv_en = 0;
  logic [3:0] wvc = 0, inv_vc = 0;
  map_entry_t wentry = '0;
  map_entry_t ent [16], m [16];

  mapping_table dut (.clk, .rst_n, .we, .wvc, .wentry, .inv_en, .inv_vc, .entries_o(ent));

  initial begin
    for (int v = 0; v < 16; v++) m[v] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wvc = 4'($urandom);
      wentry = '{valid: 1'($urandom), link: 2'($urandom_range(0, 2)), vc: 4'($urandom)};
      inv_en = $urandom % 3 == 0; inv_vc = 4'($urandom);
      @(posedge clk);
      if (inv_en) m[inv_vc].valid = 1'b0;
      if (we) m[wvc] = wentry;
      #1;
      for (int v = 0; v < 16; v++) begin
        check(ent[v].valid == m[v].valid, $sformatf("entry %0d valid", v));
        if (m[v].valid) check(ent[v] == m[v], $sformatf("entry %0d contents", v));
      end
    end
    finish_tb();
  end
endmodule
