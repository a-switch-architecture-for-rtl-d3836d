// Testbench of crossbar: random input flits and selections; every output must
// carry the selected input's flit, or an IDLE flit when not selected.
`define WATCHDOG_CYCLES 20000
module tb_crossbar;
  import rs_pkg::*;
  `include "tb_common.svh"

  flit_t in_f [3], out_f [3];
  logic  sv [3];
  logic [1:0] ss [3];

  crossbar dut (.in_flit_i(in_f), .sel_valid_i(sv), .sel_src_i(ss), .out_flit_o(out_f));

  initial begin
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 3; i++) begin
        in_f[i] = '{vc: 4'($urandom), ftype: 4'($urandom_range(1, 15)), data: $urandom};
        sv[i] = $urandom % 4 != 0; ss[i] = 2'($urandom_range(0, 2));
      end
      #1;
      for (int o = 0; o < 3; o++) begin
        if (sv[o]) check(out_f[o] == in_f[ss[o]], $sformatf("out %0d from in %0d", o, ss[o]));
        else       check(out_f[o].ftype == FT_IDLE, $sformatf("out %0d idle", o));
      end
    end
    finish_tb();
  end
endmodule
