// Testbench of link_tx: random flits are loaded in phase 4 and must arrive,
// byte by byte in five phases, at a behavioural receiver; the status word the
// receiver returns on the reverse path (random refusal and code) must appear on
// status_o in phase 4. Also checks that IDLE flits produce no delivery.
`define WATCHDOG_CYCLES 20000
module tb_link_tx;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic   rst_n = 0;
  phase_t phase = 0;
  flit_t  flit_in = '0, cur;
  logic [7:0] fwd;
  logic   rev;
  status_t st;
  logic   refuse = 0;
  logic [2:0] code = 0;
  logic   got, got_ref;
  flit_t  got_flit;

  always @(posedge clk) if (rst_n) phase <= (phase == 3'd4) ? 3'd0 : phase + 3'd1;

  link_tx dut (.clk, .rst_n, .phase, .flit_i(flit_in), .fwd_o(fwd), .rev_i(rev), .cur_o(cur), .status_o(st));
  tb_link_sink u_snk (.clk, .phase_i(phase), .fwd_i(fwd), .rev_o(rev), .refuse_i(refuse), .code_i(code),
    .got_o(got), .got_flit_o(got_flit), .got_refused_o(got_ref));

  flit_t sent_q [$];
  logic [3:0] word_q [$];
  int n_idle = 0, n_flit = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      // drive the next flit before the end of phase 4
      while (phase != 3'd4) @(negedge clk);
      flit_in.vc    = 4'($urandom);
      flit_in.ftype = ($urandom % 5 == 0) ? FT_IDLE : 4'($urandom_range(1, 15));
      flit_in.data  = $urandom;
      refuse = $urandom % 2; code = 3'($urandom);
      @(posedge clk);
      #1;
      check(cur == flit_in, "cur_o holds the loaded flit");
      // wait for phase 4 of its flit cycle
      while (phase != 3'd4) @(negedge clk);
      #1;
      if (flit_in.ftype != FT_IDLE) begin
        n_flit++;
        check(st == status_t'({code, refuse}), $sformatf("status %h expected %h", st, {code, refuse}));
        @(posedge clk); #1;
        check((got || got_ref) && got_flit == flit_in, $sformatf("received %h expected %h", got_flit, flit_in));
        check(got == !refuse, "refusal seen by receiver");
      end else begin
        n_idle++;
        @(posedge clk); #1;
        check(!got && !got_ref, "idle flit not delivered");
      end
    end
    check(n_idle > 0 && n_flit > 0, "both idle and real flits sent");
    finish_tb();
  end
endmodule
