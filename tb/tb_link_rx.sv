// Testbench of link_rx: a behavioural sender sends random flits on random
// channels. The testbench plays the inlink: it answers the phase-0 status
// lookup from a model table of status words (random codes and full flags).
// Checks: the lookup names the flit's channel; the status word the sender reads
// from the reverse path equals the table entry; an accepted flit is presented
// complete in phase 4 with flit_valid_o, a refused one is not; IDLE phases make
// no lookup.
`define WATCHDOG_CYCLES 40000
module tb_link_rx;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic   rst_n = 0;
  phase_t phase = 0;
  logic [7:0] fwd;
  logic   rev;
  logic   lk_en;
  logic [3:0] lk_vc;
  status_t lk_status;
  flit_t  flit;
  logic   valid;
  logic   push = 0;
  flit_t  push_flit = '0;
  logic   sent;
  flit_t  sent_flit;
  logic [3:0] sent_stat;
  int     pend;
  logic [3:0] tbl [16];

  always @(posedge clk) if (rst_n) phase <= (phase == 3'd4) ? 3'd0 : phase + 3'd1;

  link_rx dut (.clk, .rst_n, .phase, .fwd_i(fwd), .rev_o(rev), .lk_en_o(lk_en), .lk_vc_o(lk_vc),
    .lk_status_i(lk_status), .flit_o(flit), .flit_valid_o(valid));
  tb_link_source u_src (.clk, .phase_i(phase), .push_i(push), .push_flit_i(push_flit), .fwd_o(fwd),
    .rev_i(rev), .sent_o(sent), .sent_flit_o(sent_flit), .sent_stat_o(sent_stat), .pending_o(pend));

  assign lk_status = status_t'(tbl[lk_vc]);

  int n_acc = 0, n_ref = 0, n_look = 0;
  flit_t last_valid;
  logic  saw_valid = 0;

  always @(posedge clk) begin
    if (lk_en) begin
      n_look++;
      check(phase == 3'd0, "lookup only in phase 0");
    end
    if (valid) begin
      check(phase == 3'd4, "flit valid only in phase 4");
      last_valid <= flit; saw_valid <= 1;
    end
  end

  initial begin
    for (int v = 0; v < 16; v++) tbl[v] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      flit_t f;
      f.vc = 4'($urandom); f.ftype = 4'($urandom_range(1, 15)); f.data = $urandom;
      tbl[f.vc] = 4'($urandom);
      if ($urandom % 3 == 0) tbl[f.vc][0] = 1'b0;
      saw_valid = 0;
      @(negedge clk); push = 1; push_flit = f;
      @(negedge clk); push = 0;
      @(posedge clk iff sent); #1;
      check(sent_flit == f, "sender sent the flit");
      check(sent_stat == tbl[f.vc], $sformatf("status %h expected %h", sent_stat, tbl[f.vc]));
      if (tbl[f.vc][0]) begin
        n_ref++;
        check(!saw_valid, "refused flit not delivered");
        tbl[f.vc][0] = 1'b0;  // let the retry through
        @(posedge clk iff sent); #1;
      end
      n_acc++;
      check(saw_valid && last_valid == f, $sformatf("delivered %h expected %h", last_valid, f));
    end
    // idle link: no lookups
    begin
      int n_before;
      n_before = n_look;
      repeat (50) @(posedge clk);
      check(n_look == n_before, "no lookup on an idle link");
    end
    check(n_ref > 0 && n_acc > 0, "refused and accepted flits seen");
    finish_tb();
  end
endmodule
