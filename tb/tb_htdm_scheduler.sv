// Testbench of htdm_scheduler: programs a random slot table, then in every
// slot offers random real-time and non-real-time availability. Checks against
// a model that real-time flits go only in real-time slots, non-real-time flits
// take non-real-time slots and unused real-time slots, the slot counter wraps
// after FRAME_SLOTS slots, and the number of real-time sends per frame never
// exceeds the number of real-time slots.
`define WATCHDOG_CYCLES 40000
module tb_htdm_scheduler;
  import rs_pkg::*;
  `include "tb_common.svh"

  logic rst_n = 0, adv = 0, cfg_we = 0, cfg_rt = 0, rt_av = 0, nrt_av = 0;
  logic [3:0] cfg_slot = 0, slot;
  logic pick_rt, pick_nrt, seize, rt_slot;
  logic [15:0] tbl;
  int m_slot = 0, n_seize = 0, n_rt = 0, n_nrt = 0, rt_in_frame = 0;

  htdm_scheduler dut (.clk, .rst_n, .adv_i(adv), .cfg_we, .cfg_slot, .cfg_rt,
    .rt_avail_i(rt_av), .nrt_avail_i(nrt_av), .pick_rt_o(pick_rt), .pick_nrt_o(pick_nrt),
    .seize_o(seize), .rt_slot_o(rt_slot), .slot_o(slot));

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    tbl = 16'($urandom);
    for (int s = 0; s < 16; s++) begin
      @(negedge clk); cfg_we = 1; cfg_slot = 4'(s); cfg_rt = tbl[s];
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 16 * 40; n++) begin
      bit e_rt, e_nrt;
      @(negedge clk);
      rt_av = $urandom % 2; nrt_av = $urandom % 2; adv = 1;
      e_rt  = tbl[m_slot] && rt_av;
      e_nrt = !e_rt && nrt_av;
      #1;
      check(int'(slot) == m_slot, "slot counter");
      check(rt_slot == tbl[m_slot], "slot class");
      check(pick_rt == e_rt && pick_nrt == e_nrt, $sformatf("slot %0d picks rt=%0d nrt=%0d", m_slot, pick_rt, pick_nrt));
      check(seize == (tbl[m_slot] && e_nrt), "seize flag");
      check(!(pick_rt && pick_nrt), "one flit per slot");
      if (pick_rt) begin n_rt++; rt_in_frame++; end
      if (pick_nrt) n_nrt++;
      if (seize) n_seize++;
      m_slot = (m_slot + 1) % 16;
      if (m_slot == 0) begin
        check(rt_in_frame <= $countones(tbl), "real-time sends bounded by real-time slots");
        rt_in_frame = 0;
      end
      @(negedge clk); adv = 0;   // a clock without slot advance
      #1;
      check(int'(slot) == m_slot, "slot held without advance");
    end
    check(n_rt > 0 && n_nrt > 0 && n_seize > 0, "all slot uses seen");
    finish_tb();
  end
endmodule
