// Hybrid time-division-multiplexing slot scheduler of the port controller.
//
// Time on the link into the switching element is divided into frames of
// FRAME_SLOTS slots of one flit cycle each. A slot table marks every slot as a
// real-time or a non-real-time slot. In a real-time slot a real-time flit is
// sent if one is waiting; if none is, a non-real-time flit may take the unused
// slot. A non-real-time slot carries only non-real-time flits. Real-time flits
// never use non-real-time slots, so the share reserved for real-time traffic is
// set by the table alone.
//
// Interface: cfg_we/cfg_slot/cfg_rt write the slot table (all slots start as
// non-real-time). At every pulse of adv_i (once per flit cycle, at the end of
// phase 4) the decision pick_rt_o/pick_nrt_o, made combinationally for slot
// slot_o from rt_avail_i/nrt_avail_i, applies and slot_o moves to the next slot.
// seize_o marks a non-real-time flit taking a real-time slot. Frames, slot
// classes and slot seizing are the document's; the frame length and the table
// interface are this design's choice.
module htdm_scheduler
  import rs_pkg::*;
#(
  parameter int unsigned FRAME_SLOTS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv_i,
  input  logic cfg_we,
  input  logic [$clog2(FRAME_SLOTS)-1:0] cfg_slot,
  input  logic cfg_rt,
  input  logic rt_avail_i,
  input  logic nrt_avail_i,
  output logic pick_rt_o,
  output logic pick_nrt_o,
  output logic seize_o,
  output logic rt_slot_o,
  output logic [$clog2(FRAME_SLOTS)-1:0] slot_o
);
  localparam int unsigned SW = $clog2(FRAME_SLOTS);
  logic [FRAME_SLOTS-1:0] rt_tbl;

  assign rt_slot_o  = rt_tbl[slot_o];
  assign pick_rt_o  = rt_slot_o && rt_avail_i;
  assign pick_nrt_o = !pick_rt_o && nrt_avail_i;
  assign seize_o    = rt_slot_o && pick_nrt_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_tbl <= '0;
      slot_o <= '0;
    end else begin
      if (cfg_we) rt_tbl[cfg_slot] <= cfg_rt;
      if (adv_i)  slot_o <= (int'(slot_o) == FRAME_SLOTS - 1) ? '0 : slot_o + SW'(1);
    end
  end
endmodule
