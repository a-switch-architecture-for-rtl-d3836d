// Small flit queue of the port controller.
//
// A first-in first-out queue of DEPTH flits with its two oldest entries visible,
// so that the controller can look past a head that leaves in the same cycle.
// Interface: push_i/push_flit_i (ignored when full_o), pop_i, head0_o/head1_o
// and count_o. Timing: push and pop act at the clock edge. A design choice of
// this implementation; the document only says the controller buffers flits.
module flit_fifo
  import rs_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_i,
  input  flit_t push_flit_i,
  input  logic  pop_i,
  output flit_t head0_o,
  output flit_t head1_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic  full_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);
  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic          do_push, do_pop;

  assign full_o  = int'(count_o) == DEPTH;
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && count_o != '0;
  assign head0_o = mem[rd_q];
  assign head1_o = mem[(int'(rd_q) == DEPTH - 1) ? '0 : rd_q + AW'(1)];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_flit_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0; wr_q <= '0; count_o <= '0;
    end else begin
      if (do_push) wr_q <= (int'(wr_q) == DEPTH - 1) ? '0 : wr_q + AW'(1);
      if (do_pop)  rd_q <= (int'(rd_q) == DEPTH - 1) ? '0 : rd_q + AW'(1);
      count_o <= count_o + CW'(do_push) - CW'(do_pop);
    end
  end
endmodule
