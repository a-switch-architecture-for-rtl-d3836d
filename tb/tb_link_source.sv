// Behavioural upstream sender for testbenches.
//
// Queues flits pushed by the testbench and sends them on an 8-bit forward path
// in five phases (identification byte {vc,type}, then data MSB first), driving
// on the falling clock edge. It reads the 4-bit status from the reverse path,
// bit 0 in phase 1 to bit 3 in phase 4. A flit whose status has bit 0 set
// (refused) stays at the head and is sent again in the next flit cycle. For
// every flit sent, sent_o pulses for one cycle after phase 4 with the flit and
// its status. phase_i must be the phase of the receiving side.
module tb_link_source
  import rs_pkg::*;
(
  input  logic       clk,
  input  phase_t     phase_i,
  input  logic       push_i,
  input  flit_t      push_flit_i,
  output logic [7:0] fwd_o,
  input  logic       rev_i,
  output logic       sent_o,
  output flit_t      sent_flit_o,
  output logic [3:0] sent_stat_o,
  output int         pending_o
);
  flit_t q[$];
  flit_t cur;
  logic  active;
  logic [3:0] st;

  initial begin
    fwd_o = '0; sent_o = 1'b0; active = 1'b0; st = '0;
    sent_flit_o = '0; sent_stat_o = '0;
  end

  always @(posedge clk) if (push_i) q.push_back(push_flit_i);
  assign pending_o = q.size();

  always @(negedge clk) begin
    sent_o = 1'b0;
    case (phase_i)
      3'd0: begin
        active = q.size() > 0;
        if (active) begin cur = q[0]; fwd_o = {cur.vc, cur.ftype}; end
        else fwd_o = 8'h00;
      end
      3'd1: begin fwd_o = active ? cur.data[31:24] : 8'h00; st[0] = rev_i; end
      3'd2: begin fwd_o = active ? cur.data[23:16] : 8'h00; st[1] = rev_i; end
      3'd3: begin fwd_o = active ? cur.data[15:8]  : 8'h00; st[2] = rev_i; end
      default: begin
        fwd_o = active ? cur.data[7:0] : 8'h00;
        st[3] = rev_i;
        if (active) begin
          sent_o = 1'b1; sent_flit_o = cur; sent_stat_o = st;
          if (!st[0]) void'(q.pop_front());
        end
      end
    endcase
  end
endmodule
