// Inlink receiver of the physical channel.
//
// Reassembles a flit from the five phases on the 8-bit forward path and returns
// the status of its virtual channel on the 1-bit reverse path during the four
// data phases (bit 0 in phase 1 ... bit 3 in phase 4).
//
// Timing: the identification byte on fwd_i in phase 0 names the channel. In that
// same cycle lk_en_o/lk_vc_o ask the inlink for the channel's status word (the
// inlink reads and clears its stored status code and reports in bit 0 whether the
// channel's flit buffer is still occupied). The word is registered at the end of
// phase 0 and shifted out on rev_o. If bit 0 was set the flit is refused: it is
// not delivered and the sender keeps it. Otherwise, in phase 4, flit_o is the
// complete flit (the last byte taken straight from fwd_i) and flit_valid_o asks
// the inlink to store it at the end of that cycle. IDLE flits are ignored and get
// an all-zero status. The status-per-flit scheme is the document's; the refuse
// bit and the timing are this design's choice.
module link_rx
  import rs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  phase,
  input  logic [7:0] fwd_i,
  output logic    rev_o,
  output logic    lk_en_o,   // phase 0: read and clear the status of lk_vc_o
  output logic [VC_W-1:0] lk_vc_o,
  input  status_t lk_status_i,
  output flit_t   flit_o,
  output logic    flit_valid_o
);
  logic [7:0]  id_q;
  logic [23:0] data_q;
  status_t     word_q;

  assign lk_vc_o = fwd_i[7:4];
  assign lk_en_o = (phase == 3'd0) && (fwd_i[3:0] != FT_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q   <= {4'h0, FT_IDLE};
      data_q <= '0;
      word_q <= '0;
      rev_o  <= 1'b0;
    end else begin
      case (phase)
        3'd0: begin
          id_q   <= fwd_i;
          word_q <= lk_en_o ? lk_status_i : status_t'('0);
          rev_o  <= lk_en_o ? lk_status_i.refused : 1'b0;
        end
        3'd1, 3'd2, 3'd3: begin
          data_q <= {data_q[15:0], fwd_i};
          rev_o  <= word_q[2'(phase)];
        end
        default: rev_o <= 1'b0;
      endcase
    end
  end

  assign flit_o       = '{vc: id_q[7:4], ftype: id_q[3:0], data: {data_q, fwd_i}};
  assign flit_valid_o = (phase == LAST_PHASE) && (id_q[3:0] != FT_IDLE) && !word_q.refused;
endmodule
