// Outlink transmitter of the physical channel.
//
// A physical channel has an 8-bit forward path and a 1-bit reverse path. A flit
// is sent in five phases: the identification byte {vc, type} in phase 0, then the
// four data bytes, most significant first. While the data bytes go out, the
// receiver returns the 4-bit status of the addressed virtual channel on the
// reverse path, one bit per data phase, bit 0 first.
//
// Timing: at the clock edge that ends phase 4, flit_i is loaded (an FT_IDLE flit
// sends nothing) and its identification byte is registered onto fwd_o; during
// phase p fwd_o holds byte p. The reverse bit is sampled at the ends of phases
// 1 to 3; during phase 4 status_o combines those bits with the live reverse bit,
// so the full status of the flit in transit (cur_o) is valid in phase 4.
// The five-phase format and the 4-bit reverse status are the document's; the
// byte and bit order are this design's choice.
module link_tx
  import rs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  phase,
  input  flit_t   flit_i,   // flit for the next flit cycle, taken in phase 4
  output logic [7:0] fwd_o, // forward path
  input  logic    rev_i,    // reverse path
  output flit_t   cur_o,    // flit now on the link
  output status_t status_o  // its status, complete in phase 4
);
  flit_t      cur_q;
  logic [2:0] st_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q <= '{vc: '0, ftype: FT_IDLE, data: '0};
      fwd_o <= '0;
      st_q  <= '0;
    end else begin
      if (phase == LAST_PHASE) begin
        cur_q <= flit_i;
        fwd_o <= flit_byte(flit_i, 3'd0);
      end else begin
        fwd_o <= flit_byte(cur_q, phase + 3'd1);
      end
      if (phase >= 3'd1 && phase <= 3'd3) st_q[2'(phase - 3'd1)] <= rev_i;
    end
  end

  assign cur_o    = cur_q;
  assign status_o = status_t'({rev_i, st_q});
endmodule
