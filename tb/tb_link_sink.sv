// Behavioural downstream receiver for testbenches.
//
// Reads flits from an 8-bit forward path in five phases and answers each
// non-idle flit on the reverse path with the 4-bit status {code_i, refuse_i}
// sampled in phase 0, bit k driven from the falling edge of phase k+1 so that
// it is stable when the sender samples it at the end of that phase. An accepted flit is
// reported by got_o for one cycle after phase 4. phase_i must be the phase of
// the sending side.
module tb_link_sink
  import rs_pkg::*;
(
  input  logic       clk,
  input  phase_t     phase_i,
  input  logic [7:0] fwd_i,
  output logic       rev_o,
  input  logic       refuse_i,
  input  logic [2:0] code_i,
  output logic       got_o,
  output flit_t      got_flit_o,
  output logic       got_refused_o
);
  logic [7:0]  id;
  logic [31:0] d;
  logic [3:0]  w;

  initial begin rev_o = 1'b0; got_o = 1'b0; got_refused_o = 1'b0; got_flit_o = '0; end

  always @(negedge clk) begin
    got_o = 1'b0; got_refused_o = 1'b0;
    case (phase_i)
      3'd0: begin
        id = fwd_i;
        w  = (fwd_i[3:0] != FT_IDLE) ? {code_i, refuse_i} : 4'h0;
        rev_o = 1'b0;
      end
      3'd1: begin d[31:24] = fwd_i; rev_o = w[0]; end
      3'd2: begin d[23:16] = fwd_i; rev_o = w[1]; end
      3'd3: begin d[15:8]  = fwd_i; rev_o = w[2]; end
      default: begin
        d[7:0] = fwd_i; rev_o = w[3];
        if (id[3:0] != FT_IDLE) begin
          got_flit_o = '{vc: id[7:4], ftype: id[3:0], data: d};
          if (w[0]) got_refused_o = 1'b1; else got_o = 1'b1;
        end
      end
    endcase
  end
endmodule
