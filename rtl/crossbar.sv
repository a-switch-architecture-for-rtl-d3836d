// Crossbar between the input and output sections of a switching element.
//
// For every outlink, passes the flit offered by the inlink its arbiter granted
// (sel_src_i) when sel_valid_i is set, and an IDLE flit otherwise. Purely
// combinational; it is sampled by the outlink transmitters at the end of phase 4.
// The crossbar between the sections is the document's; carrying a whole 40-bit
// flit at once is this design's choice.
module crossbar
  import rs_pkg::*;
#(
  parameter int unsigned N_IN  = NUM_LINKS,
  parameter int unsigned N_OUT = NUM_LINKS
) (
  input  flit_t      in_flit_i   [N_IN],
  input  logic       sel_valid_i [N_OUT],
  input  logic [1:0] sel_src_i   [N_OUT],
  output flit_t      out_flit_o  [N_OUT]
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_flit_o[o] = '{vc: '0, ftype: FT_IDLE, data: '0};
      for (int i = 0; i < N_IN; i++)
        if (sel_valid_i[o] && int'(sel_src_i[o]) == i) out_flit_o[o] = in_flit_i[i];
    end
  end
endmodule
