// Claim unit: the switching element's administration of virtual channels.
//
// When an inlink holds the first claim flit of a connection (a claim flit on a
// channel without a mapping), it offers it here. Once per flit cycle, in phase 4,
// the claim unit takes one offer, round robin over the inlinks. The low bits of
// the claim flit's data are this stage's digit of the routing tag and name the
// outlink. The unit picks the lowest free virtual channel of that outlink, marks
// it used and writes {outlink, channel} into the inlink's mapping table; the
// claim flit is consumed. If the digit names no link or the outlink has no free
// channel, it reports a route error instead, which the inlink stores in the
// channel's status buffer. When a release flit has been passed on by an inlink,
// rel_* frees the outlink channel again.
//
// Interface (per inlink): claim_req/claim_digit in; done, map_we,
// map_entry, err_we out (combinational, valid in phase 4, acted on at its end);
// rel_en/rel_link/rel_vc in, acted on at any clock edge. Channel assignment by a
// global claim unit, route errors and release are the document's; lowest-free
// allocation, one claim per flit cycle and one digit per claim flit are this
// design's choices.
module claim_unit
  import rs_pkg::*;
#(
  parameter int unsigned N_LINKS = NUM_LINKS,
  parameter int unsigned N_VC    = NUM_VC
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic             claim_req_i   [N_LINKS],
  input  logic [1:0]       claim_digit_i [N_LINKS],
  output logic             done_o        [N_LINKS],
  output logic             map_we_o      [N_LINKS],
  output map_entry_t       map_entry_o   [N_LINKS],
  output logic             err_we_o      [N_LINKS],
  input  logic             rel_en_i      [N_LINKS],
  input  logic [1:0]       rel_link_i    [N_LINKS],
  input  logic [$clog2(N_VC)-1:0] rel_vc_i [N_LINKS],
  output logic [N_VC-1:0]  used_o        [N_LINKS]
);
  localparam int unsigned VW = $clog2(N_VC);
  logic [N_VC-1:0] used_q [N_LINKS];
  logic [1:0]      ptr_q;
  logic            any;
  logic [1:0]      who;
  logic [1:0]      dig;
  logic            found;
  logic [VW-1:0]   free_vc;

  always_comb begin
    any = 1'b0;
    who = '0;
    for (int k = 2 * N_LINKS - 1; k >= 0; k--) begin
      if (k >= int'(ptr_q) && k < int'(ptr_q) + N_LINKS && claim_req_i[k % N_LINKS]) begin
        any = 1'b1;
        who = 2'(k % N_LINKS);
      end
    end
    dig     = claim_digit_i[who];
    found   = 1'b0;
    free_vc = '0;
    if (int'(dig) < N_LINKS) begin
      for (int v = N_VC - 1; v >= 0; v--) begin
        if (!used_q[dig][v]) begin
          found   = 1'b1;
          free_vc = VW'(v);
        end
      end
    end
    for (int i = 0; i < N_LINKS; i++) begin
      done_o[i]      = (phase == LAST_PHASE) && any && int'(who) == i;
      map_we_o[i]    = done_o[i] && found;
      err_we_o[i]    = done_o[i] && !found;
      map_entry_o[i] = '{valid: 1'b1, link: dig, vc: free_vc};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LINKS; l++) used_q[l] <= '0;
      ptr_q <= '0;
    end else begin
      for (int i = 0; i < N_LINKS; i++)
        if (rel_en_i[i]) used_q[rel_link_i[i]][rel_vc_i[i]] <= 1'b0;
      if (phase == LAST_PHASE && any) begin
        if (found) used_q[dig][free_vc] <= 1'b1;
        ptr_q <= (int'(who) == N_LINKS - 1) ? 2'd0 : who + 2'd1;
      end
    end
  end

  assign used_o = used_q;
endmodule
