// policy_check - grant decision of the Protection Unit for one channel.
//
// One pd_matcher per protection domain compares the AXI ID with the domain
// tables, one mr_matcher per memory region compares the burst's address range
// with the region tables.  Entry (d, m) of the run-time access policy says
// whether domain d may access region m on this channel.  The request is
// granted when at least one matched domain has permission for at least one
// matched region: OR over d, m of (pd_match[d] & mr_match[m] & policy[d][m]).
// With nothing matched, or no rule set, it is denied.  This whole structure,
// and the split into design-time domains/regions and run-time policies, follow
// the design description; two instances exist in a Protection Unit, one for
// reads (AR) and one for writes (AW).
//
// Interface: AXI ID, ADDR, LEN and SIZE of the request; the NUM_PD x NUM_MR
// policy matrix (policy_i[d][m]); granted_o, plus the matched domains and
// regions for inspection.
// Timing: purely combinational; no flip-flops, no added cycle.
module policy_check
  import axi_pu_pkg::*;
#(
  parameter int unsigned  NUM_PD  = MAX_PD,
  parameter int unsigned  NUM_MR  = MAX_MR,
  parameter pd_id_arr_t   PD_ID   = default_pd_id(),
  parameter pd_id_arr_t   PD_MASK = default_pd_mask(),
  parameter mr_base_arr_t MR_BASE = default_mr_base(),
  parameter mr_lsb_arr_t  MR_LSB  = default_mr_lsb()
) (
  input  id_t                           id_i,
  input  addr_t                         addr_i,
  input  len_t                          len_i,
  input  size_t                         size_i,
  input  logic [NUM_PD-1:0][NUM_MR-1:0] policy_i,
  output logic [NUM_PD-1:0]             pd_match_o,
  output logic [NUM_MR-1:0]             mr_match_o,
  output logic                          granted_o
);

  for (genvar d = 0; d < NUM_PD; d++) begin : g_pd
    pd_matcher #(
      .IDW        (ID_W),
      .DOMAIN_ID  (PD_ID[d]),
      .DOMAIN_MASK(PD_MASK[d])
    ) u_pd (
      .id_i   (id_i),
      .match_o(pd_match_o[d])
    );
  end

  for (genvar m = 0; m < NUM_MR; m++) begin : g_mr
    mr_matcher #(
      .AW  (ADDR_W),
      .BASE(MR_BASE[m]),
      .LSB (int'(MR_LSB[m]))
    ) u_mr (
      .addr_i (addr_i),
      .len_i  (len_i),
      .size_i (size_i),
      .match_o(mr_match_o[m])
    );
  end

  always_comb begin
    granted_o = 1'b0;
    for (int d = 0; d < NUM_PD; d++) begin
      if (pd_match_o[d] && |(mr_match_o & policy_i[d])) granted_o = 1'b1;
    end
  end

  initial begin
    assert (NUM_PD >= 1 && NUM_PD <= MAX_PD) else $error("NUM_PD must be 1..16");
    assert (NUM_MR >= 1 && NUM_MR <= MAX_MR) else $error("NUM_MR must be 1..16");
  end

endmodule
