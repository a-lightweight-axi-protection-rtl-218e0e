// pd_matcher - protection-domain matcher.
//
// A protection domain is given at design time by a domain ID and a domain
// mask.  The AXI ID of a transaction belongs to the domain when every ID bit
// selected by the mask equals the corresponding bit of the domain ID; bits
// outside the mask are ignored, so one master can belong to several domains
// and several masters can share one domain.  This is the matching rule of the
// design description (for example, mask 1100 / ID 1000 matches IDs 1011 and
// 1000).  Both the domain ID bits outside the mask and the comparison width
// (the AXI ID width) are free here.
//
// Interface: id_i (AXI ID) in, match_o out.
// Timing: purely combinational, no clock; it adds no cycle to a transaction.
module pd_matcher #(
  parameter int unsigned          IDW         = axi_pu_pkg::ID_W,
  parameter logic [IDW-1:0]       DOMAIN_ID   = '0,
  parameter logic [IDW-1:0]       DOMAIN_MASK = '1
) (
  input  logic [IDW-1:0] id_i,
  output logic           match_o
);

  always_comb match_o = ((id_i ^ DOMAIN_ID) & DOMAIN_MASK) == '0;

endmodule
