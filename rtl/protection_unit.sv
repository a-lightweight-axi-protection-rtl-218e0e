// protection_unit - lightweight AXI4 Protection Unit (PU).
//
// Sits in one AXI4 connection (in front of a master, in front of a slave or
// between two interconnects) and lets a transaction through only if the
// run-time access policy allows its master to touch its address range.
// Masters are grouped, at design time, into protection domains (PD_ID /
// PD_MASK applied to the AXI ID); addresses are grouped into aligned memory
// regions (MR_BASE / MR_LSB).  At run time a read policy and a write policy,
// each a NUM_PD x NUM_MR bit matrix, are written through the AXI4-Lite
// configuration port.
//
// Structure, as in the design description: the configuration block
// (pu_config) holds the policies and drives them to two policy checks, one on
// the AR channel with the read policy and one on the AW channel with the
// write policy.  Their decisions steer an AXI demultiplexer: granted requests
// go to the downstream master port unchanged, denied ones to an internal
// error slave that completes them with an error response.  PDs and MRs are
// parameters (fixed at synthesis), and only the policies are registers.
//
// Ports: slv_req_i / slv_resp_o face the upstream master; mst_req_o /
// mst_resp_i face the downstream slave, with the same AXI parameters;
// cfg_req_i / cfg_resp_o is the AXI4-Lite configuration port (register map in
// pu_config).  Only the first NUM_PD / NUM_MR entries of the tables are used.
//
// Timing: the grant decision is combinational, so a granted AW or AR leaves
// the downstream port in the cycle it arrives (zero added latency); W beats
// follow once their AW has been accepted.  After reset all policies are 0 and
// every request is denied.
module protection_unit
  import axi_pu_pkg::*;
#(
  parameter int unsigned  NUM_PD    = MAX_PD,
  parameter int unsigned  NUM_MR    = MAX_MR,
  parameter pd_id_arr_t   PD_ID     = default_pd_id(),
  parameter pd_id_arr_t   PD_MASK   = default_pd_mask(),
  parameter mr_base_arr_t MR_BASE   = default_mr_base(),
  parameter mr_lsb_arr_t  MR_LSB    = default_mr_lsb(),
  parameter int unsigned  MAX_TRANS = 8,
  parameter resp_e        ERR_RESP  = RESP_SLVERR
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  axi_req_t   slv_req_i,
  output axi_resp_t  slv_resp_o,
  output axi_req_t   mst_req_o,
  input  axi_resp_t  mst_resp_i,
  input  axil_req_t  cfg_req_i,
  output axil_resp_t cfg_resp_o
);

  logic [NUM_PD-1:0][NUM_MR-1:0] rd_policy, wr_policy;
  logic                          aw_granted, ar_granted;
  logic [NUM_PD-1:0]             aw_pd_match, ar_pd_match;
  logic [NUM_MR-1:0]             aw_mr_match, ar_mr_match;
  logic                          rd_denied, wr_denied;
  addr_t                         deny_addr;

  axi_req_t  demux_req  [2];
  axi_resp_t demux_resp [2];

  pu_config #(
    .NUM_PD(NUM_PD),
    .NUM_MR(NUM_MR)
  ) u_config (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .cfg_req_i  (cfg_req_i),
    .cfg_resp_o (cfg_resp_o),
    .rd_denied_i(rd_denied),
    .wr_denied_i(wr_denied),
    .deny_addr_i(deny_addr),
    .rd_policy_o(rd_policy),
    .wr_policy_o(wr_policy)
  );

  policy_check #(
    .NUM_PD (NUM_PD),
    .NUM_MR (NUM_MR),
    .PD_ID  (PD_ID),
    .PD_MASK(PD_MASK),
    .MR_BASE(MR_BASE),
    .MR_LSB (MR_LSB)
  ) u_check_write (
    .id_i      (slv_req_i.aw.id),
    .addr_i    (slv_req_i.aw.addr),
    .len_i     (slv_req_i.aw.len),
    .size_i    (slv_req_i.aw.size),
    .policy_i  (wr_policy),
    .pd_match_o(aw_pd_match),
    .mr_match_o(aw_mr_match),
    .granted_o (aw_granted)
  );

  policy_check #(
    .NUM_PD (NUM_PD),
    .NUM_MR (NUM_MR),
    .PD_ID  (PD_ID),
    .PD_MASK(PD_MASK),
    .MR_BASE(MR_BASE),
    .MR_LSB (MR_LSB)
  ) u_check_read (
    .id_i      (slv_req_i.ar.id),
    .addr_i    (slv_req_i.ar.addr),
    .len_i     (slv_req_i.ar.len),
    .size_i    (slv_req_i.ar.size),
    .policy_i  (rd_policy),
    .pd_match_o(ar_pd_match),
    .mr_match_o(ar_mr_match),
    .granted_o (ar_granted)
  );

  pu_axi_demux #(
    .MAX_TRANS(MAX_TRANS)
  ) u_demux (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .slv_req_i  (slv_req_i),
    .slv_resp_o (slv_resp_o),
    .aw_select_i(!aw_granted),
    .ar_select_i(!ar_granted),
    .mst_req_o  (demux_req),
    .mst_resp_i (demux_resp)
  );

  assign mst_req_o     = demux_req[0];
  assign demux_resp[0] = mst_resp_i;

  pu_axi_err_slv #(
    .RESP(ERR_RESP)
  ) u_err_slv (
    .clk_i (clk_i),
    .rst_ni(rst_ni),
    .req_i (demux_req[1]),
    .resp_o(demux_resp[1])
  );

  // A denial is recorded when the denied request is handed to the error slave.
  always_comb begin
    wr_denied = slv_req_i.aw_valid && slv_resp_o.aw_ready && !aw_granted;
    rd_denied = slv_req_i.ar_valid && slv_resp_o.ar_ready && !ar_granted;
    deny_addr = wr_denied ? slv_req_i.aw.addr : slv_req_i.ar.addr;
  end

endmodule
