// axi_id_manipulator - AXI-ID manipulator.
//
// Protection domains are recognised by AXI ID bits, so every master must
// present a known ID.  This block, placed between a master and the
// interconnect (or a Protection Unit), forces the ID bits selected by
// ID_MASK to ID_VALUE on every AW and AR, which adds domain bits to a master
// that drives none or overwrites the bits of one whose IDs do not fit the
// domain scheme, and gives back the original ID on the matching B and R
// responses.  Adding/overwriting ID bits on requests and restoring the old ID
// on responses follows the design description; how the original IDs are
// remembered is this design's choice: one id_restore_table per direction
// keeps the rewritten IDs in flight, and a request whose rewritten ID is
// already in flight for a different original ID waits until that one has
// completed.
//
// Ports: slv_req_i / slv_resp_o face the master, mst_req_o / mst_resp_i the
// downstream side.  Both sides use the same ID width.
// Timing: all paths are combinational; no cycle is added.
module axi_id_manipulator
  import axi_pu_pkg::*;
#(
  parameter id_t         ID_MASK   = id_t'(12'hC00),
  parameter id_t         ID_VALUE  = id_t'(12'h400),
  parameter int unsigned ENTRIES   = 4,
  parameter int unsigned MAX_TRANS = 8
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  slv_req_i,
  output axi_resp_t slv_resp_o,
  output axi_req_t  mst_req_o,
  input  axi_resp_t mst_resp_i
);

  id_t  aw_new_id, ar_new_id, b_orig_id, r_orig_id;
  logic aw_ok, ar_ok;

  always_comb begin
    aw_new_id = (slv_req_i.aw.id & ~ID_MASK) | (ID_VALUE & ID_MASK);
    ar_new_id = (slv_req_i.ar.id & ~ID_MASK) | (ID_VALUE & ID_MASK);
  end

  id_restore_table #(
    .ENTRIES  (ENTRIES),
    .MAX_TRANS(MAX_TRANS)
  ) u_write_ids (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .orig_id_i    (slv_req_i.aw.id),
    .new_id_i     (aw_new_id),
    .req_ok_o     (aw_ok),
    .req_done_i   (mst_req_o.aw_valid && mst_resp_i.aw_ready),
    .rsp_id_i     (mst_resp_i.b.id),
    .rsp_done_i   (mst_resp_i.b_valid && slv_req_i.b_ready),
    .restored_id_o(b_orig_id)
  );

  id_restore_table #(
    .ENTRIES  (ENTRIES),
    .MAX_TRANS(MAX_TRANS)
  ) u_read_ids (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .orig_id_i    (slv_req_i.ar.id),
    .new_id_i     (ar_new_id),
    .req_ok_o     (ar_ok),
    .req_done_i   (mst_req_o.ar_valid && mst_resp_i.ar_ready),
    .rsp_id_i     (mst_resp_i.r.id),
    .rsp_done_i   (mst_resp_i.r_valid && slv_req_i.r_ready && mst_resp_i.r.last),
    .restored_id_o(r_orig_id)
  );

  always_comb begin
    mst_req_o          = slv_req_i;
    mst_req_o.aw.id    = aw_new_id;
    mst_req_o.aw_valid = slv_req_i.aw_valid && aw_ok;
    mst_req_o.ar.id    = ar_new_id;
    mst_req_o.ar_valid = slv_req_i.ar_valid && ar_ok;

    slv_resp_o          = mst_resp_i;
    slv_resp_o.aw_ready = mst_resp_i.aw_ready && aw_ok;
    slv_resp_o.ar_ready = mst_resp_i.ar_ready && ar_ok;
    slv_resp_o.b.id     = b_orig_id;
    slv_resp_o.r.id     = r_orig_id;
  end

endmodule
