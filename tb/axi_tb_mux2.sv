// axi_tb_mux2 - behavioural two-master AXI4 interconnect used by testbenches.
//
// Not part of the design; stands for a vendor interconnect that joins two
// masters onto one port.  Writes and reads are arbitrated separately, one
// transaction per direction at a time (round robin between requesters).  The
// master index is placed in ID bit 11 of the forwarded request and the
// response is routed back by that bit, with bit 11 cleared again, so masters
// must leave bit 11 at 0.
module axi_tb_mux2
  import axi_pu_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  slv_req_i  [2],
  output axi_resp_t slv_resp_o [2],
  output axi_req_t  mst_req_o,
  input  axi_resp_t mst_resp_i
);

  logic w_busy, r_busy, w_own, r_own, w_data;
  logic w_pick, r_pick, w_last_grant, r_last_grant;

  always_comb begin
    w_pick = slv_req_i[0].aw_valid && slv_req_i[1].aw_valid ? !w_last_grant : slv_req_i[1].aw_valid;
    r_pick = slv_req_i[0].ar_valid && slv_req_i[1].ar_valid ? !r_last_grant : slv_req_i[1].ar_valid;

    mst_req_o          = '0;
    mst_req_o.aw       = slv_req_i[w_pick].aw;
    mst_req_o.aw.id    = {w_pick, slv_req_i[w_pick].aw.id[ID_W-2:0]};
    mst_req_o.aw_valid = !w_busy && slv_req_i[w_pick].aw_valid;
    mst_req_o.w        = slv_req_i[w_own].w;
    mst_req_o.w_valid  = w_busy && w_data && slv_req_i[w_own].w_valid;
    mst_req_o.b_ready  = w_busy && slv_req_i[w_own].b_ready;
    mst_req_o.ar       = slv_req_i[r_pick].ar;
    mst_req_o.ar.id    = {r_pick, slv_req_i[r_pick].ar.id[ID_W-2:0]};
    mst_req_o.ar_valid = !r_busy && slv_req_i[r_pick].ar_valid;
    mst_req_o.r_ready  = r_busy && slv_req_i[r_own].r_ready;

    for (int p = 0; p < 2; p++) begin
      slv_resp_o[p]          = '0;
      slv_resp_o[p].aw_ready = !w_busy && (w_pick == p[0]) && mst_resp_i.aw_ready;
      slv_resp_o[p].w_ready  = w_busy && w_data && (w_own == p[0]) && mst_resp_i.w_ready;
      slv_resp_o[p].b_valid  = w_busy && (w_own == p[0]) && mst_resp_i.b_valid;
      slv_resp_o[p].b        = mst_resp_i.b;
      slv_resp_o[p].b.id     = {1'b0, mst_resp_i.b.id[ID_W-2:0]};
      slv_resp_o[p].ar_ready = !r_busy && (r_pick == p[0]) && mst_resp_i.ar_ready;
      slv_resp_o[p].r_valid  = r_busy && (r_own == p[0]) && mst_resp_i.r_valid;
      slv_resp_o[p].r        = mst_resp_i.r;
      slv_resp_o[p].r.id     = {1'b0, mst_resp_i.r.id[ID_W-2:0]};
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      w_busy <= 0; r_busy <= 0; w_own <= 0; r_own <= 0; w_data <= 0;
      w_last_grant <= 0; r_last_grant <= 0;
    end else begin
      if (mst_req_o.aw_valid && mst_resp_i.aw_ready) begin
        w_busy <= 1; w_data <= 1; w_own <= w_pick; w_last_grant <= w_pick;
      end
      if (mst_req_o.w_valid && mst_resp_i.w_ready && mst_req_o.w.last) w_data <= 0;
      if (mst_resp_i.b_valid && mst_req_o.b_ready) w_busy <= 0;
      if (mst_req_o.ar_valid && mst_resp_i.ar_ready) begin
        r_busy <= 1; r_own <= r_pick; r_last_grant <= r_pick;
      end
      if (mst_resp_i.r_valid && mst_req_o.r_ready && mst_resp_i.r.last) r_busy <= 0;
    end
  end

endmodule
