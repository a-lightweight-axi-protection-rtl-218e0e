// pu_axi_demux - AXI4 one-to-two demultiplexer of the Protection Unit.
//
// Steers every transaction of its slave port to master port 0 (the
// downstream path) or master port 1 (the error slave), following a select
// bit that accompanies each AW and AR request; inside the Protection Unit the
// select is the inverted grant of the policy check.  Requests pass through
// combinationally, so a granted AW or AR reaches the downstream port in the
// cycle it is presented.  The demultiplexer as the element that forwards or
// diverts a transaction follows the design description; how it keeps the
// responses in order is this design's choice and simpler than a per-ID
// scheme:
//   * writes and reads are tracked separately, each with a counter of
//     outstanding transactions and the port they went to;
//   * a request for the other port waits until the counter of its
//     direction is back at 0, so all outstanding transactions of one
//     direction share a port and their B or R responses are simply taken
//     from that port;
//   * W beats go to the port of the outstanding writes and are only
//     forwarded once their AW has been accepted, so W never leads AW on a
//     master port (a downstream slave must accept AW without waiting for W).
// At most MAX_TRANS transactions per direction are outstanding.
//
// Timing: AW, AR, B, R and (after its AW) W pass without a register stage.
module pu_axi_demux
  import axi_pu_pkg::*;
#(
  parameter int unsigned MAX_TRANS = 8
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  slv_req_i,
  output axi_resp_t slv_resp_o,
  input  logic      aw_select_i,
  input  logic      ar_select_i,
  output axi_req_t  mst_req_o  [2],
  input  axi_resp_t mst_resp_i [2]
);

  localparam int unsigned CntW = $clog2(MAX_TRANS + 1);
  typedef logic [CntW-1:0] cnt_t;

  cnt_t w_cnt_q, w_pend_q, r_cnt_q;
  logic w_sel_q, r_sel_q;
  logic aw_ok, ar_ok, aw_hs, ar_hs, w_hs_last, b_hs, r_hs_last;

  always_comb begin
    aw_ok = (w_cnt_q == '0 || w_sel_q == aw_select_i) &&
            (w_cnt_q != cnt_t'(MAX_TRANS)) && (w_pend_q != cnt_t'(MAX_TRANS));
    ar_ok = (r_cnt_q == '0 || r_sel_q == ar_select_i) &&
            (r_cnt_q != cnt_t'(MAX_TRANS));

    for (int p = 0; p < 2; p++) begin
      mst_req_o[p]          = '0;
      mst_req_o[p].aw       = slv_req_i.aw;
      mst_req_o[p].aw_valid = slv_req_i.aw_valid && aw_ok && (aw_select_i == p[0]);
      mst_req_o[p].w        = slv_req_i.w;
      mst_req_o[p].w_valid  = slv_req_i.w_valid && (w_pend_q != '0) && (w_sel_q == p[0]);
      mst_req_o[p].b_ready  = slv_req_i.b_ready && (w_sel_q == p[0]);
      mst_req_o[p].ar       = slv_req_i.ar;
      mst_req_o[p].ar_valid = slv_req_i.ar_valid && ar_ok && (ar_select_i == p[0]);
      mst_req_o[p].r_ready  = slv_req_i.r_ready && (r_sel_q == p[0]);
    end

    slv_resp_o          = '0;
    slv_resp_o.aw_ready = aw_ok && mst_resp_i[aw_select_i].aw_ready;
    slv_resp_o.w_ready  = (w_pend_q != '0) && mst_resp_i[w_sel_q].w_ready;
    slv_resp_o.b        = mst_resp_i[w_sel_q].b;
    slv_resp_o.b_valid  = mst_resp_i[w_sel_q].b_valid;
    slv_resp_o.ar_ready = ar_ok && mst_resp_i[ar_select_i].ar_ready;
    slv_resp_o.r        = mst_resp_i[r_sel_q].r;
    slv_resp_o.r_valid  = mst_resp_i[r_sel_q].r_valid;

    aw_hs     = slv_req_i.aw_valid && slv_resp_o.aw_ready;
    ar_hs     = slv_req_i.ar_valid && slv_resp_o.ar_ready;
    w_hs_last = slv_req_i.w_valid && slv_resp_o.w_ready && slv_req_i.w.last;
    b_hs      = slv_resp_o.b_valid && slv_req_i.b_ready;
    r_hs_last = slv_resp_o.r_valid && slv_req_i.r_ready && slv_resp_o.r.last;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      w_cnt_q  <= '0;
      w_pend_q <= '0;
      r_cnt_q  <= '0;
      w_sel_q  <= 1'b0;
      r_sel_q  <= 1'b0;
    end else begin
      if (aw_hs) w_sel_q <= aw_select_i;
      if (ar_hs) r_sel_q <= ar_select_i;
      w_cnt_q  <= w_cnt_q  + cnt_t'(aw_hs) - cnt_t'(b_hs);
      w_pend_q <= w_pend_q + cnt_t'(aw_hs) - cnt_t'(w_hs_last);
      r_cnt_q  <= r_cnt_q  + cnt_t'(ar_hs) - cnt_t'(r_hs_last);
    end
  end

  // Protocol rules the surrounding system must keep.
  a_no_stray_b: assert property (@(posedge clk_i) disable iff (!rst_ni)
    slv_resp_o.b_valid |-> w_cnt_q != '0)
    else $error("B response without an outstanding write");
  a_no_stray_r: assert property (@(posedge clk_i) disable iff (!rst_ni)
    slv_resp_o.r_valid |-> r_cnt_q != '0)
    else $error("R response without an outstanding read");
  a_aw_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (slv_req_i.aw_valid && !slv_resp_o.aw_ready) |=> slv_req_i.aw_valid)
    else $error("AWVALID dropped before AWREADY");
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (slv_req_i.ar_valid && !slv_resp_o.ar_ready) |=> slv_req_i.ar_valid)
    else $error("ARVALID dropped before ARREADY");

endmodule
