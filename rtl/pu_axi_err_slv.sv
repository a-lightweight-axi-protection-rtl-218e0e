// pu_axi_err_slv - AXI4 error slave of the Protection Unit.
//
// Denied transactions are steered to this slave, which ends each of them
// cleanly with an AXI error response so that the requesting master is never
// left waiting: a write is answered, after all of its W beats have been
// consumed and dropped, with one B beat carrying RESP; a read is answered
// with LEN+1 R beats carrying RESP and the data word DATA, the last one with
// RLAST set.  Response IDs are the request IDs.  That denied requests end in
// an AXI error response from an internal slave follows the design
// description; the response code (SLVERR by default) and the data word are
// this design's choices.
//
// Interface: one AXI4 slave port (req_i / resp_o).
// Timing: one write and one read in flight at a time; AW and AR are accepted
// when idle, W beats are accepted one per cycle, B is valid the cycle after
// the last W beat, R beats start the cycle after AR and follow one per cycle.
module pu_axi_err_slv
  import axi_pu_pkg::*;
#(
  parameter resp_e RESP = RESP_SLVERR,
  parameter data_t DATA = '0
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  req_i,
  output axi_resp_t resp_o
);

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  typedef enum logic       {R_IDLE, R_DATA}         rstate_e;

  wstate_e w_state_q;
  rstate_e r_state_q;
  id_t     w_id_q, r_id_q;
  len_t    r_len_q, r_cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      w_state_q <= W_IDLE;
      w_id_q    <= '0;
    end else begin
      unique case (w_state_q)
        W_IDLE: if (req_i.aw_valid) begin
          w_id_q    <= req_i.aw.id;
          w_state_q <= W_DATA;
        end
        W_DATA: if (req_i.w_valid && req_i.w.last) w_state_q <= W_RESP;
        W_RESP: if (req_i.b_ready) w_state_q <= W_IDLE;
        default: w_state_q <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_state_q <= R_IDLE;
      r_id_q    <= '0;
      r_len_q   <= '0;
      r_cnt_q   <= '0;
    end else begin
      unique case (r_state_q)
        R_IDLE: if (req_i.ar_valid) begin
          r_id_q    <= req_i.ar.id;
          r_len_q   <= req_i.ar.len;
          r_cnt_q   <= '0;
          r_state_q <= R_DATA;
        end
        R_DATA: if (req_i.r_ready) begin
          if (r_cnt_q == r_len_q) r_state_q <= R_IDLE;
          r_cnt_q <= r_cnt_q + 1'b1;
        end
        default: r_state_q <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    resp_o          = '0;
    resp_o.aw_ready = (w_state_q == W_IDLE);
    resp_o.w_ready  = (w_state_q == W_DATA);
    resp_o.b_valid  = (w_state_q == W_RESP);
    resp_o.b.id     = w_id_q;
    resp_o.b.resp   = RESP;
    resp_o.ar_ready = (r_state_q == R_IDLE);
    resp_o.r_valid  = (r_state_q == R_DATA);
    resp_o.r.id     = r_id_q;
    resp_o.r.data   = DATA;
    resp_o.r.resp   = RESP;
    resp_o.r.last   = (r_cnt_q == r_len_q);
  end

endmodule
