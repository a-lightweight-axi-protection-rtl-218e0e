// axi_tb_mem - behavioural AXI4 memory slave used by the testbenches.
//
// Not synthesizable in intent; stands for whatever sits downstream (an
// interconnect with a BRAM or peripheral behind it).  Holds 2**WORDS_LOG2
// 32-bit words addressed by addr[WORDS_LOG2+1:2] (INCR bursts of 4-byte
// beats), one write and one read at a time, OKAY responses, and counts the
// transactions it has received and the ID/address of the last ones, so that
// a testbench can tell which requests got through.
module axi_tb_mem
  import axi_pu_pkg::*;
#(
  parameter int unsigned WORDS_LOG2 = 10
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  req_i,
  output axi_resp_t resp_o
);

  data_t mem [2**WORDS_LOG2];

  int    n_aw, n_ar;
  addr_t last_aw_addr, last_ar_addr;
  id_t   last_aw_id, last_ar_id;

  logic  w_busy, b_pend, r_busy;
  id_t   w_id, r_id;
  addr_t w_addr, r_addr;
  len_t  r_left;

  initial for (int i = 0; i < 2**WORDS_LOG2; i++) mem[i] = '0;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      w_busy <= 0; b_pend <= 0; r_busy <= 0;
      n_aw <= 0; n_ar <= 0;
      w_id <= '0; r_id <= '0; w_addr <= '0; r_addr <= '0; r_left <= '0;
      last_aw_addr <= '0; last_ar_addr <= '0; last_aw_id <= '0; last_ar_id <= '0;
    end else begin
      if (req_i.aw_valid && resp_o.aw_ready) begin
        w_busy <= 1; w_id <= req_i.aw.id; w_addr <= req_i.aw.addr;
        n_aw <= n_aw + 1; last_aw_addr <= req_i.aw.addr; last_aw_id <= req_i.aw.id;
      end
      if (req_i.w_valid && resp_o.w_ready) begin
        mem[w_addr[WORDS_LOG2+1:2]] <= req_i.w.data;
        w_addr <= w_addr + 4;
        if (req_i.w.last) begin w_busy <= 0; b_pend <= 1; end
      end
      if (resp_o.b_valid && req_i.b_ready) b_pend <= 0;
      if (req_i.ar_valid && resp_o.ar_ready) begin
        r_busy <= 1; r_id <= req_i.ar.id; r_addr <= req_i.ar.addr; r_left <= req_i.ar.len;
        n_ar <= n_ar + 1; last_ar_addr <= req_i.ar.addr; last_ar_id <= req_i.ar.id;
      end
      if (resp_o.r_valid && req_i.r_ready) begin
        r_addr <= r_addr + 4;
        r_left <= r_left - 1;
        if (r_left == 0) r_busy <= 0;
      end
    end
  end

  always_comb begin
    resp_o          = '0;
    resp_o.aw_ready = !w_busy && !b_pend;
    resp_o.w_ready  = w_busy;
    resp_o.b_valid  = b_pend;
    resp_o.b.id     = w_id;
    resp_o.b.resp   = RESP_OKAY;
    resp_o.ar_ready = !r_busy;
    resp_o.r_valid  = r_busy;
    resp_o.r.id     = r_id;
    resp_o.r.data   = mem[r_addr[WORDS_LOG2+1:2]];
    resp_o.r.resp   = RESP_OKAY;
    resp_o.r.last   = (r_left == 0);
  end

endmodule
