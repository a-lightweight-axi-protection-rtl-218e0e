// axi_tb_master - AXI4 master driver used by the testbenches.
//
// Not synthesizable.  Offers blocking tasks that run one complete burst:
// write() sends AW, then the W beats (data = seed + beat), then waits for B;
// read() sends AR and collects every R beat into rdata[].  All signals change
// on the falling clock edge and handshakes are judged on the settled values
// there, so a handshake takes place on the following rising edge.
module axi_tb_master
  import axi_pu_pkg::*;
(
  input  logic      clk_i,
  output axi_req_t  req_o,
  input  axi_resp_t resp_i
);

  data_t rdata [256];
  resp_e rresp [256];
  int    rbeats;
  bit    rlast_ok;
  bit    last_seen;

  initial req_o = '0;

  task automatic send_aw(input id_t id, input addr_t addr, input len_t len, input size_t size);
    @(negedge clk_i);
    req_o.aw       = '0;
    req_o.aw.id    = id;
    req_o.aw.addr  = addr;
    req_o.aw.len   = len;
    req_o.aw.size  = size;
    req_o.aw.burst = BURST_INCR;
    req_o.aw_valid = 1'b1;
    #1;
    while (!resp_i.aw_ready) begin @(negedge clk_i); #1; end
    @(posedge clk_i); #1;
    req_o.aw_valid = 1'b0;
  endtask

  task automatic send_w(input len_t len, input data_t seed);
    for (int i = 0; i <= int'(len); i++) begin
      req_o.w.data  = seed + data_t'(i);
      req_o.w.strb  = '1;
      req_o.w.last  = (i == int'(len));
      req_o.w_valid = 1'b1;
      #1;
      while (!resp_i.w_ready) begin @(negedge clk_i); #1; end
      @(posedge clk_i); #1;
    end
    req_o.w_valid = 1'b0;
  endtask

  task automatic get_b(output resp_e resp, output id_t id);
    req_o.b_ready = 1'b1;
    #1;
    while (!resp_i.b_valid) begin @(negedge clk_i); #1; end
    resp = resp_i.b.resp;
    id   = resp_i.b.id;
    @(posedge clk_i); #1;
    req_o.b_ready = 1'b0;
  endtask

  task automatic write(input id_t id, input addr_t addr, input len_t len, input size_t size,
                       input data_t seed, output resp_e resp, output id_t bid);
    send_aw(id, addr, len, size);
    send_w(len, seed);
    get_b(resp, bid);
  endtask

  task automatic read(input id_t id, input addr_t addr, input len_t len, input size_t size,
                      output resp_e resp, output id_t rid);
    @(negedge clk_i);
    req_o.ar       = '0;
    req_o.ar.id    = id;
    req_o.ar.addr  = addr;
    req_o.ar.len   = len;
    req_o.ar.size  = size;
    req_o.ar.burst = BURST_INCR;
    req_o.ar_valid = 1'b1;
    #1;
    while (!resp_i.ar_ready) begin @(negedge clk_i); #1; end
    @(posedge clk_i); #1;
    req_o.ar_valid = 1'b0;
    req_o.r_ready  = 1'b1;
    rbeats   = 0;
    rlast_ok = 1'b1;
    resp     = RESP_OKAY;
    rid      = '0;
    forever begin
      #1;
      while (!resp_i.r_valid) begin @(negedge clk_i); #1; end
      rdata[rbeats] = resp_i.r.data;
      rresp[rbeats] = resp_i.r.resp;
      if (resp_i.r.resp != RESP_OKAY) resp = resp_i.r.resp;
      rid = resp_i.r.id;
      if (resp_i.r.last != (rbeats == int'(len))) rlast_ok = 1'b0;
      rbeats++;
      last_seen = resp_i.r.last;
      @(posedge clk_i); #1;
      if (last_seen || rbeats >= 256) break;
    end
    req_o.r_ready = 1'b0;
  endtask

endmodule
