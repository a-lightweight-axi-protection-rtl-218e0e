// axil_tb_master - AXI4-Lite master driver used by the testbenches.
//
// Not synthesizable.  write() presents AW and W together and waits for B;
// read() presents AR and waits for R.  Signals change on the falling edge and are
// sampled 1 ns later, once the design has settled.
module axil_tb_master
  import axi_pu_pkg::*;
(
  input  logic       clk_i,
  output axil_req_t  req_o,
  input  axil_resp_t resp_i
);

  initial req_o = '0;

  task automatic write(input addr_t addr, input data_t data, output resp_e resp);
    @(negedge clk_i);
    req_o.aw_addr  = addr;
    req_o.aw_valid = 1'b1;
    req_o.w_data   = data;
    req_o.w_strb   = '1;
    req_o.w_valid  = 1'b1;
    #1;
    while (!resp_i.aw_ready) begin @(negedge clk_i); #1; end
    @(posedge clk_i); #1;
    req_o.aw_valid = 1'b0;
    req_o.w_valid  = 1'b0;
    req_o.b_ready  = 1'b1;
    #1;
    while (!resp_i.b_valid) begin @(negedge clk_i); #1; end
    resp = resp_i.b_resp;
    @(posedge clk_i); #1;
    req_o.b_ready = 1'b0;
  endtask

  task automatic read(input addr_t addr, output data_t data, output resp_e resp);
    @(negedge clk_i);
    req_o.ar_addr  = addr;
    req_o.ar_valid = 1'b1;
    #1;
    while (!resp_i.ar_ready) begin @(negedge clk_i); #1; end
    @(posedge clk_i); #1;
    req_o.ar_valid = 1'b0;
    req_o.r_ready  = 1'b1;
    #1;
      while (!resp_i.r_valid) begin @(negedge clk_i); #1; end
    data = resp_i.r_data;
    resp = resp_i.r_resp;
    @(posedge clk_i); #1;
    req_o.r_ready = 1'b0;
  endtask

endmodule
