// pu_axi_err_slv_tb - self-checking test of the error slave.
//
// Sends writes and reads of several burst lengths and IDs and checks that
// every W beat is consumed, that one B with the request ID and SLVERR ends
// each write, that each read returns exactly LEN+1 error beats with the
// request ID and RLAST on the last one only, and that the first R beat comes
// one cycle after the AR handshake.
module pu_axi_err_slv_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;



  axi_req_t  req;
  axi_resp_t resp;

  pu_axi_err_slv dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .resp_o(resp));
  axi_tb_master bfm (.clk_i(clk), .req_o(req), .resp_i(resp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int w_beats = 0;
  always @(posedge clk) if (req.w_valid && resp.w_ready) w_beats++;

  initial begin
    resp_e r; id_t bid; int n_prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      automatic len_t l  = len_t'(i == 11 ? 255 : $urandom % 9);
      automatic id_t  id = id_t'($urandom);
      n_prev = w_beats;
      bfm.write(id, 32'h1234_0000, l, 3'd2, 32'h0, r, bid);
      check(w_beats - n_prev == int'(l) + 1, $sformatf("write len %0d: all W beats consumed", l));
      check(r == RESP_SLVERR, "write answered with SLVERR");
      check(bid == id, "B carries the write ID");
      id = id_t'($urandom);
      bfm.read(id, 32'h1234_0000, l, 3'd2, r, bid);
      check(bfm.rbeats == int'(l) + 1, $sformatf("read len %0d: %0d beats", l, bfm.rbeats));
      check(bfm.rlast_ok, "RLAST only on the last beat");
      check(r == RESP_SLVERR && bfm.rresp[0] == RESP_SLVERR, "read answered with SLVERR");
      check(bid == id, "R carries the read ID");
    end
    // Latency: AR accepted at the rising edge t0, R valid from t0 on.
    @(negedge clk);
    req.ar = '0; req.ar.id = 12'h5; req.ar_valid = 1'b1; req.r_ready = 1'b0;
    check(resp.ar_ready, "AR ready when idle");
    @(posedge clk);
    @(negedge clk); req.ar_valid = 1'b0;
    check(resp.r_valid && resp.r.last, "R valid in the cycle after AR");
    req.r_ready = 1'b1;
    @(negedge clk); req.r_ready = 1'b0;
    check(!resp.r_valid, "single beat read done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
