// pu_axi_demux_tb - self-checking test of the Protection Unit demultiplexer.
//
// Two behavioural memories hang on the two master ports.  Random writes and
// reads with random select bits must land in (and read back from) the
// memory the select names and never in the other one.  Directed parts check
// that a request reaches its master port in the cycle it is presented, that
// W beats wait for their AW, and that a request for the other port waits
// while a transaction of the same direction is still open on the first one.
module pu_axi_demux_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  sreq;
  axi_resp_t sresp;
  axi_req_t  mreq  [2];
  axi_resp_t mresp [2];
  logic      aw_sel = 0, ar_sel = 0;

  pu_axi_demux dut (
    .clk_i(clk), .rst_ni(rst_n), .slv_req_i(sreq), .slv_resp_o(sresp),
    .aw_select_i(aw_sel), .ar_select_i(ar_sel), .mst_req_o(mreq), .mst_resp_i(mresp)
  );
  axi_tb_master bfm (.clk_i(clk), .req_o(sreq), .resp_i(sresp));
  axi_tb_mem #(.WORDS_LOG2(8)) mem0 (.clk_i(clk), .rst_ni(rst_n), .req_i(mreq[0]), .resp_o(mresp[0]));
  axi_tb_mem #(.WORDS_LOG2(8)) mem1 (.clk_i(clk), .rst_ni(rst_n), .req_i(mreq[1]), .resp_o(mresp[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    resp_e r; id_t rid;
    data_t model [2][256];
    int    n0, n1, stall;
    foreach (model[p, i]) model[p][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 60; i++) begin
      automatic bit    p    = $urandom % 2;
      automatic len_t  l    = len_t'($urandom % 8);
      automatic int    w    = $urandom % 200;
      automatic data_t seed = $urandom;
      automatic id_t   id   = id_t'($urandom);
      n0 = mem0.n_aw; n1 = mem1.n_aw;
      aw_sel = p;
      bfm.write(id, addr_t'(w * 4), l, 3'd2, seed, r, rid);
      for (int b = 0; b <= int'(l); b++) model[p][w + b] = seed + data_t'(b);
      check(r == RESP_OKAY && rid == id, "write response from the selected port");
      check(mem0.n_aw - n0 == (p ? 0 : 1) && mem1.n_aw - n1 == (p ? 1 : 0),
            $sformatf("write %0d reached port %0d only", i, p));
      p = $urandom % 2;
      ar_sel = p;
      w = $urandom % 200;
      id = id_t'($urandom);
      bfm.read(id, addr_t'(w * 4), l, 3'd2, r, rid);
      check(rid == id && bfm.rbeats == int'(l) + 1 && bfm.rlast_ok, "read beats and ID");
      for (int b = 0; b <= int'(l); b++)
        check(bfm.rdata[b] == model[p][w + b], $sformatf("read %0d beat %0d from port %0d", i, b, p));
    end

    // Same-cycle forwarding of AW and AR, and W held back until AW is accepted.
    @(negedge clk);
    sreq.w.data = 32'h77; sreq.w.last = 1; sreq.w.strb = '1; sreq.w_valid = 1;
    #1;
    check(!mreq[0].w_valid && !mreq[1].w_valid && !sresp.w_ready, "W waits for its AW");
    aw_sel = 1; sreq.aw = '0; sreq.aw.addr = 32'h40; sreq.aw_valid = 1;
    ar_sel = 0; sreq.ar = '0; sreq.ar.addr = 32'h80; sreq.ar_valid = 1;
    #1;
    check(mreq[1].aw_valid && !mreq[0].aw_valid, "AW on port 1 in the same cycle");
    check(mreq[0].ar_valid && !mreq[1].ar_valid, "AR on port 0 in the same cycle");
    @(posedge clk); #1;
    sreq.aw_valid = 0; sreq.ar_valid = 0;
    check(mreq[1].w_valid && !mreq[0].w_valid, "W follows its AW to port 1");
    @(posedge clk); #1;
    sreq.w_valid = 0;
    // B of the port-1 write is pending (b_ready low): a write to port 0 waits.
    aw_sel = 0; sreq.aw.addr = 32'h44; sreq.aw_valid = 1;
    stall = 0;
    for (int c = 0; c < 4; c++) begin
      #1;
      if (!sresp.aw_ready && !mreq[0].aw_valid) stall++;
      @(negedge clk);
    end
    check(stall == 4, "write to the other port waits while a write is open");
    check(sresp.b_valid, "B of the open write is presented");
    sreq.b_ready = 1;
    @(posedge clk); #1;
    sreq.b_ready = 0;
    check(sresp.aw_ready && mreq[0].aw_valid, "write to port 0 proceeds once B is taken");
    @(posedge clk); #1;
    sreq.aw_valid = 0;
    sreq.w.data = 32'h78; sreq.w_valid = 1;
    @(posedge clk); #1;
    sreq.w_valid = 0;
    sreq.b_ready = 1;
    while (!sresp.b_valid) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    sreq.b_ready = 0;
    // Drain the read that was sent to port 0.
    sreq.r_ready = 1;
    while (!sresp.r_valid) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    sreq.r_ready = 0;
    check(mem0.mem[17] == 32'h78 && mem1.mem[16] == 32'h77, "directed writes landed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
