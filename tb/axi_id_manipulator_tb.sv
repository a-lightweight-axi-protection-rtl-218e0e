// axi_id_manipulator_tb - self-checking test of the AXI-ID manipulator.
//
// Default setting: bits [11:10] of every request ID are forced to 01.  With
// a behavioural memory downstream, random writes and reads check that the
// memory sees the rewritten ID and the master gets its own ID back on B and
// R, with data intact.  A directed part keeps a write open (B not taken) and
// checks that a request from another original ID that rewrites to the same
// ID is held back until the open write has completed.
module axi_id_manipulator_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t  sreq, mreq;
  axi_resp_t sresp, mresp;

  axi_id_manipulator dut (.clk_i(clk), .rst_ni(rst_n), .slv_req_i(sreq), .slv_resp_o(sresp),
                          .mst_req_o(mreq), .mst_resp_i(mresp));
  axi_tb_master bfm (.clk_i(clk), .req_o(sreq), .resp_i(sresp));
  axi_tb_mem #(.WORDS_LOG2(8)) mem (.clk_i(clk), .rst_ni(rst_n), .req_i(mreq), .resp_o(mresp));

  function automatic id_t expect_id(input id_t id);
    return {2'b01, id[9:0]};
  endfunction

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
    resp_e r; id_t rid; int held;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int i = 0; i < 80; i++) begin
      automatic id_t   id   = id_t'($urandom);
      automatic len_t  l    = len_t'($urandom % 6);
      automatic addr_t a    = addr_t'(($urandom % 200) * 4);
      automatic data_t seed = $urandom;
      bfm.write(id, a, l, 3'd2, seed, r, rid);
      check(mem.last_aw_id == expect_id(id), $sformatf("write ID %h rewritten to %h", id, mem.last_aw_id));
      check(rid == id && r == RESP_OKAY, "B returns the original ID");
      id = id_t'($urandom);
      bfm.read(id, a, l, 3'd2, r, rid);
      check(mem.last_ar_id == expect_id(id), "read ID rewritten");
      check(rid == id && bfm.rbeats == int'(l) + 1, "R returns the original ID");
      check(bfm.rdata[l] == seed + data_t'(l), "data passes unchanged");
    end

    // Open write with original ID 0x801 (rewritten 0x401), B not taken.
    @(negedge clk);
    sreq.aw = '0; sreq.aw.id = 12'h801; sreq.aw.addr = 32'h10; sreq.aw.size = 2; sreq.aw_valid = 1;
    #1;
    check(mreq.aw_valid && mreq.aw.id == 12'h401, "first write passes with rewritten ID");
    @(posedge clk); #1;
    sreq.aw_valid = 0;
    sreq.w.data = 32'h99; sreq.w.strb = '1; sreq.w.last = 1; sreq.w_valid = 1;
    @(posedge clk); #1;
    sreq.w_valid = 0;
    // Original ID 0x001 also rewrites to 0x401: must wait.
    sreq.aw.id = 12'h001; sreq.aw.addr = 32'h20; sreq.aw_valid = 1;
    held = 0;
    for (int c = 0; c < 4; c++) begin
      #1;
      if (!mreq.aw_valid && !sresp.aw_ready) held++;
      @(negedge clk);
    end
    check(held == 4, "conflicting ID held back while the first write is open");
    sreq.b_ready = 1;
    #1;
    check(sresp.b_valid && sresp.b.id == 12'h801, "open write completes with ID 0x801");
    @(posedge clk); #1;
    sreq.b_ready = 0;
    check(mreq.aw_valid && mreq.aw.id == 12'h401, "held write proceeds after completion");
    while (!sresp.aw_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    sreq.aw_valid = 0;
    sreq.w.data = 32'h9A; sreq.w_valid = 1;
    @(posedge clk); #1;
    sreq.w_valid = 0;
    sreq.b_ready = 1;
    while (!sresp.b_valid) begin @(negedge clk); #1; end
    check(sresp.b.id == 12'h001, "second write completes with ID 0x001");
    @(posedge clk); #1;
    sreq.b_ready = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
