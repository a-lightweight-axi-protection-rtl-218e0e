// pu_system_top_tb - end-to-end test of the two-master protected system.
//
// Runs the top with its default parameters.  Behavioural memories stand for
// the interconnect side of each Protection Unit.  The sequence follows a
// boot: before configuration both masters are locked out; the APU then
// writes the access policies of both PUs over the control bus (APU: read and
// write BRAM and the UART page; MicroBlaze: read both, write only the BRAM);
// both masters then run traffic, in sequence and concurrently; finally the
// APU revokes the MicroBlaze's BRAM write permission at run time and the
// MicroBlaze is shut out of it.  Every outcome is compared with the expected
// grant or SLVERR, the address seen downstream (after window translation)
// and the ID seen downstream and returned (after ID rewriting).  The test
// counts each mechanism - grant, write denial, read denial, address
// translation, ID rewrite, run-time policy change, zero-latency pass - and
// fails if one never happened.
module pu_system_top_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t   apu_req, mb_req, apu_ic_req, mb_ic_req;
  axi_resp_t  apu_resp, mb_resp, apu_ic_resp, mb_ic_resp;
  axil_req_t  cfg_a_req, cfg_m_req;
  axil_resp_t cfg_a_resp, cfg_m_resp;

  pu_system_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .apu_req_i(apu_req), .apu_resp_o(apu_resp),
    .mb_req_i(mb_req), .mb_resp_o(mb_resp),
    .apu_pu_cfg_req_i(cfg_a_req), .apu_pu_cfg_resp_o(cfg_a_resp),
    .mb_pu_cfg_req_i(cfg_m_req), .mb_pu_cfg_resp_o(cfg_m_resp),
    .apu_ic_req_o(apu_ic_req), .apu_ic_resp_i(apu_ic_resp),
    .mb_ic_req_o(mb_ic_req), .mb_ic_resp_i(mb_ic_resp)
  );

  axi_tb_master  apu   (.clk_i(clk), .req_o(apu_req), .resp_i(apu_resp));
  axi_tb_master  mb    (.clk_i(clk), .req_o(mb_req), .resp_i(mb_resp));
  axil_tb_master cfg_a (.clk_i(clk), .req_o(cfg_a_req), .resp_i(cfg_a_resp));
  axil_tb_master cfg_m (.clk_i(clk), .req_o(cfg_m_req), .resp_i(cfg_m_resp));
  axi_tb_mem #(.WORDS_LOG2(11)) apu_side (.clk_i(clk), .rst_ni(rst_n), .req_i(apu_ic_req), .resp_o(apu_ic_resp));
  axi_tb_mem #(.WORDS_LOG2(11)) mb_side  (.clk_i(clk), .rst_ni(rst_n), .req_i(mb_ic_req), .resp_o(mb_ic_resp));

  int n_grant = 0, n_wr_deny = 0, n_rd_deny = 0, n_xlat = 0, n_idrw = 0, n_policy = 0, n_zero = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // APU write: expected outcome and expected downstream address.
  task automatic apu_write(input addr_t a, input len_t l, input data_t seed, input bit exp,
                           input addr_t down_a);
    resp_e r; id_t bid; int n;
    n = apu_side.n_aw;
    apu.write(12'h0A5, a, l, 3'd2, seed, r, bid);
    check(bid == 12'h0A5, "APU write keeps its ID");
    if (exp) begin
      check(r == RESP_OKAY && apu_side.n_aw == n + 1 && apu_side.last_aw_addr == down_a,
            $sformatf("APU write %h granted, seen as %h", a, apu_side.last_aw_addr));
      n_grant++;
      if (a != down_a) n_xlat++;
    end else begin
      check(r == RESP_SLVERR && apu_side.n_aw == n, $sformatf("APU write %h denied", a));
      n_wr_deny++;
    end
  endtask

  task automatic mb_write(input id_t id, input addr_t a, input len_t l, input data_t seed, input bit exp);
    resp_e r; id_t bid; int n;
    n = mb_side.n_aw;
    mb.write(id, a, l, 3'd2, seed, r, bid);
    check(bid == id, "MicroBlaze gets its own ID back on B");
    if (exp) begin
      check(r == RESP_OKAY && mb_side.n_aw == n + 1, $sformatf("MB write %h granted", a));
      check(mb_side.last_aw_id == {2'b01, id[9:0]}, "MicroBlaze ID rewritten downstream");
      n_grant++;
      if (mb_side.last_aw_id != id) n_idrw++;
    end else begin
      check(r == RESP_SLVERR && mb_side.n_aw == n, $sformatf("MB write %h denied", a));
      n_wr_deny++;
    end
  endtask

  task automatic mb_read(input id_t id, input addr_t a, input len_t l, input bit exp);
    resp_e r; id_t rid; int n;
    n = mb_side.n_ar;
    mb.read(id, a, l, 3'd2, r, rid);
    check(rid == id && mb.rbeats == int'(l) + 1, "MicroBlaze read beats and ID");
    if (exp) begin
      check(r == RESP_OKAY && mb_side.n_ar == n + 1, $sformatf("MB read %h granted", a));
      n_grant++;
    end else begin
      check(r == RESP_SLVERR && mb_side.n_ar == n, $sformatf("MB read %h denied", a));
      n_rd_deny++;
    end
  endtask

  task automatic apu_read(input addr_t a, input len_t l, input bit exp);
    resp_e r; id_t rid; int n;
    n = apu_side.n_ar;
    apu.read(12'h0A6, a, l, 3'd2, r, rid);
    check(rid == 12'h0A6 && apu.rbeats == int'(l) + 1, "APU read beats and ID");
    if (exp) begin
      check(r == RESP_OKAY && apu_side.n_ar == n + 1, $sformatf("APU read %h granted", a));
      n_grant++;
    end else begin
      check(r == RESP_SLVERR && apu_side.n_ar == n, $sformatf("APU read %h denied", a));
      n_rd_deny++;
    end
  endtask

  task automatic program_pu(input bit mb_pu, input logic [1:0] rd, input logic [1:0] wr);
    resp_e r1, r2;
    if (mb_pu) begin
      cfg_m.write(32'h100, 32'(rd), r1);
      cfg_m.write(32'h200, 32'(wr), r2);
    end else begin
      cfg_a.write(32'h100, 32'(rd), r1);
      cfg_a.write(32'h200, 32'(wr), r2);
    end
    check(r1 == RESP_OKAY && r2 == RESP_OKAY, "policy write accepted");
    n_policy++;
  endtask

  initial begin
    data_t d; resp_e r;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Locked out before configuration.
    apu_write(32'h4000_0000, 0, 32'h1, 0, '0);
    mb_read(12'h001, 32'h4000_0000, 1, 0);

    // Boot-time configuration by the APU.
    program_pu(0, 2'b11, 2'b11);
    program_pu(1, 2'b11, 2'b01);
    cfg_m.read(32'hC, d, r);
    check(d == 32'h0000_0201, "MicroBlaze PU reports 1 domain, 2 regions");

    // APU: BRAM and the UART page through the window.
    apu_write(32'h4000_0040, 3, 32'h1000, 1, 32'h4000_0040);
    apu_write(32'h4100_0004, 0, 32'h2000, 1, 32'hE000_0004);
    apu_write(32'h4100_1000, 0, 32'h3000, 0, '0);
    apu_write(32'h4000_2000, 0, 32'h3100, 0, '0);
    apu_read(32'h4000_0040, 3, 1);
    check(apu.rdata[2] == 32'h1002, "APU reads back its BRAM data");
    apu_read(32'h4100_2000, 0, 0);

    // MicroBlaze: BRAM write granted, peripheral write denied, reads granted.
    mb_write(12'h001, 32'h4000_0100, 7, 32'h5000, 1);
    mb_write(12'h001, 32'hE000_0000, 0, 32'h6000, 0);
    mb_read(12'h001, 32'hE000_0000, 0, 1);
    mb_read(12'h003, 32'h4000_0100, 7, 1);
    check(mb.rdata[7] == 32'h5007, "MicroBlaze reads back its BRAM data");
    mb_read(12'h001, 32'h4000_1FFC, 1, 0);

    // Zero added latency through the MicroBlaze path.
    @(negedge clk);
    mb_req.ar = '0; mb_req.ar.id = 12'h002; mb_req.ar.addr = 32'h4000_0000; mb_req.ar.size = 2;
    mb_req.ar_valid = 1;
    #1;
    if (mb_ic_req.ar_valid && mb_ic_req.ar.addr == 32'h4000_0000 && mb_ic_req.ar.id == 12'h402) n_zero++;
    check(mb_ic_req.ar_valid, "MicroBlaze AR reaches the interconnect in the same cycle");
    @(posedge clk); #1;
    mb_req.ar_valid = 0; mb_req.r_ready = 1;
    while (!mb_resp.r_valid) begin @(negedge clk); #1; end
    check(mb_resp.r.id == 12'h002, "read ID restored");
    @(posedge clk); #1;
    mb_req.r_ready = 0;

    // Both masters at once.
    fork
      for (int i = 0; i < 20; i++) apu_write(32'h4000_0400 + 32'(i * 64), 15, 32'(i << 8), 1, 32'h4000_0400 + 32'(i * 64));
      for (int i = 0; i < 20; i++) begin
        mb_write(id_t'(i), 32'h4000_1000 + 32'(i * 32), 7, 32'(i << 12), 1);
        mb_write(id_t'(i), 32'hE000_0800, 0, 32'h0, 0);
      end
    join

    // Run-time policy change: the APU revokes the MicroBlaze's BRAM writes.
    program_pu(1, 2'b11, 2'b00);
    mb_write(12'h001, 32'h4000_0100, 0, 32'h7000, 0);
    mb_read(12'h001, 32'h4000_0100, 0, 1);
    cfg_m.read(32'h4, d, r);
    check(d[1] == 1'b1, "MicroBlaze PU flags a denied write");
    cfg_a.read(32'h4, d, r);
    check(d == 32'h3, "APU PU flags denied reads and writes");

    check(n_grant > 0,   "mechanism: grant");
    check(n_wr_deny > 0, "mechanism: write denial");
    check(n_rd_deny > 0, "mechanism: read denial");
    check(n_xlat > 0,    "mechanism: window address translation");
    check(n_idrw > 0,    "mechanism: ID rewrite and restore");
    check(n_policy > 0,  "mechanism: run-time policy change");
    check(n_zero > 0,    "mechanism: zero-latency pass-through");
    $display("grants=%0d write_denials=%0d read_denials=%0d translations=%0d id_rewrites=%0d policy_updates=%0d zero_latency=%0d",
             n_grant, n_wr_deny, n_rd_deny, n_xlat, n_idrw, n_policy, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
