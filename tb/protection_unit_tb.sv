// protection_unit_tb - self-checking test of the Protection Unit.
//
// Configures the two-master / two-slave example over AXI-Lite (domains:
// 0 = masters 0x001 and 0x002, 1 = master 0x001, 2 = master 0x002; regions:
// 0 = both slaves, 1 = slave 1 at 0x4000_0000, 2 = slave 2 at 0x4000_1000;
// read: domain 0 -> region 0; write: domain 1 -> region 1, domain 2 ->
// region 2) and checks through a behavioural memory downstream that granted
// transactions arrive unchanged and complete with OKAY, that denied ones never
// arrive and complete with SLVERR (one B, or LEN+1 R beats), that everything
// is denied before configuration, that the status registers record denials,
// that a policy rewritten at run time takes effect, and that a granted AW and
// AR leave the PU in the cycle they arrive.  A random phase compares the
// outcome of random requests under random policies with a rule-list model.
module protection_unit_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam pd_id_arr_t   PdId   = pd_id_arr_t'({12'h002, 12'h001, 12'h000});
  localparam pd_id_arr_t   PdMask = pd_id_arr_t'({12'hFFF, 12'hFFF, 12'hFFC});
  localparam mr_base_arr_t MrBase = mr_base_arr_t'({32'h4000_1000, 32'h4000_0000, 32'h4000_0000});
  localparam mr_lsb_arr_t  MrLsb  = mr_lsb_arr_t'({6'd12, 6'd12, 6'd13});

  axi_req_t   sreq, mreq;
  axi_resp_t  sresp, mresp;
  axil_req_t  creq;
  axil_resp_t cresp;

  protection_unit #(
    .NUM_PD(3), .NUM_MR(3), .PD_ID(PdId), .PD_MASK(PdMask), .MR_BASE(MrBase), .MR_LSB(MrLsb)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .slv_req_i(sreq), .slv_resp_o(sresp),
    .mst_req_o(mreq), .mst_resp_i(mresp), .cfg_req_i(creq), .cfg_resp_o(cresp)
  );
  axi_tb_master  bfm  (.clk_i(clk), .req_o(sreq), .resp_i(sresp));
  axil_tb_master cbfm (.clk_i(clk), .req_o(creq), .resp_i(cresp));
  axi_tb_mem #(.WORDS_LOG2(11)) mem (.clk_i(clk), .rst_ni(rst_n), .req_i(mreq), .resp_o(mresp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rule-list model of the example domains and regions.
  function automatic bit model_grant(input id_t id, input addr_t a, input len_t l,
                                     input logic [2:0][2:0] pol);
    longint first, last;
    bit in_pd [3];
    bit in_mr [3];
    first = longint'(a);
    last  = first + (longint'(l) + 1) * 4 - 1;
    in_pd[0] = id <= 12'h003; in_pd[1] = id == 12'h001; in_pd[2] = id == 12'h002;
    in_mr[0] = first >= 64'h4000_0000 && last <= 64'h4000_1FFF;
    in_mr[1] = first >= 64'h4000_0000 && last <= 64'h4000_0FFF;
    in_mr[2] = first >= 64'h4000_1000 && last <= 64'h4000_1FFF;
    for (int d = 0; d < 3; d++)
      for (int m = 0; m < 3; m++)
        if (in_pd[d] && in_mr[m] && pol[d][m]) return 1;
    return 0;
  endfunction

  task automatic set_policy(input logic [2:0][2:0] rd, input logic [2:0][2:0] wr);
    resp_e r;
    for (int d = 0; d < 3; d++) begin
      cbfm.write(32'h100 + 32'(4 * d), 32'(rd[d]), r);
      cbfm.write(32'h200 + 32'(4 * d), 32'(wr[d]), r);
    end
  endtask

  // Write then report whether it arrived downstream and what came back.
  task automatic do_write(input id_t id, input addr_t a, input len_t l, input data_t seed,
                          output bit arrived, output resp_e r);
    int  n; id_t bid;
    n = mem.n_aw;
    bfm.write(id, a, l, 3'd2, seed, r, bid);
    arrived = (mem.n_aw != n);
    check(bid == id, "B carries the original ID");
  endtask

  task automatic do_read(input id_t id, input addr_t a, input len_t l,
                         output bit arrived, output resp_e r);
    int  n; id_t rid;
    n = mem.n_ar;
    bfm.read(id, a, l, 3'd2, r, rid);
    arrived = (mem.n_ar != n);
    check(rid == id && bfm.rbeats == int'(l) + 1 && bfm.rlast_ok, "R beats, RLAST and ID");
  endtask

  initial begin
    bit arrived; resp_e r; data_t d;
    logic [2:0][2:0] rd_pol, wr_pol;
    int grants = 0, denials = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // Nothing configured: everything is denied.
    do_write(12'h001, 32'h4000_0000, 0, 32'h1, arrived, r);
    check(!arrived && r == RESP_SLVERR, "write denied before configuration");
    do_read(12'h002, 32'h4000_0000, 3, arrived, r);
    check(!arrived && r == RESP_SLVERR, "read denied before configuration");

    rd_pol = '0; rd_pol[0][0] = 1;
    wr_pol = '0; wr_pol[1][1] = 1; wr_pol[2][2] = 1;
    set_policy(rd_pol, wr_pol);
    cbfm.write(32'h0, 32'h1, r);

    // Master 1 writes slave 1: granted.
    do_write(12'h001, 32'h4000_0100, 3, 32'hA000, arrived, r);
    check(arrived && r == RESP_OKAY, "master 1 writes slave 1");
    check(mem.last_aw_addr == 32'h4000_0100 && mem.last_aw_id == 12'h001, "request unchanged");
    check(mem.mem[64] == 32'hA000 && mem.mem[67] == 32'hA003, "burst data written");
    // Master 1 writes slave 2: denied.
    do_write(12'h001, 32'h4000_1100, 0, 32'hB000, arrived, r);
    check(!arrived && r == RESP_SLVERR, "master 1 may not write slave 2");
    cbfm.read(32'h4, d, r);
    check(d == 32'h2, "status: write denied");
    cbfm.read(32'h8, d, r);
    check(d == 32'h4000_1100, "status: denied address");
    // Master 2 writes slave 2: granted; slave 1: denied.
    do_write(12'h002, 32'h4000_1100, 1, 32'hC000, arrived, r);
    check(arrived && r == RESP_OKAY, "master 2 writes slave 2");
    do_write(12'h002, 32'h4000_0100, 0, 32'hD000, arrived, r);
    check(!arrived && r == RESP_SLVERR, "master 2 may not write slave 1");
    // A burst from slave 1 into slave 2 is in region 0 only: write denied.
    do_write(12'h001, 32'h4000_0FF8, 3, 32'hE000, arrived, r);
    check(!arrived && r == RESP_SLVERR, "write burst crossing into slave 2 denied");
    // Both masters read both slaves.
    do_read(12'h001, 32'h4000_1100, 1, arrived, r);
    check(arrived && r == RESP_OKAY && bfm.rdata[1] == 32'hC001, "master 1 reads slave 2");
    do_read(12'h002, 32'h4000_0100, 3, arrived, r);
    check(arrived && r == RESP_OKAY && bfm.rdata[3] == 32'hA003, "master 2 reads slave 1");
    // Unknown master: read denied with error beats.
    do_read(12'h010, 32'h4000_0100, 7, arrived, r);
    check(!arrived && r == RESP_SLVERR && bfm.rresp[7] == RESP_SLVERR, "unknown master denied");

    // Zero added latency: AW and AR leave the PU in the cycle they arrive.
    @(negedge clk);
    sreq.aw = '0; sreq.aw.id = 12'h001; sreq.aw.addr = 32'h4000_0200; sreq.aw.size = 2;
    sreq.ar = '0; sreq.ar.id = 12'h002; sreq.ar.addr = 32'h4000_1200; sreq.ar.size = 2;
    sreq.aw_valid = 1; sreq.ar_valid = 1;
    #1;
    check(mreq.aw_valid && mreq.aw == sreq.aw && sresp.aw_ready, "AW forwarded in the same cycle");
    check(mreq.ar_valid && mreq.ar == sreq.ar && sresp.ar_ready, "AR forwarded in the same cycle");
    @(posedge clk); #1;
    sreq.aw_valid = 0; sreq.ar_valid = 0;
    sreq.w.data = 32'h5; sreq.w.strb = '1; sreq.w.last = 1; sreq.w_valid = 1;
    sreq.b_ready = 1; sreq.r_ready = 1;
    #1;
    check(mreq.w_valid, "W forwarded the cycle after its AW");
    @(posedge clk); #1;
    sreq.w_valid = 0;
    repeat (3) @(posedge clk);
    #1;
    sreq.b_ready = 0; sreq.r_ready = 0;

    // Run-time change: revoke master 1's write permission.
    wr_pol[1][1] = 0;
    set_policy(rd_pol, wr_pol);
    do_write(12'h001, 32'h4000_0100, 0, 32'hF000, arrived, r);
    check(!arrived && r == RESP_SLVERR, "revoked write is denied");
    wr_pol[1][1] = 1;
    set_policy(rd_pol, wr_pol);
    do_write(12'h001, 32'h4000_0100, 0, 32'hF001, arrived, r);
    check(arrived && r == RESP_OKAY, "restored write is granted");

    // Random requests under random policies.
    for (int i = 0; i < 150; i++) begin
      automatic id_t   id = id_t'($urandom % 5);
      automatic addr_t a  = 32'h3FFF_FF00 + (($urandom % 32'h2200) & ~32'h3);
      automatic len_t  l  = len_t'($urandom % 8);
      automatic bit    exp;
      if (i % 10 == 0) begin
        rd_pol = 9'($urandom); wr_pol = 9'($urandom);
        set_policy(rd_pol, wr_pol);
      end
      if (a < 32'h4000_0000 || a + 32'(l) * 4 + 3 > 32'h4000_1FFF) a = 32'h4000_0000 + (a & 32'hFFC);
      if ($urandom % 2) begin
        exp = model_grant(id, a, l, wr_pol);
        do_write(id, a, l, $urandom, arrived, r);
      end else begin
        exp = model_grant(id, a, l, rd_pol);
        do_read(id, a, l, arrived, r);
      end
      check(arrived == exp && (r == (exp ? RESP_OKAY : RESP_SLVERR)),
            $sformatf("random %0d id=%h a=%h len=%0d expected %0d", i, id, a, l, exp));
      if (exp) grants++; else denials++;
    end
    check(grants > 10 && denials > 10, "random phase saw both grants and denials");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
