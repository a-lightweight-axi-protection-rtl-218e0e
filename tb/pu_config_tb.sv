// pu_config_tb - self-checking test of the Protection Unit configuration block.
//
// 16 domains x 16 regions.  Checks that all policies are 0 after reset,
// writes random read and write policy rows over AXI-Lite and compares both
// the policy outputs and the read-back values with a model kept in the
// testbench, checks byte-strobe writes, the INFO register, SLVERR for
// unmapped offsets, the sticky denial flags and the last denied address with
// their clear bit, and that a write response arrives one cycle after the
// write is accepted.
module pu_config_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t  creq;
  axil_resp_t cresp;
  logic       rd_den = 0, wr_den = 0;
  addr_t      den_addr = '0;
  logic [15:0][15:0] rd_pol, wr_pol;
  logic [15:0][15:0] m_rd, m_wr;

  pu_config #(.NUM_PD(16), .NUM_MR(16)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_req_i(creq), .cfg_resp_o(cresp),
    .rd_denied_i(rd_den), .wr_denied_i(wr_den), .deny_addr_i(den_addr),
    .rd_policy_o(rd_pol), .wr_policy_o(wr_pol)
  );
  axil_tb_master bfm (.clk_i(clk), .req_o(creq), .resp_i(cresp));

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
    resp_e r; data_t d;
    m_rd = '0; m_wr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rd_pol == '0 && wr_pol == '0, "policies are 0 after reset");

    for (int i = 0; i < 200; i++) begin
      automatic int   row = $urandom % 16;
      automatic bit   wr  = $urandom % 2;
      automatic logic [15:0] v = 16'($urandom);
      bfm.write(32'h4300_0000 + (wr ? 32'h200 : 32'h100) + 32'(row * 4), {16'hDEAD, v}, r);
      check(r == RESP_OKAY, "policy write OKAY");
      if (wr) m_wr[row] = v; else m_rd[row] = v;
      check(rd_pol == m_rd && wr_pol == m_wr, $sformatf("policy outputs after write %0d", i));
      row = $urandom % 16;
      bfm.read(32'h4300_0100 + 32'(row * 4), d, r);
      check(r == RESP_OKAY && d == 32'(m_rd[row]), "read policy read-back");
      bfm.read(32'h4300_0200 + 32'(row * 4), d, r);
      check(r == RESP_OKAY && d == 32'(m_wr[row]), "write policy read-back");
    end

    // Byte strobes: only byte 1 of row 3 of the read policy changes.
    @(negedge clk);
    creq.aw_addr = 32'h4300_010C; creq.w_data = 32'h0000_A5FF; creq.w_strb = 4'b0010;
    creq.aw_valid = 1; creq.w_valid = 1; creq.b_ready = 0;
    #1;
    check(cresp.aw_ready && cresp.w_ready, "AW and W taken together");
    @(negedge clk);
    creq.aw_valid = 0; creq.w_valid = 0;
    #1;
    check(cresp.b_valid && cresp.b_resp == RESP_OKAY, "B one cycle after the write");
    creq.b_ready = 1;
    @(negedge clk);
    creq.b_ready = 0;
    m_rd[3][15:8] = 8'hA5;
    check(rd_pol == m_rd, "strobed write changes only byte 1");

    bfm.read(32'h4300_000C, d, r);
    check(r == RESP_OKAY && d == 32'h0000_1010, "INFO reports 16 domains and 16 regions");
    bfm.read(32'h4300_0040, d, r);
    check(r == RESP_SLVERR, "unmapped read gives SLVERR");
    bfm.write(32'h4300_0300, 32'h1, r);
    check(r == RESP_SLVERR, "unmapped write gives SLVERR");
    bfm.read(32'h4300_0004, d, r);
    check(d == 32'h0, "status clear before any denial");

    @(negedge clk); rd_den = 1; den_addr = 32'hCAFE_0000;
    @(negedge clk); rd_den = 0;
    bfm.read(32'h4300_0004, d, r);
    check(d == 32'h1, "read denial recorded");
    @(negedge clk); wr_den = 1; den_addr = 32'hBEEF_0010;
    @(negedge clk); wr_den = 0;
    bfm.read(32'h4300_0004, d, r);
    check(d == 32'h3, "write denial recorded, read flag kept");
    bfm.read(32'h4300_0008, d, r);
    check(d == 32'hBEEF_0010, "last denied address");
    bfm.write(32'h4300_0000, 32'h1, r);
    bfm.read(32'h4300_0004, d, r);
    check(d == 32'h0, "status cleared by CTRL bit 0");
    check(rd_pol == m_rd && wr_pol == m_wr, "clearing status keeps the policies");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
