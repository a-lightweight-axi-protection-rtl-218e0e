// pu_scaling_tb - Protection Unit at the four domain/region counts 1x1, 1x16,
// 16x1 and 16x16.
//
// Each configuration gets its own PU (default tables: domain d is exactly
// AXI ID d, region m is the 4 KiB page at 0x4000_0000 + m*0x1000), its own
// AXI-Lite driver, AXI driver and behavioural memory, and runs in parallel
// with the others.  Each loads random read and write policies, sends random
// single-beat and burst requests from IDs 0..17 to pages 0..16 (so some IDs
// and pages lie outside every domain or region) and compares grant or SLVERR,
// and arrival downstream, with a model of the rules.  The 16x16 instance uses
// the PU's default parameters.
module pu_scaling_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NPD [4] = '{16, 1, 16, 1};
  localparam int NMR [4] = '{16, 16, 1, 1};
  int done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar c = 0; c < 4; c++) begin : g_cfg
    axi_req_t   sreq, mreq;
    axi_resp_t  sresp, mresp;
    axil_req_t  creq;
    axil_resp_t cresp;

    if (c == 0) begin : g_dut
      protection_unit dut (
        .clk_i(clk), .rst_ni(rst_n), .slv_req_i(sreq), .slv_resp_o(sresp),
        .mst_req_o(mreq), .mst_resp_i(mresp), .cfg_req_i(creq), .cfg_resp_o(cresp));
    end else begin : g_dut
      protection_unit #(.NUM_PD(NPD[c]), .NUM_MR(NMR[c])) dut (
        .clk_i(clk), .rst_ni(rst_n), .slv_req_i(sreq), .slv_resp_o(sresp),
        .mst_req_o(mreq), .mst_resp_i(mresp), .cfg_req_i(creq), .cfg_resp_o(cresp));
    end
    axi_tb_master  bfm  (.clk_i(clk), .req_o(sreq), .resp_i(sresp));
    axil_tb_master cbfm (.clk_i(clk), .req_o(creq), .resp_i(cresp));
    axi_tb_mem #(.WORDS_LOG2(15)) mem (.clk_i(clk), .rst_ni(rst_n), .req_i(mreq), .resp_o(mresp));

    logic [15:0] rd_pol [16];
    logic [15:0] wr_pol [16];

    function automatic bit model(input int id, input int page, input int off, input int l,
                                 input bit wr);
      // Burst of l+1 words from page*4096+off must stay in the page.
      if (id >= NPD[c] || page >= NMR[c]) return 0;
      if (off + (l + 1) * 4 > 4096) return 0;
      return wr ? wr_pol[id][page] : rd_pol[id][page];
    endfunction

    initial begin
      resp_e r; id_t rid; data_t d; int n; bit exp;
      int n_grant = 0, n_deny = 0;
      @(posedge rst_n);
      cbfm.read(32'hC, d, r);
      check(d == 32'({8'(NMR[c]), 8'(NPD[c])}), $sformatf("config %0d INFO", c));
      for (int round = 0; round < 4; round++) begin
        for (int p = 0; p < NPD[c]; p++) begin
          rd_pol[p] = 16'($urandom) & 16'((1 << NMR[c]) - 1);
          wr_pol[p] = 16'($urandom) & 16'((1 << NMR[c]) - 1);
          cbfm.write(32'h100 + 32'(4 * p), 32'(rd_pol[p]), r);
          cbfm.write(32'h200 + 32'(4 * p), 32'(wr_pol[p]), r);
        end
        for (int i = 0; i < 40; i++) begin
          automatic int  id   = (i % 8 == 7) ? 16 + $urandom % 2 : $urandom % NPD[c];
          automatic int  page = (i % 9 == 8) ? 16 : $urandom % NMR[c];
          automatic int  l    = (i % 3 == 0) ? $urandom % 16 : 0;
          automatic int  off  = ($urandom % 1024) * 4;
          automatic bit  wr   = $urandom % 2;
          automatic addr_t a  = 32'h4000_0000 + 32'(page * 4096 + off);
          exp = model(id, page, off, l, wr);
          if (wr) begin
            n = mem.n_aw;
            bfm.write(id_t'(id), a, len_t'(l), 3'd2, $urandom, r, rid);
            check((mem.n_aw != n) == exp, $sformatf("cfg %0d write id %0d page %0d arrival", c, id, page));
          end else begin
            n = mem.n_ar;
            bfm.read(id_t'(id), a, len_t'(l), 3'd2, r, rid);
            check((mem.n_ar != n) == exp, $sformatf("cfg %0d read id %0d page %0d arrival", c, id, page));
          end
          check(rid == id_t'(id) && r == (exp ? RESP_OKAY : RESP_SLVERR),
                $sformatf("cfg %0d response id %0d page %0d", c, id, page));
          if (exp) n_grant++; else n_deny++;
        end
      end
      check(n_grant > 0 && n_deny > 0, $sformatf("config %0d saw grants and denials", c));
      done++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
