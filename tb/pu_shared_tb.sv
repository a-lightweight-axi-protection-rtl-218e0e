// pu_shared_tb - one Protection Unit shared by two masters.
//
// Deployment with a single PU between two interconnects: two masters are
// joined by a behavioural interconnect (which tags each request with the
// master's index in ID bit 11), the PU guards the path, and a behavioural
// memory stands for the slave-side interconnect with two slaves behind it.
// The PU has 2 domains (ID bit 11 = 0: master 0; = 1: master 1) and
// 2 regions (slave A: 4 KiB at 0x4000_0000; slave B: 4 KiB at 0x4000_1000).
// Policy: master 0 reads and writes A and reads B; master 1 reads and writes
// B only.  Both masters issue random traffic at the same time; every outcome
// is compared with the policy, and each master must see its own IDs back.
module pu_shared_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam pd_id_arr_t   PdId   = pd_id_arr_t'({12'h800, 12'h000});
  localparam pd_id_arr_t   PdMask = pd_id_arr_t'({12'h800, 12'h800});
  localparam mr_base_arr_t MrBase = mr_base_arr_t'({32'h4000_1000, 32'h4000_0000});
  localparam mr_lsb_arr_t  MrLsb  = mr_lsb_arr_t'({6'd12, 6'd12});

  axi_req_t   m_req  [2];
  axi_resp_t  m_resp [2];
  axi_req_t   ic_req, pu_req;
  axi_resp_t  ic_resp, pu_resp;
  axil_req_t  creq;
  axil_resp_t cresp;

  axi_tb_master m0 (.clk_i(clk), .req_o(m_req[0]), .resp_i(m_resp[0]));
  axi_tb_master m1 (.clk_i(clk), .req_o(m_req[1]), .resp_i(m_resp[1]));
  axi_tb_mux2 ic (.clk_i(clk), .rst_ni(rst_n), .slv_req_i(m_req), .slv_resp_o(m_resp),
                  .mst_req_o(ic_req), .mst_resp_i(ic_resp));
  protection_unit #(
    .NUM_PD(2), .NUM_MR(2), .PD_ID(PdId), .PD_MASK(PdMask), .MR_BASE(MrBase), .MR_LSB(MrLsb)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .slv_req_i(ic_req), .slv_resp_o(ic_resp),
    .mst_req_o(pu_req), .mst_resp_i(pu_resp), .cfg_req_i(creq), .cfg_resp_o(cresp)
  );
  axil_tb_master cbfm (.clk_i(clk), .req_o(creq), .resp_i(cresp));
  axi_tb_mem #(.WORDS_LOG2(11)) mem (.clk_i(clk), .rst_ni(rst_n), .req_i(pu_req), .resp_o(pu_resp));

  // policy[master][slave]
  localparam bit RdOk [2][2] = '{'{1, 1}, '{0, 1}};
  localparam bit WrOk [2][2] = '{'{1, 0}, '{0, 1}};
  int n_grant = 0, n_deny = 0, n_overlap = 0;
  int busy = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (m_req[0].aw_valid && m_req[1].aw_valid) n_overlap++;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic traffic(input int mi);
    resp_e r; id_t rid;
    for (int i = 0; i < 60; i++) begin
      automatic int    s  = $urandom % 2;
      automatic bit    wr = $urandom % 2;
      automatic len_t  l  = len_t'($urandom % 8);
      automatic addr_t a  = 32'h4000_0000 + 32'(s * 4096) + 32'(($urandom % 64) * 4);
      automatic id_t   id = id_t'($urandom % 256);
      automatic bit    exp = wr ? WrOk[mi][s] : RdOk[mi][s];
      if (wr) begin
        if (mi == 0) m0.write(id, a, l, 3'd2, $urandom, r, rid);
        else         m1.write(id, a, l, 3'd2, $urandom, r, rid);
      end else begin
        if (mi == 0) m0.read(id, a, l, 3'd2, r, rid);
        else         m1.read(id, a, l, 3'd2, r, rid);
      end
      check(rid == id, $sformatf("master %0d gets its ID back", mi));
      check(r == (exp ? RESP_OKAY : RESP_SLVERR),
            $sformatf("master %0d %s slave %0d: expected %0d", mi, wr ? "write" : "read", s, exp));
      if (exp) n_grant++; else n_deny++;
    end
  endtask

  initial begin
    resp_e r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cbfm.write(32'h100, 32'b11, r);  // domain 0 reads A and B
    cbfm.write(32'h200, 32'b01, r);  // domain 0 writes A
    cbfm.write(32'h104, 32'b10, r);  // domain 1 reads B
    cbfm.write(32'h204, 32'b10, r);  // domain 1 writes B
    fork
      traffic(0);
      traffic(1);
    join
    check(n_grant > 20 && n_deny > 20, "both grants and denials seen");
    check(n_overlap > 0, "both masters requested at the same time");
    $display("grants=%0d denials=%0d overlapping_requests=%0d", n_grant, n_deny, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
