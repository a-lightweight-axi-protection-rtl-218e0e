// axi_addr_translator_tb - self-checking test of the address translator.
//
// Default window: 64 KiB at 0x4100_0000 mapped to 0xE000_0000.  Checks
// addresses inside, at both edges and outside the window on AW and AR, and
// that all other request and response fields pass unchanged.
module axi_addr_translator_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;

  axi_req_t  sreq, mreq;
  axi_resp_t sresp, mresp;

  axi_addr_translator dut (.slv_req_i(sreq), .slv_resp_o(sresp), .mst_req_o(mreq), .mst_resp_i(mresp));

  function automatic addr_t ref_xlat(input addr_t a);
    if (a >= 32'h4100_0000 && a <= 32'h4100_FFFF) return a - 32'h4100_0000 + 32'hE000_0000;
    return a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t list [6] = '{32'h4100_0000, 32'h4100_FFFC, 32'h4101_0000, 32'h40FF_FFFC,
                        32'h4000_0000, 32'hE000_0000};
    sreq = '0; mresp = '0;
    foreach (list[i]) begin
      sreq.aw.addr = list[i];
      sreq.ar.addr = list[(i + 1) % 6];
      #1;
      check(mreq.aw.addr == ref_xlat(list[i]), $sformatf("aw %h -> %h", list[i], mreq.aw.addr));
      check(mreq.ar.addr == ref_xlat(list[(i + 1) % 6]), $sformatf("ar %h", list[(i + 1) % 6]));
    end
    for (int i = 0; i < 500; i++) begin
      sreq = axi_req_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      if (i % 2 == 0) sreq.aw.addr = 32'h4100_0000 | ($urandom & 32'hFFFF);
      if (i % 3 == 0) sreq.ar.addr = 32'h4100_0000 | ($urandom & 32'hFFFF);
      mresp = axi_resp_t'({$urandom, $urandom, $urandom});
      #1;
      check(mreq.aw.addr == ref_xlat(sreq.aw.addr), "random aw address");
      check(mreq.ar.addr == ref_xlat(sreq.ar.addr), "random ar address");
      check(mreq.aw.id == sreq.aw.id && mreq.aw.len == sreq.aw.len && mreq.w == sreq.w &&
            mreq.aw_valid == sreq.aw_valid && mreq.ar_valid == sreq.ar_valid &&
            mreq.b_ready == sreq.b_ready && mreq.r_ready == sreq.r_ready, "other request fields");
      check(sresp == mresp, "response passes unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
