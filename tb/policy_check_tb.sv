// policy_check_tb - self-checking test of the policy check.
//
// Reproduces the two-master / two-slave example: master 1 (ID 0x001) is in
// domain 1, master 2 (ID 0x002) in domain 2, both in domain 0; slave 1
// (4 KiB at 0x4000_0000) is region 1, slave 2 (4 KiB at 0x4000_1000) region 2,
// both together region 0.  The read policy lets domain 0 read region 0; the
// write policy lets domain 1 write region 1 and domain 2 write region 2.  The
// matched domains/regions and the decisions of the worked example are
// checked, then random IDs, addresses, bursts and policies against a
// reference that evaluates the rule list directly.
module policy_check_tb;
  import axi_pu_pkg::*;

  int checks = 0, failures = 0;

  localparam pd_id_arr_t   PdId   = pd_id_arr_t'({12'h002, 12'h001, 12'h000});
  localparam pd_id_arr_t   PdMask = pd_id_arr_t'({12'hFFF, 12'hFFF, 12'hFFC});
  localparam mr_base_arr_t MrBase = mr_base_arr_t'({32'h4000_1000, 32'h4000_0000, 32'h4000_0000});
  localparam mr_lsb_arr_t  MrLsb  = mr_lsb_arr_t'({6'd12, 6'd12, 6'd13});

  id_t                 id;
  addr_t               addr;
  len_t                len;
  size_t               size;
  logic [2:0][2:0]     policy;
  logic [2:0]          pdm, mrm;
  logic                granted;

  policy_check #(
    .NUM_PD(3), .NUM_MR(3), .PD_ID(PdId), .PD_MASK(PdMask), .MR_BASE(MrBase), .MR_LSB(MrLsb)
  ) dut (
    .id_i(id), .addr_i(addr), .len_i(len), .size_i(size), .policy_i(policy),
    .pd_match_o(pdm), .mr_match_o(mrm), .granted_o(granted)
  );

  // Reference: list of domains an ID is in, regions a burst is in, rules.
  function automatic bit ref_grant(input id_t i, input addr_t a, input len_t l, input size_t s,
                                   input logic [2:0][2:0] pol);
    longint first, last, lo, hi;
    bit in_pd, in_mr;
    first = longint'(a);
    last  = first + (longint'(l) + 1) * (longint'(1) << s) - 1;
    for (int d = 0; d < 3; d++) begin
      case (d)
        0: in_pd = (i <= 12'h003);
        1: in_pd = (i == 12'h001);
        default: in_pd = (i == 12'h002);
      endcase
      for (int m = 0; m < 3; m++) begin
        case (m)
          0: begin lo = 64'h4000_0000; hi = 64'h4000_1FFF; end
          1: begin lo = 64'h4000_0000; hi = 64'h4000_0FFF; end
          default: begin lo = 64'h4000_1000; hi = 64'h4000_1FFF; end
        endcase
        in_mr = (first >= lo) && (last <= hi);
        if (in_pd && in_mr && pol[d][m]) return 1;
      end
    end
    return 0;
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

  logic [2:0][2:0] rd_pol, wr_pol;

  initial begin
    rd_pol = '0; rd_pol[0][0] = 1'b1;
    wr_pol = '0; wr_pol[1][1] = 1'b1; wr_pol[2][2] = 1'b1;
    len = 0; size = 2;

    // Master 1 writes slave 1: domains 0,1 and regions 0,1 match; granted.
    policy = wr_pol; id = 12'h001; addr = 32'h4000_0010; #1;
    check(pdm == 3'b011, "master 1 is in domains 0 and 1");
    check(mrm == 3'b011, "slave 1 address is in regions 0 and 1");
    check(granted, "master 1 may write slave 1");
    // Master 1 writes slave 2: regions 0,2; denied.
    addr = 32'h4000_1010; #1;
    check(mrm == 3'b101, "slave 2 address is in regions 0 and 2");
    check(!granted, "master 1 may not write slave 2");
    // Master 2 writes slave 2 granted, slave 1 denied.
    id = 12'h002; #1;
    check(pdm == 3'b101 && granted, "master 2 may write slave 2");
    addr = 32'h4000_0010; #1;
    check(!granted, "master 2 may not write slave 1");
    // Both masters may read both slaves.
    policy = rd_pol;
    for (int mi = 1; mi <= 2; mi++)
      for (int si = 0; si < 2; si++) begin
        id = id_t'(mi); addr = 32'h4000_0000 + 32'(si) * 32'h1000 + 32'h40; #1;
        check(granted, $sformatf("master %0d may read slave %0d", mi, si + 1));
      end
    // An unknown master is in no domain: denied even with every rule set.
    id = 12'h010; policy = '1; #1;
    check(pdm == 3'b000 && !granted, "master outside all domains is denied");
    // An address outside all regions: denied.
    id = 12'h001; addr = 32'h4000_2000; #1;
    check(mrm == 3'b000 && !granted, "address outside all regions is denied");

    for (int i = 0; i < 3000; i++) begin
      id     = id_t'($urandom % 6);
      addr   = 32'h3FFF_F000 + ($urandom % 32'h4000);
      len    = len_t'($urandom % 20);
      size   = size_t'($urandom % 3);
      policy = 9'($urandom);
      #1;
      check(granted == ref_grant(id, addr, len, size, policy),
            $sformatf("random id=%h addr=%h len=%0d size=%0d pol=%b", id, addr, len, size, policy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
