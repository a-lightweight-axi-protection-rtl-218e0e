// pd_matcher_tb - self-checking test of the protection-domain matcher.
//
// Builds the three example domains of the reference table (4-bit IDs:
// mask 1100 / ID 1000, mask 1110 / ID 1000, mask 1110 / ID 1010), checks the
// two worked examples (ID 1011 is in domains 0 and 2, ID 1000 in domains 0
// and 1) and then every 4-bit ID against a bit-by-bit reference, plus random
// 12-bit IDs against a 12-bit instance with random-looking constants.
module pd_matcher_tb;

  int checks = 0, failures = 0;

  logic [3:0]  id4;
  logic [2:0]  m4;
  logic [11:0] id12;
  logic        m12;

  localparam logic [3:0] Mask [3] = '{4'b1100, 4'b1110, 4'b1110};
  localparam logic [3:0] Did  [3] = '{4'b1000, 4'b1000, 4'b1010};

  pd_matcher #(.IDW(4), .DOMAIN_ID(4'b1000), .DOMAIN_MASK(4'b1100)) u_d0 (.id_i(id4), .match_o(m4[0]));
  pd_matcher #(.IDW(4), .DOMAIN_ID(4'b1000), .DOMAIN_MASK(4'b1110)) u_d1 (.id_i(id4), .match_o(m4[1]));
  pd_matcher #(.IDW(4), .DOMAIN_ID(4'b1010), .DOMAIN_MASK(4'b1110)) u_d2 (.id_i(id4), .match_o(m4[2]));
  pd_matcher #(.IDW(12), .DOMAIN_ID(12'hA5C), .DOMAIN_MASK(12'hF0F)) u_d12 (.id_i(id12), .match_o(m12));

  function automatic bit ref_match(input logic [11:0] id, input logic [11:0] did,
                                   input logic [11:0] mask, input int w);
    for (int b = 0; b < w; b++) if (mask[b] && (id[b] != did[b])) return 0;
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    id4 = 4'b1011; id12 = '0; #1;
    check(m4 == 3'b101, "ID 1011 must be in domains 0 and 2 only");
    id4 = 4'b1000; #1;
    check(m4 == 3'b011, "ID 1000 must be in domains 0 and 1 only");
    for (int i = 0; i < 16; i++) begin
      id4 = 4'(i); #1;
      for (int d = 0; d < 3; d++)
        check(m4[d] == ref_match(12'(i), 12'(Did[d]), 12'(Mask[d]), 4),
              $sformatf("id %b domain %0d", id4, d));
    end
    for (int i = 0; i < 400; i++) begin
      id12 = (i % 2 == 0) ? 12'($urandom) : ((12'($urandom) & 12'h0F0) | 12'hA0C);
      #1;
      check(m12 == ref_match(id12, 12'hA5C, 12'hF0F, 12), $sformatf("id12 %h", id12));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
