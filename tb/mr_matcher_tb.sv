// mr_matcher_tb - self-checking test of the memory-region matcher.
//
// An 8-bit-address instance reproduces the worked example (region 0110xxxx,
// LSB position 4) exhaustively for single beats and for bursts; a 32-bit
// instance (4 KiB page at 0x4000_3000) is checked with random bursts and with
// bursts placed at the page edges.  The reference compares integer ranges:
// start >= base and start + (len+1)*2**size - 1 < base + 2**LSB.
module mr_matcher_tb;

  int checks = 0, failures = 0;

  logic [7:0]  a8;
  logic [31:0] a32;
  logic [7:0]  len;
  logic [2:0]  size;
  logic        m8, m32;

  mr_matcher #(.AW(8),  .BASE(8'b0110_0000), .LSB(4))  u_m8  (.addr_i(a8),  .len_i(len), .size_i(size), .match_o(m8));
  mr_matcher #(.AW(32), .BASE(32'h4000_3000), .LSB(12)) u_m32 (.addr_i(a32), .len_i(len), .size_i(size), .match_o(m32));

  function automatic bit ref_in(input longint start, input int l, input int s,
                                input longint base, input int lsb);
    longint last;
    last = start + longint'(l + 1) * (longint'(1) << s) - 1;
    return (start >= base) && (last < base + (longint'(1) << lsb));
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
    a32 = '0;
    // Worked example: 0110_xxxx is inside, single bytes.
    len = 0; size = 0;
    a8 = 8'b0110_0101; #1; check(m8, "0110_0101 single byte inside");
    a8 = 8'b0111_0000; #1; check(!m8, "0111_0000 outside");
    // Exhaustive over 8-bit start, short bursts.
    for (int a = 0; a < 256; a++)
      for (int l = 0; l < 4; l++)
        for (int s = 0; s < 3; s++) begin
          a8 = 8'(a); len = 8'(l); size = 3'(s); #1;
          if (a + (l + 1) * (1 << s) - 1 < 256)
            check(m8 == ref_in(a, l, s, 8'h60, 4), $sformatf("a8=%h len=%0d size=%0d", a8, l, s));
          else
            check(!m8, $sformatf("a8=%h wraps past top", a8));
        end
    // Page edges, 32-bit instance.
    a8 = '0;
    size = 2; len = 0; a32 = 32'h4000_3FFC; #1; check(m32, "last word of page");
    size = 2; len = 1; a32 = 32'h4000_3FFC; #1; check(!m32, "burst crossing page end");
    size = 2; len = 255; a32 = 32'h4000_3C00; #1; check(m32, "1 KiB burst ending at page end");
    size = 2; len = 255; a32 = 32'h4000_3C04; #1; check(!m32, "1 KiB burst one word too late");
    size = 0; len = 0; a32 = 32'h4000_2FFF; #1; check(!m32, "byte before page");
    for (int i = 0; i < 2000; i++) begin
      a32  = 32'h4000_2000 + ($urandom % 32'h3000);
      len  = 8'($urandom % 64);
      size = 3'($urandom % 4);
      #1;
      check(m32 == ref_in(longint'(a32), int'(len), int'(size), 64'h4000_3000, 12),
            $sformatf("a32=%h len=%0d size=%0d", a32, len, size));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
