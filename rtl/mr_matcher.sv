// mr_matcher - memory-region matcher.
//
// A memory region is an aligned block of 2**LSB bytes that starts at BASE; the
// address bits from the MSB down to bit LSB identify it.  A burst matches the
// region when both its first byte address (ADDR) and its last byte address
// (ADDR + ((LEN+1) << SIZE) - 1) carry the region's upper bits, so a burst
// that starts inside the region but runs past its end does not match.  Using
// the start and the end of the burst, built from ADDR, LEN and SIZE, and
// comparing only bits MSB..LSB, follows the design description.  The exact
// end-address formula is this design's reading of it: it treats every burst
// as incrementing, which for a WRAP burst or an unaligned start can only
// over-estimate the end (never grants more than the region).  A burst whose
// end wraps past the top of the address space never matches.
//
// Interface: addr_i, len_i, size_i of an AW or AR request in, match_o out.
// Timing: purely combinational.
module mr_matcher #(
  parameter int unsigned            AW   = axi_pu_pkg::ADDR_W,
  parameter logic [AW-1:0]          BASE = AW'(32'h4000_0000),
  parameter int unsigned            LSB  = 12
) (
  input  logic [AW-1:0] addr_i,
  input  logic [7:0]    len_i,
  input  logic [2:0]    size_i,
  output logic          match_o
);

  // Bits LSB..AW (one carry bit above the address) identify the region.
  localparam logic [AW:0] RegionMask = ({(AW+1){1'b1}} << LSB);

  logic [AW:0] bytes_total;
  logic [AW:0] last_addr;
  logic        first_in, last_in;

  always_comb begin
    bytes_total = ({{(AW-8){1'b0}}, 1'b0, len_i} + 1'b1) << size_i;
    last_addr   = {1'b0, addr_i} + bytes_total - 1'b1;
    first_in    = (({1'b0, addr_i} ^ {1'b0, BASE}) & RegionMask) == '0;
    last_in     = ((last_addr ^ {1'b0, BASE}) & RegionMask) == '0;
    match_o     = first_in && last_in;
  end

endmodule
