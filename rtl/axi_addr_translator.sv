// axi_addr_translator - AXI address translator for shared PS peripherals.
//
// In the communication pattern that lets PS peripherals be shared and
// protected, the APU no longer reaches them directly; it addresses them
// through a window of its PL (GPIO master) address space, and this block
// turns those window addresses back into the peripherals' physical
// addresses before the request reaches the interconnect and the Protection
// Unit.  An AW or AR address whose bits above WIN_LSB equal those of
// VIRT_BASE has those bits replaced by the bits of PHYS_BASE; the low
// WIN_LSB bits (the offset within the 2**WIN_LSB-byte window) are kept.
// Other addresses and all other signals pass unchanged.  The block's role
// follows the design description; the window-replacement scheme and the
// default addresses are this design's choice: the defaults map a 64 KiB
// window at 0x4100_0000 onto 0xE000_0000, where the Zynq-7000 I/O
// peripherals such as the UARTs sit.
//
// Timing: combinational; no cycle is added.
module axi_addr_translator
  import axi_pu_pkg::*;
#(
  parameter addr_t       VIRT_BASE = addr_t'(32'h4100_0000),
  parameter addr_t       PHYS_BASE = addr_t'(32'hE000_0000),
  parameter int unsigned WIN_LSB   = 16
) (
  input  axi_req_t  slv_req_i,
  output axi_resp_t slv_resp_o,
  output axi_req_t  mst_req_o,
  input  axi_resp_t mst_resp_i
);

  localparam addr_t WinMask = ~((addr_t'(1) << WIN_LSB) - 1'b1);

  function automatic addr_t translate(input addr_t a);
    if (((a ^ VIRT_BASE) & WinMask) == '0) return (PHYS_BASE & WinMask) | (a & ~WinMask);
    return a;
  endfunction

  always_comb begin
    mst_req_o         = slv_req_i;
    mst_req_o.aw.addr = translate(slv_req_i.aw.addr);
    mst_req_o.ar.addr = translate(slv_req_i.ar.addr);
    slv_resp_o        = mst_resp_i;
  end

endmodule
