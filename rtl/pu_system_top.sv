// pu_system_top - two-master test system with Protection Units on the master side.
//
// The programmable-logic part of a Zynq-7000 system in which the APU
// (Cortex-A9, through its general-purpose AXI master port) and a soft
// MicroBlaze share an AXI BRAM and a peripheral while staying spatially
// isolated.  Each master gets its own Protection Unit in front of the shared
// AXI interconnect, so a denied request is stopped before it reaches the
// interconnect; both PUs are configured over a separate AXI4-Lite control
// bus driven only by the APU.  This arrangement (two PUs on the master side,
// each with one protection domain and two memory regions, an AXI-ID
// manipulator in the MicroBlaze path) follows the design description.  The
// address translator in the APU path comes from the companion communication
// pattern in which the APU reaches PS peripherals through a PL window: it
// maps that window onto the peripherals' physical addresses ahead of the PU.
// Placing both in one system is this design's choice.
//
// Not part of this RTL, and brought out as ports instead: the processors
// themselves, the AXI interconnect joining the two PU outputs to the BRAM,
// the peripheral and the path back to the PS, and the AXI4-Lite control
// interconnect (one configuration port per PU here).
//
// Default address map (parameters): region 0 is the BRAM, 8 KiB at
// 0x4000_0000; region 1 is a 4 KiB peripheral page at 0xE000_0000 (a PS
// UART); the APU sees that page, and the rest of a 64 KiB PS-peripheral
// window, at 0x4100_0000.  The APU's PU matches every ID it sees (mask 0):
// on the master side the port itself identifies the domain.  The MicroBlaze
// IDs get bits [11:10] forced to 01 by the ID manipulator and its PU's
// domain is exactly those IDs.
//
// Timing: every path from a master port to its interconnect port is
// combinational for a granted request; the only registers are the PU
// configuration, the demultiplexer and error-slave bookkeeping and the ID
// manipulator's table.
module pu_system_top
  import axi_pu_pkg::*;
#(
  parameter addr_t       BRAM_BASE   = addr_t'(32'h4000_0000),
  parameter int unsigned BRAM_LSB    = 13,
  parameter addr_t       PERIPH_BASE = addr_t'(32'hE000_0000),
  parameter int unsigned PERIPH_LSB  = 12,
  parameter addr_t       APU_WINDOW  = addr_t'(32'h4100_0000),
  parameter addr_t       PS_PERIPH   = addr_t'(32'hE000_0000),
  parameter int unsigned WINDOW_LSB  = 16,
  parameter id_t         MB_ID_MASK  = id_t'(12'hC00),
  parameter id_t         MB_ID_VALUE = id_t'(12'h400)
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  // APU general-purpose AXI master
  input  axi_req_t   apu_req_i,
  output axi_resp_t  apu_resp_o,
  // MicroBlaze data AXI master
  input  axi_req_t   mb_req_i,
  output axi_resp_t  mb_resp_o,
  // Control bus: configuration port of each PU
  input  axil_req_t  apu_pu_cfg_req_i,
  output axil_resp_t apu_pu_cfg_resp_o,
  input  axil_req_t  mb_pu_cfg_req_i,
  output axil_resp_t mb_pu_cfg_resp_o,
  // Towards the shared AXI interconnect
  output axi_req_t   apu_ic_req_o,
  input  axi_resp_t  apu_ic_resp_i,
  output axi_req_t   mb_ic_req_o,
  input  axi_resp_t  mb_ic_resp_i
);

  localparam mr_base_arr_t MrBase = mr_base_arr_t'({PERIPH_BASE, BRAM_BASE});
  localparam mr_lsb_arr_t  MrLsb  = mr_lsb_arr_t'({6'(PERIPH_LSB), 6'(BRAM_LSB)});

  axi_req_t  apu_xlat_req, mb_idm_req;
  axi_resp_t apu_xlat_resp, mb_idm_resp;

  // APU path: address translator, then Protection Unit.
  axi_addr_translator #(
    .VIRT_BASE(APU_WINDOW),
    .PHYS_BASE(PS_PERIPH),
    .WIN_LSB  (WINDOW_LSB)
  ) u_apu_xlat (
    .slv_req_i (apu_req_i),
    .slv_resp_o(apu_resp_o),
    .mst_req_o (apu_xlat_req),
    .mst_resp_i(apu_xlat_resp)
  );

  protection_unit #(
    .NUM_PD (1),
    .NUM_MR (2),
    .PD_ID  (pd_id_arr_t'(0)),
    .PD_MASK(pd_id_arr_t'(0)),
    .MR_BASE(MrBase),
    .MR_LSB (MrLsb)
  ) u_apu_pu (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .slv_req_i (apu_xlat_req),
    .slv_resp_o(apu_xlat_resp),
    .mst_req_o (apu_ic_req_o),
    .mst_resp_i(apu_ic_resp_i),
    .cfg_req_i (apu_pu_cfg_req_i),
    .cfg_resp_o(apu_pu_cfg_resp_o)
  );

  // MicroBlaze path: AXI-ID manipulator, then Protection Unit.
  axi_id_manipulator #(
    .ID_MASK (MB_ID_MASK),
    .ID_VALUE(MB_ID_VALUE)
  ) u_mb_idm (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .slv_req_i (mb_req_i),
    .slv_resp_o(mb_resp_o),
    .mst_req_o (mb_idm_req),
    .mst_resp_i(mb_idm_resp)
  );

  protection_unit #(
    .NUM_PD (1),
    .NUM_MR (2),
    .PD_ID  (pd_id_arr_t'(MB_ID_VALUE)),
    .PD_MASK(pd_id_arr_t'(MB_ID_MASK)),
    .MR_BASE(MrBase),
    .MR_LSB (MrLsb)
  ) u_mb_pu (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .slv_req_i (mb_idm_req),
    .slv_resp_o(mb_idm_resp),
    .mst_req_o (mb_ic_req_o),
    .mst_resp_i(mb_ic_resp_i),
    .cfg_req_i (mb_pu_cfg_req_i),
    .cfg_resp_o(mb_pu_cfg_resp_o)
  );

endmodule
