// pu_config - configuration block of the Protection Unit.
//
// An AXI4-Lite slave that holds the run-time state of one Protection Unit:
// the read access policy and the write access policy (one NUM_PD x NUM_MR
// bit matrix each), a control register and status registers.  The policies
// are driven continuously to the two policy checks, so a new rule takes
// effect in the cycle in which its write response is presented.  That the policies
// live here, are written at run time over AXI-Lite, and that there are
// separate read and write policies follows the design description; the
// register map below, the status contents and the reset value are this
// design's choices.  After reset every policy bit is 0, so the unit denies all
// traffic until it has been configured.
//
// Register map (byte offset within the 4 KiB window, 32-bit registers):
//   0x000 CTRL       write 1 to bit 0 to clear STATUS and DENY_ADDR; reads 0
//   0x004 STATUS     bit 0: a read was denied, bit 1: a write was denied
//   0x008 DENY_ADDR  address of the most recent denied request
//   0x00C INFO       [7:0] NUM_PD, [15:8] NUM_MR (read only)
//   0x100 + 4*d      read policy row of domain d; bit m = d may read region m
//   0x200 + 4*d      write policy row of domain d; bit m = d may write region m
// Other offsets, and policy rows d >= NUM_PD, answer SLVERR.  Writes to the
// read-only STATUS, DENY_ADDR and INFO registers are ignored with OKAY.
//
// Timing: a write is taken when AW and W are both valid and no write response
// is pending; its B follows one cycle later.  A read is taken when no read
// response is pending; R follows one cycle later.  Denial events
// (rd_denied_i / wr_denied_i, one cycle each) are recorded at the next edge.
module pu_config
  import axi_pu_pkg::*;
#(
  parameter int unsigned NUM_PD = MAX_PD,
  parameter int unsigned NUM_MR = MAX_MR
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  axil_req_t                     cfg_req_i,
  output axil_resp_t                    cfg_resp_o,
  input  logic                          rd_denied_i,
  input  logic                          wr_denied_i,
  input  addr_t                         deny_addr_i,
  output logic [NUM_PD-1:0][NUM_MR-1:0] rd_policy_o,
  output logic [NUM_PD-1:0][NUM_MR-1:0] wr_policy_o
);

  typedef enum logic [2:0] {
    SEL_CTRL, SEL_STATUS, SEL_DENY, SEL_INFO, SEL_RD_POL, SEL_WR_POL, SEL_NONE
  } reg_sel_e;

  typedef struct packed {
    reg_sel_e    sel;
    logic [4:0]  row;
  } decode_t;

  function automatic decode_t decode(input addr_t a);
    decode_t r;
    logic [11:0] off;
    off   = a[11:0];
    r.row = off[6:2];
    r.sel = SEL_NONE;
    if (off[1:0] == 2'b00) begin
      unique case (off[11:8])
        4'h0: begin
          unique case (off[7:0])
            REG_CTRL[7:0]:      r.sel = SEL_CTRL;
            REG_STATUS[7:0]:    r.sel = SEL_STATUS;
            REG_DENY_ADDR[7:0]: r.sel = SEL_DENY;
            REG_INFO[7:0]:      r.sel = SEL_INFO;
            default:            r.sel = SEL_NONE;
          endcase
        end
        4'h1: if (off[7] == 1'b0 && 32'(off[6:2]) < NUM_PD) r.sel = SEL_RD_POL;
        4'h2: if (off[7] == 1'b0 && 32'(off[6:2]) < NUM_PD) r.sel = SEL_WR_POL;
        default: r.sel = SEL_NONE;
      endcase
    end
    return r;
  endfunction

  logic [1:0] status_q;
  addr_t      deny_addr_q;
  logic       b_valid_q, r_valid_q;
  resp_e      b_resp_q, r_resp_q;
  data_t      r_data_q;

  logic    wr_take, rd_take, clear_req;
  decode_t wdec, rdec;
  data_t   wmask;

  always_comb begin
    wr_take = cfg_req_i.aw_valid && cfg_req_i.w_valid && !b_valid_q;
    rd_take = cfg_req_i.ar_valid && !r_valid_q;
    wdec    = decode(cfg_req_i.aw_addr);
    rdec    = decode(cfg_req_i.ar_addr);
    for (int i = 0; i < STRB_W; i++) wmask[8*i +: 8] = {8{cfg_req_i.w_strb[i]}};
    clear_req = wr_take && wdec.sel == SEL_CTRL && cfg_req_i.w_strb[0] && cfg_req_i.w_data[0];
  end

  // Policy registers.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_policy_o <= '0;
      wr_policy_o <= '0;
    end else if (wr_take) begin
      if (wdec.sel == SEL_RD_POL)
        rd_policy_o[wdec.row] <= NUM_MR'((data_t'(rd_policy_o[wdec.row]) & ~wmask) |
                                         (cfg_req_i.w_data & wmask));
      if (wdec.sel == SEL_WR_POL)
        wr_policy_o[wdec.row] <= NUM_MR'((data_t'(wr_policy_o[wdec.row]) & ~wmask) |
                                         (cfg_req_i.w_data & wmask));
    end
  end

  // Status: sticky denial flags and the address of the last denial.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      status_q    <= '0;
      deny_addr_q <= '0;
    end else if (clear_req) begin
      status_q    <= '0;
      deny_addr_q <= '0;
    end else begin
      if (rd_denied_i) status_q[0] <= 1'b1;
      if (wr_denied_i) status_q[1] <= 1'b1;
      if (rd_denied_i || wr_denied_i) deny_addr_q <= deny_addr_i;
    end
  end

  // Write response channel.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      b_valid_q <= 1'b0;
      b_resp_q  <= RESP_OKAY;
    end else if (wr_take) begin
      b_valid_q <= 1'b1;
      b_resp_q  <= (wdec.sel == SEL_NONE) ? RESP_SLVERR : RESP_OKAY;
    end else if (cfg_req_i.b_ready) begin
      b_valid_q <= 1'b0;
    end
  end

  // Read data channel.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_valid_q <= 1'b0;
      r_resp_q  <= RESP_OKAY;
      r_data_q  <= '0;
    end else if (rd_take) begin
      r_valid_q <= 1'b1;
      r_resp_q  <= (rdec.sel == SEL_NONE) ? RESP_SLVERR : RESP_OKAY;
      unique case (rdec.sel)
        SEL_STATUS: r_data_q <= data_t'(status_q);
        SEL_DENY:   r_data_q <= deny_addr_q;
        SEL_INFO:   r_data_q <= data_t'({8'(NUM_MR), 8'(NUM_PD)});
        SEL_RD_POL: r_data_q <= data_t'(rd_policy_o[rdec.row]);
        SEL_WR_POL: r_data_q <= data_t'(wr_policy_o[rdec.row]);
        default:    r_data_q <= '0;
      endcase
    end else if (cfg_req_i.r_ready) begin
      r_valid_q <= 1'b0;
    end
  end

  always_comb begin
    cfg_resp_o          = '0;
    cfg_resp_o.aw_ready = wr_take;
    cfg_resp_o.w_ready  = wr_take;
    cfg_resp_o.b_valid  = b_valid_q;
    cfg_resp_o.b_resp   = b_resp_q;
    cfg_resp_o.ar_ready = !r_valid_q;
    cfg_resp_o.r_valid  = r_valid_q;
    cfg_resp_o.r_data   = r_data_q;
    cfg_resp_o.r_resp   = r_resp_q;
  end

endmodule
