// axi_pu_pkg - shared types and constants of the AXI Protection Unit.
//
// Holds the AXI4 (full) and AXI4-Lite channel structs used by every block,
// bundled PULP-style into one request struct (master to slave) and one
// response struct (slave to master) per port.  The widths are this design's
// choice: 32-bit addresses and data match the 32-bit AXI general-purpose
// ports of the Zynq-7000 that the Protection Unit was deployed on, and the
// 12-bit ID is the width of the Zynq general-purpose master port IDs.  User
// signals are not carried.  The limit of 16 protection domains and 16 memory
// regions per Protection Unit instance follows the design description.
package axi_pu_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 12;

  // Largest number of protection domains / memory regions per instance.
  localparam int unsigned MAX_PD = 16;
  localparam int unsigned MAX_MR = 16;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [ID_W-1:0]   id_t;
  typedef logic [7:0]        len_t;
  typedef logic [2:0]        size_t;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // AW and AR carry the same fields.
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    len_t       len;
    size_t      size;
    burst_e     burst;
    logic       lock;
    logic [3:0] cache;
    logic [2:0] prot;
    logic [3:0] qos;
    logic [3:0] region;
  } ax_chan_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_chan_t;

  typedef struct packed {
    id_t   id;
    resp_e resp;
  } b_chan_t;

  typedef struct packed {
    id_t   id;
    data_t data;
    resp_e resp;
    logic  last;
  } r_chan_t;

  typedef struct packed {
    ax_chan_t aw;
    logic     aw_valid;
    w_chan_t  w;
    logic     w_valid;
    logic     b_ready;
    ax_chan_t ar;
    logic     ar_valid;
    logic     r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    b_chan_t b;
    logic    b_valid;
    logic    ar_ready;
    r_chan_t r;
    logic    r_valid;
  } axi_resp_t;

  // AXI4-Lite configuration port.
  typedef struct packed {
    addr_t      aw_addr;
    logic [2:0] aw_prot;
    logic       aw_valid;
    data_t      w_data;
    strb_t      w_strb;
    logic       w_valid;
    logic       b_ready;
    addr_t      ar_addr;
    logic [2:0] ar_prot;
    logic       ar_valid;
    logic       r_ready;
  } axil_req_t;

  typedef struct packed {
    logic  aw_ready;
    logic  w_ready;
    resp_e b_resp;
    logic  b_valid;
    logic  ar_ready;
    data_t r_data;
    resp_e r_resp;
    logic  r_valid;
  } axil_resp_t;

  // Register map of the configuration block (byte offsets, 4 KiB window).
  localparam logic [11:0] REG_CTRL      = 12'h000; // W1: bit 0 clears the status
  localparam logic [11:0] REG_STATUS    = 12'h004; // bit 0 read denied, bit 1 write denied
  localparam logic [11:0] REG_DENY_ADDR = 12'h008; // address of the last denied request
  localparam logic [11:0] REG_INFO      = 12'h00C; // [7:0] PDs, [15:8] MRs
  localparam logic [11:0] REG_RD_POLICY = 12'h100; // + 4*PD: bit m = PD may read MR m
  localparam logic [11:0] REG_WR_POLICY = 12'h200; // + 4*PD: bit m = PD may write MR m

  typedef logic [MAX_PD-1:0][ID_W-1:0]   pd_id_arr_t;
  typedef logic [MAX_MR-1:0][ADDR_W-1:0] mr_base_arr_t;
  typedef logic [MAX_MR-1:0][5:0]        mr_lsb_arr_t;

  // Default design-time domain table: domain d matches exactly AXI ID d.
  function automatic pd_id_arr_t default_pd_id();
    pd_id_arr_t v;
    for (int d = 0; d < MAX_PD; d++) v[d] = id_t'(d);
    return v;
  endfunction

  function automatic pd_id_arr_t default_pd_mask();
    pd_id_arr_t v;
    for (int d = 0; d < MAX_PD; d++) v[d] = '1;
    return v;
  endfunction

  // Default design-time region table: region m is the 4 KiB page at
  // 0x4000_0000 + m * 0x1000.
  function automatic mr_base_arr_t default_mr_base();
    mr_base_arr_t v;
    for (int m = 0; m < MAX_MR; m++) v[m] = addr_t'(32'h4000_0000 + (m << 12));
    return v;
  endfunction

  function automatic mr_lsb_arr_t default_mr_lsb();
    mr_lsb_arr_t v;
    for (int m = 0; m < MAX_MR; m++) v[m] = 6'd12;
    return v;
  endfunction

endpackage
