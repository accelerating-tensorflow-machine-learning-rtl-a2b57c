// fcc_pkg: types and constants shared by the fully connected layer
// accelerator system (FCC).
//
// The system is a float32 fully connected layer engine with ReLU, fed from
// four dedicated block RAMs (inputs, weights, biases, outputs) and controlled
// through an AXI-Lite register file, all reached from a processor over one
// AXI4 port through an address-decoding interconnect.
//
// What this package fixes:
//   * AXI4 and AXI-Lite channel bundles as packed structs (request = what a
//     manager drives, response = what a subordinate drives). Data width 32,
//     address width 40 and ID width 16 match the processor's low-power-domain
//     master port; these widths are this design's choice.
//   * The BRAM port bundle: enable, byte write enables, byte address, write
//     data, in the style of vendor BRAM ports (byte address, 4 write enables).
//   * The accelerator limits, 32 inputs and 32 outputs, which come from the
//     accelerator description. Everything else here (address map, register
//     offsets, memory depths) is this design's own choice.
package fcc_pkg;

  // ---------------------------------------------------------------- AXI4
  localparam int unsigned AXI_ADDR_W = 40;
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;
  localparam int unsigned AXI_ID_W   = 16;

  typedef logic [AXI_ADDR_W-1:0] addr_t;
  typedef logic [AXI_DATA_W-1:0] data_t;
  typedef logic [AXI_STRB_W-1:0] strb_t;
  typedef logic [AXI_ID_W-1:0]   id_t;

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

  // Address channel (shared layout for AW and AR)
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    logic [7:0] len;    // beats - 1
    logic [2:0] size;   // log2(bytes per beat)
    burst_e     burst;
  } axi_ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } axi_w_t;

  typedef struct packed {
    id_t   id;
    resp_e resp;
  } axi_b_t;

  typedef struct packed {
    id_t   id;
    data_t data;
    resp_e resp;
    logic  last;
  } axi_r_t;

  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_resp_t;

  // ------------------------------------------------------------ AXI-Lite
  localparam int unsigned AXIL_ADDR_W = 6;   // 64-byte control space

  typedef struct packed {
    logic [AXIL_ADDR_W-1:0] aw_addr;
    logic                   aw_valid;
    data_t                  w_data;
    strb_t                  w_strb;
    logic                   w_valid;
    logic                   b_ready;
    logic [AXIL_ADDR_W-1:0] ar_addr;
    logic                   ar_valid;
    logic                   r_ready;
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

  // ----------------------------------------------------------- BRAM port
  typedef struct packed {
    logic        en;
    logic [3:0]  we;     // byte write enables
    logic [31:0] addr;   // byte address
    logic [31:0] wdata;
  } bram_req_t;

  // ------------------------------------------------ accelerator limits
  localparam int unsigned FC_MAX_IN  = 32;
  localparam int unsigned FC_MAX_OUT = 32;

  // Word depths of the four data memories
  localparam int unsigned DEPTH_INPUT   = FC_MAX_IN;
  localparam int unsigned DEPTH_WEIGHTS = FC_MAX_IN * FC_MAX_OUT;
  localparam int unsigned DEPTH_BIAS    = FC_MAX_OUT;
  localparam int unsigned DEPTH_OUTPUT  = FC_MAX_OUT;

  // ------------------------------------------- control register offsets
  localparam logic [AXIL_ADDR_W-1:0] REG_AP_CTRL  = 6'h00;
  localparam logic [AXIL_ADDR_W-1:0] REG_GIE      = 6'h04;
  localparam logic [AXIL_ADDR_W-1:0] REG_IER      = 6'h08;
  localparam logic [AXIL_ADDR_W-1:0] REG_ISR      = 6'h0C;
  localparam logic [AXIL_ADDR_W-1:0] REG_IN_SIZE  = 6'h10;
  localparam logic [AXIL_ADDR_W-1:0] REG_OUT_SIZE = 6'h18;

  // ---------------------------------------------------------- address map
  // Interconnect ports: 0 control, 1 input, 2 weights, 3 bias, 4 output.
  localparam int unsigned N_SLOTS   = 5;
  localparam addr_t       MAP_MASK  = 40'h00_0000_FFFF;   // 64 KiB windows
  localparam addr_t       MAP_CTRL  = 40'h00_8000_0000;
  localparam addr_t       MAP_IN    = 40'h00_8001_0000;
  localparam addr_t       MAP_W     = 40'h00_8002_0000;
  localparam addr_t       MAP_B     = 40'h00_8003_0000;
  localparam addr_t       MAP_OUT   = 40'h00_8004_0000;

endpackage
