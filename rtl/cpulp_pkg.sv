// Shared types and constants of the power-controller platform.
//
// Two bus protocols run through the design:
//  * TCDM: a word (32-bit) request/grant protocol used by the cores' data
//    ports, the L1/L2 memory interconnects and the peripherals. A master
//    raises req with addr/we/be/wdata and holds them until gnt. The slave
//    answers with rvalid (and rdata for reads) exactly one cycle after gnt,
//    for writes as well as reads. A slave may hold gnt low to stall.
//  * AXI4: 32-bit addresses and 64-bit data, as the platform's external
//    master and slave ports are specified. The ID width is this design's
//    choice; AXI multiplexers use its top bit to tag the source.
// The address map is this design's choice, modelled on the usual PULP map.
package cpulp_pkg;

  // ---------------- TCDM ----------------
  typedef struct packed {
    logic        req;
    logic [31:0] addr;
    logic        we;
    logic [3:0]  be;
    logic [31:0] wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } tcdm_rsp_t;

  // Data returned for an access that decodes to no target.
  localparam logic [31:0] TCDM_ERR_DATA = 32'hBADACCE5;

  // ---------------- AXI4 ----------------
  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 64;
  localparam int unsigned AXI_STRB_W = AXI_DATA_W / 8;
  localparam int unsigned AXI_ID_W   = 6;

  typedef logic [AXI_ID_W-1:0]   axi_id_t;
  typedef logic [AXI_ADDR_W-1:0] axi_addr_t;
  typedef logic [AXI_DATA_W-1:0] axi_data_t;
  typedef logic [AXI_STRB_W-1:0] axi_strb_t;

  localparam logic [1:0] AXI_BURST_FIXED = 2'b00;
  localparam logic [1:0] AXI_BURST_INCR  = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;
  localparam logic [1:0] AXI_RESP_DECERR = 2'b11;

  // Address channel, shared by AW and AR.
  typedef struct packed {
    axi_id_t    id;
    axi_addr_t  addr;
    logic [7:0] len;    // beats - 1
    logic [2:0] size;   // log2(bytes per beat)
    logic [1:0] burst;
  } axi_ax_t;

  typedef struct packed {
    axi_data_t data;
    axi_strb_t strb;
    logic      last;
  } axi_w_t;

  typedef struct packed {
    axi_id_t    id;
    logic [1:0] resp;
  } axi_b_t;

  typedef struct packed {
    axi_id_t    id;
    axi_data_t  data;
    logic [1:0] resp;
    logic       last;
  } axi_r_t;

  // Everything a master drives.
  typedef struct packed {
    logic    aw_valid;
    axi_ax_t aw;
    logic    w_valid;
    axi_w_t  w;
    logic    b_ready;
    logic    ar_valid;
    axi_ax_t ar;
    logic    r_ready;
  } axi_req_t;

  // Everything a slave drives.
  typedef struct packed {
    logic   aw_ready;
    logic   w_ready;
    logic   b_valid;
    axi_b_t b;
    logic   ar_ready;
    logic   r_valid;
    axi_r_t r;
  } axi_rsp_t;

  // ---------------- Address map ----------------
  // SoC domain
  localparam logic [31:0] PLIC_BASE      = 32'h0C00_0000;
  localparam logic [31:0] PLIC_SIZE      = 32'h0040_0000;
  localparam logic [31:0] SOC_TIMER_BASE = 32'h1A10_B000;
  localparam logic [31:0] SOC_TIMER_SIZE = 32'h0000_1000;
  localparam logic [31:0] L2_BASE        = 32'h1C00_0000;
  localparam logic [31:0] L2_SIZE        = 32'h0008_0000;  // 512 KiB
  // Cluster domain
  localparam logic [31:0] CLUSTER_BASE   = 32'h1000_0000;
  localparam logic [31:0] CLUSTER_SIZE   = 32'h0040_0000;
  localparam logic [31:0] L1_BASE        = 32'h1000_0000;
  localparam logic [31:0] L1_SIZE        = 32'h0002_0000;  // 128 KiB
  localparam logic [31:0] CL_PERIPH_BASE = 32'h1020_0000;
  localparam logic [31:0] CL_PERIPH_SIZE = 32'h0000_4000;
  localparam logic [31:0] CL_TIMER_OFF   = 32'h0000_0400;
  localparam logic [31:0] CL_EU_OFF      = 32'h0000_0800;
  localparam logic [31:0] CL_DMA_OFF     = 32'h0000_1800;
  localparam logic [31:0] CL_PERIPH_SLOT = 32'h0000_0400;

endpackage
