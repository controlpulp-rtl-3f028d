// Power-controller platform top: SoC domain plus parallel cluster accelerator.
//
// The platform runs the power-control firmware of a many-core processor. A
// Manager Core (outside this module; its ports are brought out) owns the SoC
// domain: 512 KiB of L2 with two banks private to it, the PLIC that turns up
// to 144 mailbox doorbells into one external interrupt, a SoC timer and the
// AXI4 ports (slave: firmware loading; master: sensors, actuators,
// mailboxes). The cluster domain holds the worker cores (outside; their data
// ports are brought out), a 16-bank 128 KiB L1 reached through a single-cycle
// crossbar, a 2-D DMA that fetches equally spaced sensor registers into L1,
// an event unit with the hardware barrier, and a cluster timer.
//
// Data paths (Manager Core addresses, see cpulp_pkg):
//   Manager data:  L2 | PLIC | SoC timer | else -> AXI (cluster or external)
//   Manager instr: L2 only
//   Worker core c: L1 | event unit port c | cluster peripherals (timer, DMA)
//                  | else -> shared AXI bridge -> cluster AXI bus
//   Cluster AXI bus (DMA + worker bridge) -> L2 or the AXI master port
//   SoC AXI (Manager bridge) -> cluster L1 or the AXI master port
//   AXI slave port -> L2
// The SoC domain runs on clk_i, the cluster domain (worker ports included)
// on clk_cl_i; the two AXI links between them cross through axi_cdc, so the
// clocks may be unrelated. rst_ni resets both domains. The block set and sizes follow the
// document's block diagram; the address map, bus protocols and the way the
// crossbars are built from demultiplexers and multiplexers are this design's.
module controlpulp
  import cpulp_pkg::*;
#(
  parameter int unsigned NCORES = 8,
  parameter int unsigned NIRQ   = 144
) (
  input  logic                   clk_i,       // SoC domain
  input  logic                   clk_cl_i,    // cluster domain
  input  logic                   rst_ni,
  // Manager Core
  input  tcdm_req_t              mgr_instr_req_i,
  output tcdm_rsp_t              mgr_instr_rsp_o,
  input  tcdm_req_t              mgr_data_req_i,
  output tcdm_rsp_t              mgr_data_rsp_o,
  output logic                   mgr_irq_ext_o,
  output logic [$clog2(NIRQ+1)-1:0] mgr_irq_id_o,
  output logic                   mgr_irq_timer_o,
  // global interrupt lines (mailbox doorbells)
  input  logic [NIRQ-1:0]        irq_i,
  // worker cores
  input  tcdm_req_t [NCORES-1:0] cl_data_req_i,
  output tcdm_rsp_t [NCORES-1:0] cl_data_rsp_o,
  output logic [NCORES-1:0]      cl_core_sleep_o,
  output logic                   cl_dma_busy_o,
  // AXI4 slave port (firmware loading into L2)
  input  axi_req_t               axi_slv_req_i,
  output axi_rsp_t               axi_slv_rsp_o,
  // AXI4 master port (PVT registers, actuators, mailboxes)
  output axi_req_t               axi_mst_req_o,
  input  axi_rsp_t               axi_mst_rsp_i
);
  localparam logic [31:0] ALL = 32'hFFFF_FFFF;

  // ================= SoC domain =================
  tcdm_req_t       instr_l2_req;  tcdm_rsp_t       instr_l2_rsp;
  tcdm_req_t [3:0] mgr_dm_req;    tcdm_rsp_t [3:0] mgr_dm_rsp;
  tcdm_req_t [1:0] l2_sh_req;     tcdm_rsp_t [1:0] l2_sh_rsp;
  axi_req_t        soc_axi_req;   axi_rsp_t        soc_axi_rsp;
  axi_req_t  [1:0] soc_dm_req;    axi_rsp_t  [1:0] soc_dm_rsp;   // [0] cluster, [1] external
  axi_req_t        cl_out_req;    axi_rsp_t        cl_out_rsp;    // cluster clock
  axi_req_t        cl_soc_req;    axi_rsp_t        cl_soc_rsp;    // same, SoC clock
  axi_req_t        soc_cl_req;    axi_rsp_t        soc_cl_rsp;    // SoC -> cluster, cluster clock
  axi_req_t  [1:0] cl_dm_req;     axi_rsp_t  [1:0] cl_dm_rsp;    // [0] L2, [1] external
  axi_req_t  [1:0] ext_req;       axi_rsp_t  [1:0] ext_rsp;

  tcdm_demux #(.N(1), .BASE(L2_BASE), .SIZE(L2_SIZE)) i_instr_dm (
    .clk_i, .rst_ni,
    .m_req_i(mgr_instr_req_i), .m_rsp_o(mgr_instr_rsp_o),
    .s_req_o(instr_l2_req), .s_rsp_i(instr_l2_rsp)
  );

  tcdm_demux #(
    .N   (4),
    .BASE({32'h0, SOC_TIMER_BASE, PLIC_BASE, L2_BASE}),
    .SIZE({ALL,   SOC_TIMER_SIZE, PLIC_SIZE, L2_SIZE})
  ) i_data_dm (
    .clk_i, .rst_ni,
    .m_req_i(mgr_data_req_i), .m_rsp_o(mgr_data_rsp_o),
    .s_req_o(mgr_dm_req), .s_rsp_i(mgr_dm_rsp)
  );

  l2_memory #(.NSH(2)) i_l2 (
    .clk_i, .rst_ni,
    .instr_req_i(instr_l2_req), .instr_rsp_o(instr_l2_rsp),
    .data_req_i(mgr_dm_req[0]), .data_rsp_o(mgr_dm_rsp[0]),
    .sh_req_i(l2_sh_req), .sh_rsp_o(l2_sh_rsp)
  );

  plic #(.NSRC(NIRQ)) i_plic (
    .clk_i, .rst_ni, .irq_i,
    .req_i(mgr_dm_req[1]), .rsp_o(mgr_dm_rsp[1]),
    .irq_o(mgr_irq_ext_o), .irq_id_o(mgr_irq_id_o)
  );

  timer_unit i_soc_timer (
    .clk_i, .rst_ni,
    .req_i(mgr_dm_req[2]), .rsp_o(mgr_dm_rsp[2]), .irq_o(mgr_irq_timer_o)
  );

  tcdm_to_axi i_soc_bridge (
    .clk_i, .rst_ni,
    .tcdm_req_i(mgr_dm_req[3]), .tcdm_rsp_o(mgr_dm_rsp[3]),
    .m_req_o(soc_axi_req), .m_rsp_i(soc_axi_rsp)
  );

  axi_demux #(.NM(2), .BASE({32'h0, CLUSTER_BASE}), .SIZE({32'h0, CLUSTER_SIZE})) i_soc_xbar (
    .clk_i, .rst_ni,
    .s_req_i(soc_axi_req), .s_rsp_o(soc_axi_rsp),
    .m_req_o(soc_dm_req), .m_rsp_i(soc_dm_rsp)
  );

  axi_demux #(.NM(2), .BASE({32'h0, L2_BASE}), .SIZE({32'h0, L2_SIZE})) i_cl_xbar (
    .clk_i, .rst_ni,
    .s_req_i(cl_soc_req), .s_rsp_o(cl_soc_rsp),
    .m_req_o(cl_dm_req), .m_rsp_i(cl_dm_rsp)
  );

  axi_to_tcdm #(.ADDR_OFFSET(L2_BASE)) i_slv_to_l2 (
    .clk_i, .rst_ni,
    .s_req_i(axi_slv_req_i), .s_rsp_o(axi_slv_rsp_o),
    .tcdm_req_o(l2_sh_req[0]), .tcdm_rsp_i(l2_sh_rsp[0])
  );

  axi_to_tcdm #(.ADDR_OFFSET(L2_BASE)) i_cl_to_l2 (
    .clk_i, .rst_ni,
    .s_req_i(cl_dm_req[0]), .s_rsp_o(cl_dm_rsp[0]),
    .tcdm_req_o(l2_sh_req[1]), .tcdm_rsp_i(l2_sh_rsp[1])
  );

  assign ext_req[0]    = soc_dm_req[1];
  assign soc_dm_rsp[1] = ext_rsp[0];
  assign ext_req[1]    = cl_dm_req[1];
  assign cl_dm_rsp[1]  = ext_rsp[1];

  axi_mux #(.NS(2), .TAG_LSB(AXI_ID_W - 1)) i_ext_mux (
    .clk_i, .rst_ni,
    .s_req_i(ext_req), .s_rsp_o(ext_rsp),
    .m_req_o(axi_mst_req_o), .m_rsp_i(axi_mst_rsp_i)
  );

  // ================= Cluster domain =================
  localparam int unsigned L1_NM = NCORES + 2;   // cores, DMA, AXI slave side

  tcdm_req_t [NCORES-1:0][3:0] core_dm_req;  tcdm_rsp_t [NCORES-1:0][3:0] core_dm_rsp;
  tcdm_req_t [L1_NM-1:0]       l1_req;       tcdm_rsp_t [L1_NM-1:0]       l1_rsp;
  tcdm_req_t [NCORES-1:0]      eu_req;       tcdm_rsp_t [NCORES-1:0]      eu_rsp;
  tcdm_req_t [NCORES-1:0]      per_req;      tcdm_rsp_t [NCORES-1:0]      per_rsp;
  tcdm_req_t [NCORES-1:0]      ext_core_req; tcdm_rsp_t [NCORES-1:0]      ext_core_rsp;
  tcdm_req_t                   per_arb_req;  tcdm_rsp_t                   per_arb_rsp;
  tcdm_req_t [1:0]             per_dm_req;   tcdm_rsp_t [1:0]             per_dm_rsp;
  tcdm_req_t                   ext_arb_req;  tcdm_rsp_t                   ext_arb_rsp;
  tcdm_req_t                   cl_slv_req;   tcdm_rsp_t                   cl_slv_rsp;
  axi_req_t  [1:0]             cl_bus_req;   axi_rsp_t  [1:0]             cl_bus_rsp;  // [0] DMA, [1] cores
  logic                        dma_done, cl_timer_irq;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    tcdm_demux #(
      .N   (4),
      .BASE({32'h0, CL_PERIPH_BASE, CL_PERIPH_BASE + CL_EU_OFF, L1_BASE}),
      .SIZE({ALL,   CL_PERIPH_SIZE, CL_PERIPH_SLOT,             L1_SIZE})
    ) i_core_dm (
      .clk_i(clk_cl_i), .rst_ni,
      .m_req_i(cl_data_req_i[c]), .m_rsp_o(cl_data_rsp_o[c]),
      .s_req_o(core_dm_req[c]), .s_rsp_i(core_dm_rsp[c])
    );
    assign l1_req[c]          = core_dm_req[c][0];
    assign core_dm_rsp[c][0]  = l1_rsp[c];
    assign eu_req[c]          = core_dm_req[c][1];
    assign core_dm_rsp[c][1]  = eu_rsp[c];
    assign per_req[c]         = core_dm_req[c][2];
    assign core_dm_rsp[c][2]  = per_rsp[c];
    assign ext_core_req[c]    = core_dm_req[c][3];
    assign core_dm_rsp[c][3]  = ext_core_rsp[c];
  end

  l1_tcdm #(.NM(L1_NM)) i_l1 (
    .clk_i(clk_cl_i), .rst_ni, .req_i(l1_req), .rsp_o(l1_rsp)
  );

  event_unit #(.NCORES(NCORES), .NHW(2)) i_eu (
    .clk_i(clk_cl_i), .rst_ni,
    .req_i(eu_req), .rsp_o(eu_rsp),
    .hw_evt_i({cl_timer_irq, dma_done}),
    .core_sleep_o(cl_core_sleep_o),
    .barrier_release_o()
  );

  // Shared cluster peripherals: round-robin among the cores, then by address.
  tcdm_xbar #(.NM(NCORES), .NS(1)) i_per_arb (
    .clk_i(clk_cl_i), .rst_ni,
    .m_req_i(per_req), .m_rsp_o(per_rsp),
    .s_req_o(per_arb_req), .s_rsp_i(per_arb_rsp)
  );

  tcdm_demux #(
    .N   (2),
    .BASE({CL_DMA_OFF, CL_TIMER_OFF}),
    .SIZE({CL_PERIPH_SLOT, CL_PERIPH_SLOT})
  ) i_per_dm (
    .clk_i(clk_cl_i), .rst_ni,
    .m_req_i(per_arb_req), .m_rsp_o(per_arb_rsp),
    .s_req_o(per_dm_req), .s_rsp_i(per_dm_rsp)
  );

  timer_unit i_cl_timer (
    .clk_i(clk_cl_i), .rst_ni,
    .req_i(per_dm_req[0]), .rsp_o(per_dm_rsp[0]), .irq_o(cl_timer_irq)
  );

  cluster_dma #(.TCDM_BASE(L1_BASE)) i_dma (
    .clk_i(clk_cl_i), .rst_ni,
    .cfg_req_i(per_dm_req[1]), .cfg_rsp_o(per_dm_rsp[1]),
    .tcdm_req_o(l1_req[NCORES]), .tcdm_rsp_i(l1_rsp[NCORES]),
    .m_req_o(cl_bus_req[0]), .m_rsp_i(cl_bus_rsp[0]),
    .done_o(dma_done), .busy_o(cl_dma_busy_o)
  );

  // Worker-core accesses outside the cluster share one AXI bridge.
  tcdm_xbar #(.NM(NCORES), .NS(1)) i_ext_arb (
    .clk_i(clk_cl_i), .rst_ni,
    .m_req_i(ext_core_req), .m_rsp_o(ext_core_rsp),
    .s_req_o(ext_arb_req), .s_rsp_i(ext_arb_rsp)
  );

  tcdm_to_axi i_cl_bridge (
    .clk_i(clk_cl_i), .rst_ni,
    .tcdm_req_i(ext_arb_req), .tcdm_rsp_o(ext_arb_rsp),
    .m_req_o(cl_bus_req[1]), .m_rsp_i(cl_bus_rsp[1])
  );

  axi_mux #(.NS(2), .TAG_LSB(AXI_ID_W - 2)) i_cl_mux (
    .clk_i(clk_cl_i), .rst_ni,
    .s_req_i(cl_bus_req), .s_rsp_o(cl_bus_rsp),
    .m_req_o(cl_out_req), .m_rsp_i(cl_out_rsp)
  );

  // AXI clock-domain crossings between the two domains
  axi_cdc i_cdc_soc_to_cl (
    .src_clk_i(clk_i),    .src_rst_ni(rst_ni), .s_req_i(soc_dm_req[0]), .s_rsp_o(soc_dm_rsp[0]),
    .dst_clk_i(clk_cl_i), .dst_rst_ni(rst_ni), .m_req_o(soc_cl_req),    .m_rsp_i(soc_cl_rsp)
  );

  axi_cdc i_cdc_cl_to_soc (
    .src_clk_i(clk_cl_i), .src_rst_ni(rst_ni), .s_req_i(cl_out_req), .s_rsp_o(cl_out_rsp),
    .dst_clk_i(clk_i),    .dst_rst_ni(rst_ni), .m_req_o(cl_soc_req), .m_rsp_i(cl_soc_rsp)
  );

  // SoC -> cluster: AXI into L1 (only the L1 range answers).
  axi_to_tcdm #(.ADDR_OFFSET(32'h0)) i_soc_to_cl (
    .clk_i(clk_cl_i), .rst_ni,
    .s_req_i(soc_cl_req), .s_rsp_o(soc_cl_rsp),
    .tcdm_req_o(cl_slv_req), .tcdm_rsp_i(cl_slv_rsp)
  );

  tcdm_demux #(.N(1), .BASE(L1_BASE), .SIZE(L1_SIZE)) i_cl_slv_dm (
    .clk_i(clk_cl_i), .rst_ni,
    .m_req_i(cl_slv_req), .m_rsp_o(cl_slv_rsp),
    .s_req_o(l1_req[NCORES+1]), .s_rsp_i(l1_rsp[NCORES+1])
  );
endmodule
