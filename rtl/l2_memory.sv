// L2 memory of the SoC domain: 512 KiB in six banks.
//
// Two private banks (PRIV_BANKS x PRIV_BANK_WORDS words, contiguous, at the
// bottom of the L2 range) can only be reached by the Manager Core's
// instruction and data ports, so DMA and AXI traffic can never slow down its
// instruction and data fetches. The remaining four banks form a
// word-interleaved shared region above them, reached by the Manager Core and
// by NSH further masters (AXI slave port, cluster). An access by a shared
// master to the private region is answered with TCDM_ERR_DATA and writes
// nothing. Each master first meets a TCDM demux that picks the region, then
// the region's crossbar arbitrates per bank, round robin.
// All ports take byte offsets from the start of L2. Without a conflict an
// access is granted in the cycle of the request and answered one cycle
// later. From the document: 512 KiB, six banks, two of them private to the
// Manager Core, constant access time without conflicts. This design's
// choice: 2 x 32 KiB private + 4 x 112 KiB interleaved, round-robin
// arbitration, the error answer.
module l2_memory
  import cpulp_pkg::*;
#(
  parameter int unsigned NSH             = 2,
  parameter int unsigned PRIV_BANKS      = 2,
  parameter int unsigned PRIV_BANK_WORDS = 8192,   // 32 KiB
  parameter int unsigned INTL_BANKS      = 4,
  parameter int unsigned INTL_BANK_WORDS = 28672   // 112 KiB
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  tcdm_req_t            instr_req_i,
  output tcdm_rsp_t            instr_rsp_o,
  input  tcdm_req_t            data_req_i,
  output tcdm_rsp_t            data_rsp_o,
  input  tcdm_req_t [NSH-1:0]  sh_req_i,
  output tcdm_rsp_t [NSH-1:0]  sh_rsp_o
);
  localparam logic [31:0] PRIV_SIZE = 32'(PRIV_BANKS * PRIV_BANK_WORDS * 4);
  localparam logic [31:0] INTL_SIZE = 32'(INTL_BANKS * INTL_BANK_WORDS * 4);
  localparam int unsigned PRIV_SEL  = 2 + $clog2(PRIV_BANK_WORDS);
  localparam int unsigned INTL_LSB  = 2 + $clog2(INTL_BANKS);

  // Manager ports: [0] instr, [1] data
  tcdm_req_t [1:0]      mgr_req;
  tcdm_rsp_t [1:0]      mgr_rsp;
  tcdm_req_t [1:0][1:0] mgr_dm_req;   // [master][0 private, 1 shared]
  tcdm_rsp_t [1:0][1:0] mgr_dm_rsp;
  tcdm_req_t [1:0]      priv_m_req;
  tcdm_rsp_t [1:0]      priv_m_rsp;
  tcdm_req_t [NSH+1:0]  intl_m_req;
  tcdm_rsp_t [NSH+1:0]  intl_m_rsp;
  tcdm_req_t [PRIV_BANKS-1:0] priv_b_req;
  tcdm_rsp_t [PRIV_BANKS-1:0] priv_b_rsp;
  tcdm_req_t [INTL_BANKS-1:0] intl_b_req;
  tcdm_rsp_t [INTL_BANKS-1:0] intl_b_rsp;

  assign mgr_req[0]  = instr_req_i;
  assign mgr_req[1]  = data_req_i;
  assign instr_rsp_o = mgr_rsp[0];
  assign data_rsp_o  = mgr_rsp[1];

  for (genvar m = 0; m < 2; m++) begin : g_mgr
    tcdm_demux #(
      .N   (2),
      .BASE({PRIV_SIZE, 32'h0}),
      .SIZE({INTL_SIZE, PRIV_SIZE})
    ) i_dm (
      .clk_i, .rst_ni,
      .m_req_i(mgr_req[m]), .m_rsp_o(mgr_rsp[m]),
      .s_req_o(mgr_dm_req[m]), .s_rsp_i(mgr_dm_rsp[m])
    );
    assign priv_m_req[m]       = mgr_dm_req[m][0];
    assign mgr_dm_rsp[m][0]    = priv_m_rsp[m];
    assign intl_m_req[m]       = mgr_dm_req[m][1];
    assign mgr_dm_rsp[m][1]    = intl_m_rsp[m];
  end

  for (genvar s = 0; s < NSH; s++) begin : g_sh
    tcdm_demux #(
      .N   (1),
      .BASE(PRIV_SIZE),
      .SIZE(INTL_SIZE)
    ) i_dm (
      .clk_i, .rst_ni,
      .m_req_i(sh_req_i[s]), .m_rsp_o(sh_rsp_o[s]),
      .s_req_o(intl_m_req[2+s]), .s_rsp_i(intl_m_rsp[2+s])
    );
  end

  tcdm_xbar #(.NM(2), .NS(PRIV_BANKS), .SEL_LSB(PRIV_SEL)) i_priv_xbar (
    .clk_i, .rst_ni,
    .m_req_i(priv_m_req), .m_rsp_o(priv_m_rsp),
    .s_req_o(priv_b_req), .s_rsp_i(priv_b_rsp)
  );

  tcdm_xbar #(.NM(NSH+2), .NS(INTL_BANKS), .SEL_LSB(2)) i_intl_xbar (
    .clk_i, .rst_ni,
    .m_req_i(intl_m_req), .m_rsp_o(intl_m_rsp),
    .s_req_o(intl_b_req), .s_rsp_i(intl_b_rsp)
  );

  for (genvar b = 0; b < PRIV_BANKS; b++) begin : g_priv_bank
    tcdm_sram #(.WORDS(PRIV_BANK_WORDS), .ADDR_LSB(2)) i_bank (
      .clk_i, .rst_ni, .req_i(priv_b_req[b]), .rsp_o(priv_b_rsp[b])
    );
  end

  for (genvar b = 0; b < INTL_BANKS; b++) begin : g_intl_bank
    tcdm_sram #(.WORDS(INTL_BANK_WORDS), .ADDR_LSB(INTL_LSB)) i_bank (
      .clk_i, .rst_ni, .req_i(intl_b_req[b]), .rsp_o(intl_b_rsp[b])
    );
  end
endmodule
