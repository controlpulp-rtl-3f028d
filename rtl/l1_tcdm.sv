// L1 tightly-coupled data memory of the cluster: 128 KiB in 16 banks.
//
// The banks are word-interleaved (bank = word address mod 16), so cores
// walking through consecutive words spread over the banks. NM masters (the
// eight worker cores, the DMA and the cluster's AXI slave side) reach every
// bank through a single-cycle logarithmic crossbar with round-robin
// arbitration per bank: an access without conflict is granted in the cycle
// of the request and answered in the next. Ports take byte offsets from the
// start of L1. Size and single-cycle latency follow the document; bank count
// follows the figure; the arbitration is this design's choice.
module l1_tcdm
  import cpulp_pkg::*;
#(
  parameter int unsigned NM         = 10,
  parameter int unsigned NB         = 16,
  parameter int unsigned BANK_WORDS = 2048   // 8 KiB per bank
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  tcdm_req_t [NM-1:0] req_i,
  output tcdm_rsp_t [NM-1:0] rsp_o
);
  tcdm_req_t [NB-1:0] b_req;
  tcdm_rsp_t [NB-1:0] b_rsp;

  tcdm_xbar #(.NM(NM), .NS(NB), .SEL_LSB(2)) i_xbar (
    .clk_i, .rst_ni,
    .m_req_i(req_i), .m_rsp_o(rsp_o),
    .s_req_o(b_req), .s_rsp_i(b_rsp)
  );

  for (genvar b = 0; b < NB; b++) begin : g_bank
    tcdm_sram #(.WORDS(BANK_WORDS), .ADDR_LSB(2 + $clog2(NB))) i_bank (
      .clk_i, .rst_ni, .req_i(b_req[b]), .rsp_o(b_rsp[b])
    );
  end
endmodule
