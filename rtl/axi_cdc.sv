// AXI4 clock-domain crossing between the SoC and the cluster domain.
//
// Each of the five AXI channels crosses through its own asynchronous FIFO
// (cdc_fifo): AW, W and AR from the slave side (src_clk_i) to the master side
// (dst_clk_i), B and R back. Handshakes on both sides are plain AXI
// valid/ready, so any number of transactions can be in flight, limited by
// the FIFO depth, and the order of every channel is kept. A beat takes two to
// three cycles of the receiving clock to cross. Interface: AXI4 slave port
// s_req_i/s_rsp_o on src_clk_i, AXI4 master port m_req_o/m_rsp_i on
// dst_clk_i, one reset per side. From the document: an AXI clock-domain
// crossing sits between the SoC and the cluster. The FIFO-based structure
// and the depth are this design's choice.
module axi_cdc
  import cpulp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     src_clk_i,
  input  logic     src_rst_ni,
  input  axi_req_t s_req_i,
  output axi_rsp_t s_rsp_o,
  input  logic     dst_clk_i,
  input  logic     dst_rst_ni,
  output axi_req_t m_req_o,
  input  axi_rsp_t m_rsp_i
);
  cdc_fifo #(.WIDTH($bits(axi_ax_t)), .DEPTH(DEPTH)) i_aw (
    .src_clk_i, .src_rst_ni,
    .src_valid_i(s_req_i.aw_valid), .src_ready_o(s_rsp_o.aw_ready), .src_data_i(s_req_i.aw),
    .dst_clk_i, .dst_rst_ni,
    .dst_valid_o(m_req_o.aw_valid), .dst_ready_i(m_rsp_i.aw_ready), .dst_data_o(m_req_o.aw)
  );

  cdc_fifo #(.WIDTH($bits(axi_w_t)), .DEPTH(DEPTH)) i_w (
    .src_clk_i, .src_rst_ni,
    .src_valid_i(s_req_i.w_valid), .src_ready_o(s_rsp_o.w_ready), .src_data_i(s_req_i.w),
    .dst_clk_i, .dst_rst_ni,
    .dst_valid_o(m_req_o.w_valid), .dst_ready_i(m_rsp_i.w_ready), .dst_data_o(m_req_o.w)
  );

  cdc_fifo #(.WIDTH($bits(axi_ax_t)), .DEPTH(DEPTH)) i_ar (
    .src_clk_i, .src_rst_ni,
    .src_valid_i(s_req_i.ar_valid), .src_ready_o(s_rsp_o.ar_ready), .src_data_i(s_req_i.ar),
    .dst_clk_i, .dst_rst_ni,
    .dst_valid_o(m_req_o.ar_valid), .dst_ready_i(m_rsp_i.ar_ready), .dst_data_o(m_req_o.ar)
  );

  cdc_fifo #(.WIDTH($bits(axi_b_t)), .DEPTH(DEPTH)) i_b (
    .src_clk_i(dst_clk_i), .src_rst_ni(dst_rst_ni),
    .src_valid_i(m_rsp_i.b_valid), .src_ready_o(m_req_o.b_ready), .src_data_i(m_rsp_i.b),
    .dst_clk_i(src_clk_i), .dst_rst_ni(src_rst_ni),
    .dst_valid_o(s_rsp_o.b_valid), .dst_ready_i(s_req_i.b_ready), .dst_data_o(s_rsp_o.b)
  );

  cdc_fifo #(.WIDTH($bits(axi_r_t)), .DEPTH(DEPTH)) i_r (
    .src_clk_i(dst_clk_i), .src_rst_ni(dst_rst_ni),
    .src_valid_i(m_rsp_i.r_valid), .src_ready_o(m_req_o.r_ready), .src_data_i(m_rsp_i.r),
    .dst_clk_i(src_clk_i), .dst_rst_ni(src_rst_ni),
    .dst_valid_o(s_rsp_o.r_valid), .dst_ready_i(s_req_i.r_ready), .dst_data_o(s_rsp_o.r)
  );
endmodule
