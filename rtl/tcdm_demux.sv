// Address demultiplexer: one TCDM master to N TCDM slaves.
//
// Used for the TCDM demuxers of the SoC domain, the per-core demux of the
// cluster and the peripheral demux. Slave i owns [BASE[i], BASE[i]+SIZE[i]);
// the first range that matches wins, and the slave sees the address minus
// its base. An address that matches no range is granted at once and answered
// with TCDM_ERR_DATA, so a stray access cannot hang a core. The slave that
// granted is remembered for one cycle to route its response back. The
// decoding rule and the error answer are this design's choice.
module tcdm_demux
  import cpulp_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter logic [N-1:0][31:0] BASE = '0,
  parameter logic [N-1:0][31:0] SIZE = '1
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  tcdm_req_t          m_req_i,
  output tcdm_rsp_t          m_rsp_o,
  output tcdm_req_t [N-1:0]  s_req_o,
  input  tcdm_rsp_t [N-1:0]  s_rsp_i
);
  localparam int unsigned IW = $clog2(N + 1);

  logic [IW-1:0] sel;        // N means "no match"
  logic [IW-1:0] rsp_sel_q;
  logic          err_rvalid_q;

  always_comb begin
    sel = IW'(N);
    for (int i = N - 1; i >= 0; i--)
      if (m_req_i.addr - BASE[i] < SIZE[i]) sel = IW'(i);
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_req_o[i]      = m_req_i;
      s_req_o[i].addr = m_req_i.addr - BASE[i];
      s_req_o[i].req  = m_req_i.req && (int'(sel) == i);
    end
    m_rsp_o = '0;
    if (m_req_i.req)
      m_rsp_o.gnt = (int'(sel) == N) ? 1'b1 : s_rsp_i[sel].gnt;
    if (err_rvalid_q) begin
      m_rsp_o.rvalid = 1'b1;
      m_rsp_o.rdata  = TCDM_ERR_DATA;
    end else if (int'(rsp_sel_q) < N) begin
      m_rsp_o.rvalid = s_rsp_i[rsp_sel_q].rvalid;
      m_rsp_o.rdata  = s_rsp_i[rsp_sel_q].rdata;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rsp_sel_q    <= IW'(N);
      err_rvalid_q <= 1'b0;
    end else begin
      err_rvalid_q <= m_req_i.req && (int'(sel) == N);
      if (m_req_i.req && m_rsp_o.gnt) rsp_sel_q <= sel;
    end
  end
endmodule
