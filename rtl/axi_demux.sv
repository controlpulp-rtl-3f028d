// AXI4 demultiplexer: one slave port to NM master ports by address.
//
// With axi_mux it forms the fully-connected AXI4 crossbars of the platform.
// Master port i owns [BASE[i], BASE[i]+SIZE[i]); an address no range claims
// goes to port NM-1, the default route (towards the external AXI master
// port). Addresses are passed on unchanged. To keep responses in order
// without reorder buffers, writes (and, separately, reads) may be
// outstanding towards only one port at a time: an address aimed at another
// port waits until the earlier transactions have completed. Up to MAX_TXN
// transactions per direction may be outstanding. W beats follow the order of
// the AW handshakes through a small FIFO. B and R come from the port that
// holds the outstanding transactions. The document gives the crossbars'
// function; this structure is this design's choice.
module axi_demux
  import cpulp_pkg::*;
#(
  parameter int unsigned NM      = 2,
  parameter logic [NM-1:0][31:0] BASE = '0,
  parameter logic [NM-1:0][31:0] SIZE = '0,
  parameter int unsigned MAX_TXN = 8
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  axi_req_t          s_req_i,
  output axi_rsp_t          s_rsp_o,
  output axi_req_t [NM-1:0] m_req_o,
  input  axi_rsp_t [NM-1:0] m_rsp_i
);
  localparam int unsigned SW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned CW = $clog2(MAX_TXN + 1);
  localparam int unsigned FW = (MAX_TXN > 1) ? $clog2(MAX_TXN) : 1;

  function automatic logic [SW-1:0] decode(axi_addr_t a);
    logic [SW-1:0] s;
    s = SW'(NM - 1);
    for (int i = NM - 1; i >= 0; i--)
      if (a - BASE[i] < SIZE[i]) s = SW'(i);
    return s;
  endfunction

  logic [SW-1:0] aw_sel, ar_sel, aw_tgt_q, ar_tgt_q;
  logic [CW-1:0] aw_cnt_q, ar_cnt_q;
  logic          aw_ok, ar_ok;
  logic [MAX_TXN-1:0][SW-1:0] wq_q;
  logic [FW-1:0] wq_rd_q, wq_wr_q;
  logic [CW-1:0] wq_cnt_q;
  logic [SW-1:0] w_tgt;

  assign aw_sel = decode(s_req_i.aw.addr);
  assign ar_sel = decode(s_req_i.ar.addr);
  assign aw_ok  = (aw_cnt_q == '0 || aw_tgt_q == aw_sel) && aw_cnt_q != CW'(MAX_TXN)
                  && wq_cnt_q != CW'(MAX_TXN);
  assign ar_ok  = (ar_cnt_q == '0 || ar_tgt_q == ar_sel) && ar_cnt_q != CW'(MAX_TXN);
  assign w_tgt  = wq_q[wq_rd_q];

  always_comb begin
    s_rsp_o = '0;
    for (int i = 0; i < NM; i++) begin
      m_req_o[i]          = s_req_i;
      m_req_o[i].aw_valid = s_req_i.aw_valid && aw_ok && int'(aw_sel) == i;
      m_req_o[i].ar_valid = s_req_i.ar_valid && ar_ok && int'(ar_sel) == i;
      m_req_o[i].w_valid  = s_req_i.w_valid && wq_cnt_q != '0 && int'(w_tgt) == i;
      m_req_o[i].b_ready  = s_req_i.b_ready && int'(aw_tgt_q) == i;
      m_req_o[i].r_ready  = s_req_i.r_ready && int'(ar_tgt_q) == i;
    end
    s_rsp_o.aw_ready = aw_ok && m_rsp_i[aw_sel].aw_ready;
    s_rsp_o.ar_ready = ar_ok && m_rsp_i[ar_sel].ar_ready;
    s_rsp_o.w_ready  = wq_cnt_q != '0 && m_rsp_i[w_tgt].w_ready;
    s_rsp_o.b_valid  = m_rsp_i[aw_tgt_q].b_valid;
    s_rsp_o.b        = m_rsp_i[aw_tgt_q].b;
    s_rsp_o.r_valid  = m_rsp_i[ar_tgt_q].r_valid;
    s_rsp_o.r        = m_rsp_i[ar_tgt_q].r;
  end

  logic aw_hs, ar_hs, w_last_hs, b_hs, r_last_hs;
  assign aw_hs     = s_req_i.aw_valid && s_rsp_o.aw_ready;
  assign ar_hs     = s_req_i.ar_valid && s_rsp_o.ar_ready;
  assign w_last_hs = s_req_i.w_valid && s_rsp_o.w_ready && s_req_i.w.last;
  assign b_hs      = s_rsp_o.b_valid && s_req_i.b_ready;
  assign r_last_hs = s_rsp_o.r_valid && s_req_i.r_ready && s_rsp_o.r.last;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      aw_tgt_q <= '0; ar_tgt_q <= '0;
      aw_cnt_q <= '0; ar_cnt_q <= '0;
      wq_q <= '0; wq_rd_q <= '0; wq_wr_q <= '0; wq_cnt_q <= '0;
    end else begin
      if (aw_hs) begin
        aw_tgt_q      <= aw_sel;
        wq_q[wq_wr_q] <= aw_sel;
        wq_wr_q       <= FW'((int'(wq_wr_q) + 1) % MAX_TXN);
      end
      if (ar_hs) ar_tgt_q <= ar_sel;
      if (w_last_hs) wq_rd_q <= FW'((int'(wq_rd_q) + 1) % MAX_TXN);
      aw_cnt_q <= aw_cnt_q + CW'(aw_hs) - CW'(b_hs);
      ar_cnt_q <= ar_cnt_q + CW'(ar_hs) - CW'(r_last_hs);
      wq_cnt_q <= wq_cnt_q + CW'(aw_hs) - CW'(w_last_hs);
    end
  end
endmodule
