// TCDM master to AXI4 master bridge for single-word accesses.
//
// Lets a core's loads and stores that leave its local memories travel over
// AXI4: from the Manager Core to the cluster and the external AXI master
// port (mailboxes, PVT registers), and from the worker cores to L2 and the
// outside. Each request becomes one single-beat AXI transaction of 4 bytes
// placed in the 64-bit lane chosen by address bit 2. The request is granted
// when the AXI response has arrived, and rvalid (with the read data) follows
// one cycle later, so the core simply waits for the whole round trip. The
// document implies this path in its block diagram; the bridge is this
// design's.
module tcdm_to_axi
  import cpulp_pkg::*;
#(
  parameter axi_id_t AXI_ID = '0
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t tcdm_req_i,
  output tcdm_rsp_t tcdm_rsp_o,
  output axi_req_t  m_req_o,
  input  axi_rsp_t  m_rsp_i
);
  typedef enum logic [2:0] {IDLE, WR_ADDR, WR_RESP, RD_ADDR, RD_DATA, GRANT} state_e;

  state_e      st_q;
  logic        aw_done_q, w_done_q;
  logic [31:0] rdata_q;
  logic        rvalid_q;

  always_comb begin
    m_req_o          = '0;
    m_req_o.aw.id    = AXI_ID;
    m_req_o.aw.addr  = tcdm_req_i.addr;
    m_req_o.aw.len   = '0;
    m_req_o.aw.size  = 3'd2;
    m_req_o.aw.burst = AXI_BURST_INCR;
    m_req_o.ar       = m_req_o.aw;
    m_req_o.w.data   = {tcdm_req_i.wdata, tcdm_req_i.wdata};
    m_req_o.w.strb   = tcdm_req_i.addr[2] ? {tcdm_req_i.be, 4'h0} : {4'h0, tcdm_req_i.be};
    m_req_o.w.last   = 1'b1;
    m_req_o.aw_valid = (st_q == WR_ADDR) && !aw_done_q;
    m_req_o.w_valid  = (st_q == WR_ADDR) && !w_done_q;
    m_req_o.b_ready  = (st_q == WR_RESP);
    m_req_o.ar_valid = (st_q == RD_ADDR);
    m_req_o.r_ready  = (st_q == RD_DATA);
    tcdm_rsp_o.gnt    = (st_q == GRANT);
    tcdm_rsp_o.rvalid = rvalid_q;
    tcdm_rsp_o.rdata  = rdata_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q      <= IDLE;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      rdata_q   <= '0;
      rvalid_q  <= 1'b0;
    end else begin
      rvalid_q <= (st_q == GRANT);
      unique case (st_q)
        IDLE: if (tcdm_req_i.req) begin
          aw_done_q <= 1'b0;
          w_done_q  <= 1'b0;
          st_q      <= tcdm_req_i.we ? WR_ADDR : RD_ADDR;
        end
        WR_ADDR: begin
          logic aw_d, w_d;
          aw_d = aw_done_q || m_rsp_i.aw_ready;
          w_d  = w_done_q  || m_rsp_i.w_ready;
          aw_done_q <= aw_d;
          w_done_q  <= w_d;
          if (aw_d && w_d) st_q <= WR_RESP;
        end
        WR_RESP: if (m_rsp_i.b_valid) st_q <= GRANT;
        RD_ADDR: if (m_rsp_i.ar_ready) st_q <= RD_DATA;
        RD_DATA: if (m_rsp_i.r_valid) begin
          rdata_q <= tcdm_req_i.addr[2] ? m_rsp_i.r.data[63:32] : m_rsp_i.r.data[31:0];
          st_q    <= GRANT;
        end
        GRANT:   st_q <= IDLE;
        default: st_q <= IDLE;
      endcase
    end
  end
endmodule
