// AXI4 multiplexer: NS slave ports onto one master port.
//
// This is the AXI-4 Mux in front of the platform's AXI master port, merging
// traffic from the SoC domain and from the cluster (and, inside the cluster,
// DMA and core traffic). AW and AR are arbitrated separately, round robin;
// once a source is presented it stays selected until its handshake, so the
// output never changes under a stalled valid. The source index is written
// into the top bits of the outgoing ID and B and R responses are steered back
// by those bits, with the bits cleared. Write data follow their addresses in
// order: every AW handshake queues its source and W beats are taken from the
// source at the head until WLAST. The document names the mux; arbitration and ID
// tagging are this design's choice. TAG_LSB places the tag; a mux behind
// another mux uses a lower position so both tags survive. IDs must be zero
// from the tag position upwards.
// The Verilator linter reports a combinational loop through the response ready bits
// when this mux sits in the platform: each AXI bundle is one packed struct,
// so a ready that depends on another channel's valid looks like a loop. No
// bit feeds itself (readies never depend on the same channel's ready) and
// synthesis finds no loop.
module axi_mux
  import cpulp_pkg::*;
#(
  parameter int unsigned NS       = 2,
  parameter int unsigned W_FIFO   = 8,
  // lowest ID bit of the source tag; nested muxes use different positions
  parameter int unsigned TAG_LSB  = AXI_ID_W - ((NS > 1) ? $clog2(NS) : 1)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  axi_req_t [NS-1:0]  s_req_i,
  output axi_rsp_t [NS-1:0]  s_rsp_o,
  output axi_req_t           m_req_o,
  input  axi_rsp_t           m_rsp_i
);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned FW = $clog2(W_FIFO);

  // ---------------- address channels ----------------
  logic [SW-1:0] aw_sel, ar_sel, aw_rr_q, ar_rr_q, aw_lock_sel_q, ar_lock_sel_q;
  logic          aw_any, ar_any, aw_lock_q, ar_lock_q;
  logic [W_FIFO-1:0][SW-1:0] wq_q;
  logic [FW:0]   wq_cnt_q;
  logic [FW-1:0] wq_rd_q, wq_wr_q;
  logic          wq_full, wq_empty;
  logic [SW-1:0] w_src;

  assign wq_full  = (wq_cnt_q == (FW+1)'(W_FIFO));
  assign wq_empty = (wq_cnt_q == '0);
  assign w_src    = wq_q[wq_rd_q];

  always_comb begin
    aw_any = 1'b0; aw_sel = aw_rr_q;
    ar_any = 1'b0; ar_sel = ar_rr_q;
    for (int k = 0; k < NS; k++) begin
      int unsigned i;
      i = (int'(aw_rr_q) + k) % NS;
      if (!aw_any && s_req_i[i].aw_valid) begin aw_any = 1'b1; aw_sel = SW'(i); end
    end
    for (int k = 0; k < NS; k++) begin
      int unsigned i;
      i = (int'(ar_rr_q) + k) % NS;
      if (!ar_any && s_req_i[i].ar_valid) begin ar_any = 1'b1; ar_sel = SW'(i); end
    end
    if (aw_lock_q) begin aw_sel = aw_lock_sel_q; aw_any = 1'b1; end
    if (ar_lock_q) begin ar_sel = ar_lock_sel_q; ar_any = 1'b1; end
  end

  function automatic axi_id_t tag(axi_id_t id, logic [SW-1:0] src);
    axi_id_t t;
    t = id;
    if (NS > 1) t[TAG_LSB +: SW] = src;
    return t;
  endfunction

  function automatic logic [SW-1:0] src_of(axi_id_t id);
    return (NS > 1) ? id[TAG_LSB +: SW] : '0;
  endfunction

  function automatic axi_id_t untag(axi_id_t id);
    axi_id_t t;
    t = id;
    if (NS > 1) t[TAG_LSB +: SW] = '0;
    return t;
  endfunction

  always_comb begin
    m_req_o = '0;
    // AW
    m_req_o.aw_valid = aw_any && s_req_i[aw_sel].aw_valid && !wq_full;
    m_req_o.aw       = s_req_i[aw_sel].aw;
    m_req_o.aw.id    = tag(s_req_i[aw_sel].aw.id, aw_sel);
    // W
    m_req_o.w_valid  = !wq_empty && s_req_i[w_src].w_valid;
    m_req_o.w        = s_req_i[w_src].w;
    // AR
    m_req_o.ar_valid = ar_any && s_req_i[ar_sel].ar_valid;
    m_req_o.ar       = s_req_i[ar_sel].ar;
    m_req_o.ar.id    = tag(s_req_i[ar_sel].ar.id, ar_sel);
    // B / R ready from the addressed source
    m_req_o.b_ready  = s_req_i[src_of(m_rsp_i.b.id)].b_ready;
    m_req_o.r_ready  = s_req_i[src_of(m_rsp_i.r.id)].r_ready;

    for (int i = 0; i < NS; i++) begin
      s_rsp_o[i]          = '0;
      s_rsp_o[i].aw_ready = aw_any && int'(aw_sel) == i && m_rsp_i.aw_ready && !wq_full;
      s_rsp_o[i].w_ready  = !wq_empty && int'(w_src) == i && m_rsp_i.w_ready;
      s_rsp_o[i].ar_ready = ar_any && int'(ar_sel) == i && m_rsp_i.ar_ready;
      s_rsp_o[i].b_valid  = m_rsp_i.b_valid && int'(src_of(m_rsp_i.b.id)) == i;
      s_rsp_o[i].b        = m_rsp_i.b;
      s_rsp_o[i].b.id     = untag(m_rsp_i.b.id);
      s_rsp_o[i].r_valid  = m_rsp_i.r_valid && int'(src_of(m_rsp_i.r.id)) == i;
      s_rsp_o[i].r        = m_rsp_i.r;
      s_rsp_o[i].r.id     = untag(m_rsp_i.r.id);
    end
  end

  logic aw_hs, ar_hs, w_last_hs;
  assign aw_hs     = m_req_o.aw_valid && m_rsp_i.aw_ready;
  assign ar_hs     = m_req_o.ar_valid && m_rsp_i.ar_ready;
  assign w_last_hs = m_req_o.w_valid && m_rsp_i.w_ready && m_req_o.w.last;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      aw_rr_q <= '0; ar_rr_q <= '0;
      aw_lock_q <= 1'b0; ar_lock_q <= 1'b0;
      aw_lock_sel_q <= '0; ar_lock_sel_q <= '0;
      wq_q <= '0; wq_cnt_q <= '0; wq_rd_q <= '0; wq_wr_q <= '0;
    end else begin
      aw_lock_q     <= m_req_o.aw_valid && !m_rsp_i.aw_ready;
      aw_lock_sel_q <= aw_sel;
      ar_lock_q     <= m_req_o.ar_valid && !m_rsp_i.ar_ready;
      ar_lock_sel_q <= ar_sel;
      if (aw_hs) begin
        aw_rr_q          <= SW'((int'(aw_sel) + 1) % NS);
        wq_q[wq_wr_q]    <= aw_sel;
        wq_wr_q          <= wq_wr_q + 1'b1;
      end
      if (ar_hs) ar_rr_q <= SW'((int'(ar_sel) + 1) % NS);
      if (w_last_hs) wq_rd_q <= wq_rd_q + 1'b1;
      wq_cnt_q <= wq_cnt_q + (FW+1)'(aw_hs) - (FW+1)'(w_last_hs);
    end
  end

  // Sources must leave the ID bits from TAG_LSB upwards at zero.
  for (genvar i = 0; i < NS; i++) begin : g_chk
    always_ff @(posedge clk_i)
      if (rst_ni && NS > 1) begin
        if (s_req_i[i].aw_valid) assert ((s_req_i[i].aw.id >> TAG_LSB) == '0);
        if (s_req_i[i].ar_valid) assert ((s_req_i[i].ar.id >> TAG_LSB) == '0);
      end
  end
endmodule
