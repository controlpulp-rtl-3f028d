// Cluster DMA engine with 2-D (strided) transfers.
//
// Moves data between the AXI side (L2, or the controlled processor's PVT
// sensor registers through the AXI master port) and the cluster's L1,
// without help from any core. A transfer is REPS rows of LEN bytes; on the
// AXI side row r starts at EXT_ADDR + r*STRIDE, on the L1 side the rows are
// packed one after another from L1_ADDR. One transfer can thus gather
// equally spaced sensor registers of all processing elements.
//
// Programming (TCDM slave port, one-cycle response): write EXT_ADDR (0x00),
// L1_ADDR (0x04), LEN (0x08, bytes, multiple of 4), STRIDE (0x0C, bytes),
// REPS (0x10, 0 counts as 1), then CMD (0x14, bit 0 = direction, 0: AXI->L1,
// 1: L1->AXI) to queue the transfer. Up to CMD_DEPTH transfers wait in a
// queue (a CMD write stalls while it is full) and run in order. STATUS
// (0x18) reads {completed count, queued count} (16 bits each); done_o pulses
// when a transfer finishes.
//
// Engine: an address walker splits each row into INCR bursts of 4-byte beats
// (at most 256 beats, never crossing a 4 KiB boundary) and issues them as
// long as fewer than MAX_OUTSTANDING bursts are in flight, so the AXI latency
// is hidden. A data walker follows the same addresses word by word: for reads
// each R beat is written to L1 in the same cycle it is accepted; for writes
// each word is read from L1 and sent as a W beat. The 4-byte word sits in the
// 64-bit lane given by its address bit 2. L1 addresses are given as cluster
// addresses; TCDM_BASE is subtracted on the L1 port.
// From the document: direct L1 access, 2-D transfers for equally spaced
// registers, the AXI master path, and up to 128 outstanding transactions.
// The register map, the queue and the beat size are this design's choice.
// r_ready depends on the L1 grant, which depends on r_valid; Verilator sees
// the whole AXI bundle as one packed struct and reports a loop through it in
// the platform, but no bit depends on itself.
module cluster_dma
  import cpulp_pkg::*;
#(
  parameter int unsigned MAX_OUTSTANDING = 128,
  parameter int unsigned CMD_DEPTH       = 4,
  parameter logic [31:0] TCDM_BASE       = 32'h1000_0000,
  parameter axi_id_t     AXI_ID          = '0
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  // programming port
  input  tcdm_req_t cfg_req_i,
  output tcdm_rsp_t cfg_rsp_o,
  // L1 port
  output tcdm_req_t tcdm_req_o,
  input  tcdm_rsp_t tcdm_rsp_i,
  // AXI master port
  output axi_req_t  m_req_o,
  input  axi_rsp_t  m_rsp_i,
  output logic      done_o,
  output logic      busy_o
);
  localparam int unsigned OW = $clog2(MAX_OUTSTANDING + 1);
  localparam int unsigned QW = $clog2(CMD_DEPTH);
  localparam int unsigned LQ = 4;   // queued W burst lengths

  typedef struct packed {
    logic [31:0] ext;
    logic [31:0] l1;
    logic [29:0] words;   // words per row
    logic [31:0] stride;
    logic [31:0] reps;
    logic        dir;     // 0: AXI -> L1, 1: L1 -> AXI
  } cmd_t;

  // ---------------- programming interface ----------------
  cmd_t                    stage_q;
  cmd_t [CMD_DEPTH-1:0]    q_q;
  logic [QW-1:0]           q_rd_q, q_wr_q;
  logic [QW:0]             q_cnt_q;
  logic [15:0]             n_queued_q, n_done_q;
  logic [31:0]             cfg_rdata_q;
  logic                    cfg_rvalid_q;
  logic                    q_full, is_cmd, pop;
  logic [2:0]              cfg_idx;

  assign q_full  = (q_cnt_q == (QW+1)'(CMD_DEPTH));
  assign cfg_idx = cfg_req_i.addr[4:2];
  assign is_cmd  = cfg_req_i.we && cfg_idx == 3'd5;
  assign cfg_rsp_o.gnt    = cfg_req_i.req && !(is_cmd && q_full);
  assign cfg_rsp_o.rvalid = cfg_rvalid_q;
  assign cfg_rsp_o.rdata  = cfg_rdata_q;

  logic push;
  assign push = cfg_req_i.req && is_cmd && !q_full;

  // ---------------- engine state ----------------
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_DONE} est_e;
  est_e        est_q;
  cmd_t        cur;
  // address walker
  logic [31:0] a_row_q, a_base_q;
  logic [29:0] a_col_q;
  logic        a_done_q;
  // data walker
  logic [31:0] d_row_q, d_base_q, d_l1_q;
  logic [29:0] d_col_q;
  logic        d_done_q;
  // outstanding bursts
  logic [OW-1:0] outst_q;
  // W burst-length queue
  logic [LQ-1:0][8:0] lq_q;
  logic [1:0]   lq_rd_q, lq_wr_q;
  logic [2:0]   lq_cnt_q;
  logic [8:0]   w_beat_q;
  // write-data staging
  typedef enum logic [1:0] {W_REQ, W_WAIT, W_SEND} wst_e;
  wst_e        wst_q;
  logic [31:0] wbuf_q;

  assign cur = q_q[q_rd_q];

  // Burst size for the address walker.
  logic [31:0] a_addr;
  logic [29:0] a_left;
  logic [12:0] a_to_4k;
  logic [8:0]  a_beats;
  always_comb begin
    a_addr  = a_base_q + {a_col_q, 2'b00};
    a_left  = cur.words - a_col_q;
    a_to_4k = (13'h1000 - {1'b0, a_addr[11:0]}) >> 2;
    a_beats = 9'd256;
    if (a_left < 30'(a_beats))  a_beats = 9'(a_left);
    if (a_to_4k < 13'(a_beats)) a_beats = 9'(a_to_4k);
  end

  logic can_issue;
  assign can_issue = (est_q == E_RUN) && !a_done_q && (outst_q != OW'(MAX_OUTSTANDING))
                     && (!cur.dir || lq_cnt_q != 3'(LQ));

  // Data walker address.
  logic [31:0] d_addr;
  assign d_addr = d_base_q + {d_col_q, 2'b00};

  always_comb begin
    m_req_o           = '0;
    m_req_o.ar.id     = AXI_ID;
    m_req_o.ar.addr   = a_addr;
    m_req_o.ar.len    = 8'(a_beats - 9'd1);
    m_req_o.ar.size   = 3'd2;
    m_req_o.ar.burst  = AXI_BURST_INCR;
    m_req_o.aw        = m_req_o.ar;
    m_req_o.ar_valid  = can_issue && !cur.dir;
    m_req_o.aw_valid  = can_issue &&  cur.dir;
    m_req_o.b_ready   = 1'b1;
    m_req_o.w.data    = {wbuf_q, wbuf_q};
    m_req_o.w.strb    = d_addr[2] ? 8'hF0 : 8'h0F;
    m_req_o.w.last    = (w_beat_q + 9'd1 == lq_q[lq_rd_q]);
    m_req_o.w_valid   = (est_q == E_RUN) && cur.dir && (wst_q == W_SEND) && lq_cnt_q != '0;

    tcdm_req_o        = '0;
    tcdm_req_o.addr   = d_l1_q - TCDM_BASE;
    tcdm_req_o.be     = 4'hF;
    if (est_q == E_RUN && !d_done_q) begin
      if (!cur.dir) begin
        tcdm_req_o.req   = m_rsp_i.r_valid;
        tcdm_req_o.we    = 1'b1;
        tcdm_req_o.wdata = d_addr[2] ? m_rsp_i.r.data[63:32] : m_rsp_i.r.data[31:0];
      end else begin
        tcdm_req_o.req   = (wst_q == W_REQ);
      end
    end
    m_req_o.r_ready = (est_q == E_RUN) && !cur.dir && !d_done_q && tcdm_rsp_i.gnt;
  end

  logic ax_hs, r_hs, w_hs, b_hs, data_step;
  assign ax_hs = (m_req_o.ar_valid && m_rsp_i.ar_ready) || (m_req_o.aw_valid && m_rsp_i.aw_ready);
  assign r_hs  = m_req_o.r_ready && m_rsp_i.r_valid;
  assign w_hs  = m_req_o.w_valid && m_rsp_i.w_ready;
  assign b_hs  = m_rsp_i.b_valid;
  assign data_step = cur.dir ? w_hs : r_hs;
  assign pop   = (est_q == E_DONE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      stage_q <= '0; stage_q.reps <= 32'd1; q_q <= '0; q_rd_q <= '0; q_wr_q <= '0; q_cnt_q <= '0;
      n_queued_q <= '0; n_done_q <= '0; cfg_rdata_q <= '0; cfg_rvalid_q <= 1'b0;
      est_q <= E_IDLE;
      a_row_q <= '0; a_base_q <= '0; a_col_q <= '0; a_done_q <= 1'b0;
      d_row_q <= '0; d_base_q <= '0; d_col_q <= '0; d_l1_q <= '0; d_done_q <= 1'b0;
      outst_q <= '0;
      lq_q <= '0; lq_rd_q <= '0; lq_wr_q <= '0; lq_cnt_q <= '0; w_beat_q <= '0;
      wst_q <= W_REQ; wbuf_q <= '0;
    end else begin
      // ---- programming ----
      cfg_rvalid_q <= cfg_req_i.req && cfg_rsp_o.gnt;
      if (cfg_req_i.req && cfg_rsp_o.gnt) begin
        if (cfg_req_i.we) begin
          unique case (cfg_idx)
            3'd0: stage_q.ext    <= cfg_req_i.wdata;
            3'd1: stage_q.l1     <= cfg_req_i.wdata;
            3'd2: stage_q.words  <= cfg_req_i.wdata[31:2];
            3'd3: stage_q.stride <= cfg_req_i.wdata;
            3'd4: stage_q.reps   <= (cfg_req_i.wdata == '0) ? 32'd1 : cfg_req_i.wdata;
            3'd5: stage_q.dir    <= cfg_req_i.wdata[0];
            default: ;
          endcase
        end else begin
          unique case (cfg_idx)
            3'd0: cfg_rdata_q <= stage_q.ext;
            3'd1: cfg_rdata_q <= stage_q.l1;
            3'd2: cfg_rdata_q <= {stage_q.words, 2'b00};
            3'd3: cfg_rdata_q <= stage_q.stride;
            3'd4: cfg_rdata_q <= stage_q.reps;
            3'd6: cfg_rdata_q <= {n_done_q, n_queued_q};
            default: cfg_rdata_q <= '0;
          endcase
        end
      end
      if (push) begin
        q_q[q_wr_q]     <= stage_q;
        q_q[q_wr_q].dir <= cfg_req_i.wdata[0];
        q_wr_q          <= QW'((int'(q_wr_q) + 1) % CMD_DEPTH);
        n_queued_q      <= n_queued_q + 1'b1;
      end
      if (pop) begin
        q_rd_q   <= QW'((int'(q_rd_q) + 1) % CMD_DEPTH);
        n_done_q <= n_done_q + 1'b1;
      end
      q_cnt_q <= q_cnt_q + (QW+1)'(push) - (QW+1)'(pop);

      // ---- engine ----
      unique case (est_q)
        E_IDLE: if (q_cnt_q != '0) begin
          a_row_q  <= '0; a_base_q <= cur.ext; a_col_q <= '0;
          a_done_q <= (cur.words == '0);
          d_row_q  <= '0; d_base_q <= cur.ext; d_col_q <= '0; d_l1_q <= cur.l1;
          d_done_q <= (cur.words == '0);
          w_beat_q <= '0; wst_q <= W_REQ;
          est_q    <= E_RUN;
        end
        E_RUN: if (a_done_q && d_done_q && outst_q == '0) est_q <= E_DONE;
        E_DONE: est_q <= E_IDLE;
        default: est_q <= E_IDLE;
      endcase

      // address walker
      if (ax_hs) begin
        if (a_col_q + 30'(a_beats) == cur.words) begin
          a_col_q  <= '0;
          a_row_q  <= a_row_q + 1;
          a_base_q <= a_base_q + cur.stride;
          if (a_row_q + 1 == cur.reps) a_done_q <= 1'b1;
        end else begin
          a_col_q <= a_col_q + 30'(a_beats);
        end
        if (cur.dir) begin
          lq_q[lq_wr_q] <= a_beats;
          lq_wr_q       <= lq_wr_q + 1'b1;
        end
      end

      // data walker
      if (data_step) begin
        d_l1_q <= d_l1_q + 32'd4;
        if (d_col_q + 30'd1 == cur.words) begin
          d_col_q  <= '0;
          d_row_q  <= d_row_q + 1;
          d_base_q <= d_base_q + cur.stride;
          if (d_row_q + 1 == cur.reps) d_done_q <= 1'b1;
        end else begin
          d_col_q <= d_col_q + 30'd1;
        end
      end

      // write-data staging: L1 read -> W beat
      if (est_q == E_RUN && cur.dir) begin
        unique case (wst_q)
          W_REQ:  if (!d_done_q && tcdm_rsp_i.gnt) wst_q <= W_WAIT;
          W_WAIT: if (tcdm_rsp_i.rvalid) begin
            wbuf_q <= tcdm_rsp_i.rdata;
            wst_q  <= W_SEND;
          end
          W_SEND: if (w_hs) wst_q <= W_REQ;
          default: wst_q <= W_REQ;
        endcase
      end
      if (w_hs) begin
        if (m_req_o.w.last) begin
          w_beat_q <= '0;
          lq_rd_q  <= lq_rd_q + 1'b1;
        end else begin
          w_beat_q <= w_beat_q + 1'b1;
        end
      end
      lq_cnt_q <= lq_cnt_q + 3'(ax_hs && cur.dir) - 3'(w_hs && m_req_o.w.last);

      // outstanding bursts: retire on the last R beat or on B
      outst_q <= outst_q + OW'(ax_hs) - OW'((r_hs && m_rsp_i.r.last) || b_hs);
    end
  end

  assign done_o = (est_q == E_DONE);
  assign busy_o = (q_cnt_q != '0);

  always_ff @(posedge clk_i)
    if (rst_ni) assert (outst_q <= OW'(MAX_OUTSTANDING));
endmodule
