// AXI4 slave to 32-bit TCDM master bridge.
//
// Serves the platform's AXI slave port (an external agent loading the
// firmware into L2 and booting the controller) and the cluster's slave side
// (the SoC reaching L1). One transaction is served at a time; when both an
// AR and an AW wait, they alternate. Every 64-bit beat becomes one or two
// 32-bit TCDM accesses: the low word (address bit 2 = 0) and/or the high
// word, as the beat size and, for writes, the strobes require. INCR bursts
// advance by the beat size, FIXED bursts repeat the address (WRAP is treated
// as INCR). ADDR_OFFSET is subtracted from the AXI address to form the TCDM
// address. The responses are OKAY. Timing: a read beat takes 2 cycles per
// word plus its R handshake; a write beat takes 1 cycle per written word.
// The document names the AXI-to-memory path; this bridge is this design's.
module axi_to_tcdm
  import cpulp_pkg::*;
#(
  parameter logic [31:0] ADDR_OFFSET = 32'h0
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axi_req_t  s_req_i,
  output axi_rsp_t  s_rsp_o,
  output tcdm_req_t tcdm_req_o,
  input  tcdm_rsp_t tcdm_rsp_i
);
  typedef enum logic [2:0] {
    IDLE, RD_REQ, RD_WAIT, RD_BEAT, WR_BEAT, WR_REQ, WR_RESP
  } state_e;

  state_e     st_q;
  axi_ax_t    ax_q;
  logic [7:0] beat_q;
  logic       half_q;        // word of the beat being accessed: 0 low, 1 high
  logic       last_rd_q;     // previous transaction was a read
  axi_data_t  data_q;
  axi_w_t     w_q;

  logic need_hi;
  assign need_hi = (ax_q.size == 3'd3) ||  ax_q.addr[2];

  logic [31:0] word_addr;
  assign word_addr = {ax_q.addr[31:3], half_q, 2'b00} - ADDR_OFFSET;

  axi_addr_t next_addr;
  always_comb begin
    next_addr = ax_q.addr;
    if (ax_q.burst != AXI_BURST_FIXED) next_addr = ax_q.addr + (axi_addr_t'(1) << ax_q.size);
  end

  // Write beat: is the high word to be written too?
  logic wr_hi;
  assign wr_hi = |w_q.strb[7:4];

  always_comb begin
    s_rsp_o    = '0;
    tcdm_req_o = '0;
    tcdm_req_o.addr = word_addr;
    unique case (st_q)
      IDLE: begin
        if (s_req_i.ar_valid && (!s_req_i.aw_valid || !last_rd_q)) s_rsp_o.ar_ready = 1'b1;
        else if (s_req_i.aw_valid)                                  s_rsp_o.aw_ready = 1'b1;
      end
      RD_REQ: begin
        tcdm_req_o.req = 1'b1;
        tcdm_req_o.we  = 1'b0;
        tcdm_req_o.be  = 4'hF;
      end
      RD_BEAT: begin
        s_rsp_o.r_valid = 1'b1;
        s_rsp_o.r.id    = ax_q.id;
        s_rsp_o.r.data  = data_q;
        s_rsp_o.r.resp  = AXI_RESP_OKAY;
        s_rsp_o.r.last  = (beat_q == ax_q.len);
      end
      WR_BEAT: s_rsp_o.w_ready = 1'b1;
      WR_REQ: begin
        tcdm_req_o.req   = 1'b1;
        tcdm_req_o.we    = 1'b1;
        tcdm_req_o.be    = half_q ? w_q.strb[7:4] : w_q.strb[3:0];
        tcdm_req_o.wdata = half_q ? w_q.data[63:32] : w_q.data[31:0];
      end
      WR_RESP: begin
        s_rsp_o.b_valid = 1'b1;
        s_rsp_o.b.id    = ax_q.id;
        s_rsp_o.b.resp  = AXI_RESP_OKAY;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q      <= IDLE;
      ax_q      <= '0;
      beat_q    <= '0;
      half_q    <= 1'b0;
      last_rd_q <= 1'b0;
      data_q    <= '0;
      w_q       <= '0;
    end else begin
      unique case (st_q)
        IDLE: begin
          beat_q <= '0;
          if (s_rsp_o.ar_ready) begin
            ax_q      <= s_req_i.ar;
            half_q    <= s_req_i.ar.addr[2] && s_req_i.ar.size != 3'd3;
            last_rd_q <= 1'b1;
            data_q    <= '0;
            st_q      <= RD_REQ;
          end else if (s_rsp_o.aw_ready) begin
            ax_q      <= s_req_i.aw;
            last_rd_q <= 1'b0;
            st_q      <= WR_BEAT;
          end
        end
        RD_REQ:  if (tcdm_rsp_i.gnt) st_q <= RD_WAIT;
        RD_WAIT: if (tcdm_rsp_i.rvalid) begin
          if (half_q) data_q[63:32] <= tcdm_rsp_i.rdata;
          else        data_q[31:0]  <= tcdm_rsp_i.rdata;
          if (!half_q && need_hi) begin
            half_q <= 1'b1;
            st_q   <= RD_REQ;
          end else begin
            st_q   <= RD_BEAT;
          end
        end
        RD_BEAT: if (s_req_i.r_ready) begin
          if (beat_q == ax_q.len) begin
            st_q <= IDLE;
          end else begin
            beat_q    <= beat_q + 1'b1;
            ax_q.addr <= next_addr;
            half_q    <= next_addr[2] && ax_q.size != 3'd3;
            data_q    <= '0;
            st_q      <= RD_REQ;
          end
        end
        WR_BEAT: if (s_req_i.w_valid) begin
          w_q <= s_req_i.w;
          if (|s_req_i.w.strb[3:0]) begin
            half_q <= 1'b0;
            st_q   <= WR_REQ;
          end else if (|s_req_i.w.strb[7:4]) begin
            half_q <= 1'b1;
            st_q   <= WR_REQ;
          end else if (s_req_i.w.last) begin
            st_q   <= WR_RESP;
          end else begin
            ax_q.addr <= next_addr;   // nothing to write in this beat
          end
        end
        WR_REQ: if (tcdm_rsp_i.gnt) begin
          if (!half_q && wr_hi) begin
            half_q <= 1'b1;
          end else if (w_q.last) begin
            st_q <= WR_RESP;
          end else begin
            ax_q.addr <= next_addr;
            st_q      <= WR_BEAT;
          end
        end
        WR_RESP: if (s_req_i.b_ready) st_q <= IDLE;
        default: st_q <= IDLE;
      endcase
    end
  end
endmodule
