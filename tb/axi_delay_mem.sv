// Behavioural AXI4 slave memory with programmable latency (simulation only).
//
// Stands in for what lies beyond the controller's AXI master port: the
// interconnect to the controlled processor, its sensor registers and its
// mailboxes. Every address and write-data beat is accepted at once; each
// read burst starts LAT cycles after its address was accepted and each write
// response comes LAT cycles after the last write beat, in order, so many
// transactions can be in flight. The storage is sparse and unwritten words
// read as a function of their address. lat can be changed at run time;
// max_rd_outst / max_wr_outst record the most transactions seen in flight.
module axi_delay_mem
  import cpulp_pkg::*;
#(
  parameter int unsigned LATENCY = 10
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t req_i,
  output axi_rsp_t rsp_o
);
  typedef struct { axi_ax_t ax; longint t; } ent_t;
  typedef struct { axi_id_t id; longint t; } bent_t;

  logic [63:0] mem [logic [28:0]];
  ent_t        arq[$];
  ent_t        awq[$];
  bent_t       bq[$];
  longint      cyc;
  int unsigned lat;
  int unsigned rbeat, wbeat;
  axi_addr_t   raddr, waddr;
  int          aw_pend;
  int          max_rd_outst, max_wr_outst, n_rd_bursts, n_wr_bursts;

  logic        r_valid_q, b_valid_q, w_ready_q;
  axi_r_t      r_q;
  axi_b_t      b_q;

  function automatic logic [63:0] peek64(axi_addr_t a);
    if (mem.exists(a[31:3])) return mem[a[31:3]];
    return {a[31:3], 3'b100, a[31:3], 3'b000} ^ 64'h5A5A_0000_A5A5_0000;
  endfunction

  function automatic logic [31:0] peek32(axi_addr_t a);
    logic [63:0] d;
    d = peek64(a);
    return a[2] ? d[63:32] : d[31:0];
  endfunction

  function automatic void poke32(axi_addr_t a, logic [31:0] v);
    logic [63:0] d;
    d = peek64(a);
    if (a[2]) d[63:32] = v; else d[31:0] = v;
    mem[a[31:3]] = d;
  endfunction

  initial lat = LATENCY;

  assign rsp_o.aw_ready = 1'b1;
  assign rsp_o.ar_ready = 1'b1;
  assign rsp_o.w_ready  = w_ready_q;   // registered: no race with the DUT's flops
  assign rsp_o.r_valid  = r_valid_q;
  assign rsp_o.r        = r_q;
  assign rsp_o.b_valid  = b_valid_q;
  assign rsp_o.b        = b_q;

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      arq.delete(); awq.delete(); bq.delete();
      cyc = 0; rbeat = 0; wbeat = 0; aw_pend = 0;
      r_valid_q <= 1'b0; b_valid_q <= 1'b0; w_ready_q <= 1'b0; r_q <= '0; b_q <= '0;
      max_rd_outst = 0; max_wr_outst = 0; n_rd_bursts = 0; n_wr_bursts = 0;
    end else begin
      cyc++;
      // write data (uses the AW queue as it was before this edge)
      if (req_i.w_valid && rsp_o.w_ready) begin
        logic [63:0] d;
        waddr = awq[0].ax.addr + ((awq[0].ax.burst == AXI_BURST_FIXED) ? 0 :
                                  axi_addr_t'(wbeat) << awq[0].ax.size);
        d = peek64(waddr);
        for (int b = 0; b < 8; b++) if (req_i.w.strb[b]) d[8*b +: 8] = req_i.w.data[8*b +: 8];
        mem[waddr[31:3]] = d;
        wbeat++;
        if (req_i.w.last) begin
          bq.push_back('{id: awq[0].ax.id, t: cyc + longint'(lat)});
          void'(awq.pop_front());
          aw_pend--;
          wbeat = 0;
        end
      end
      if (req_i.aw_valid) begin
        awq.push_back('{ax: req_i.aw, t: cyc});
        aw_pend++;
        n_wr_bursts++;
      end
      if (req_i.ar_valid) begin
        arq.push_back('{ax: req_i.ar, t: cyc + longint'(lat)});
        n_rd_bursts++;
      end
      if (arq.size() > max_rd_outst) max_rd_outst = arq.size();
      if (aw_pend + bq.size() > max_wr_outst) max_wr_outst = aw_pend + bq.size();
      // read data
      if (!r_valid_q || req_i.r_ready) begin
        if (arq.size() > 0 && cyc >= arq[0].t) begin
          raddr = arq[0].ax.addr + ((arq[0].ax.burst == AXI_BURST_FIXED) ? 0 :
                                    axi_addr_t'(rbeat) << arq[0].ax.size);
          r_valid_q <= 1'b1;
          r_q       <= '{id: arq[0].ax.id, data: peek64(raddr), resp: AXI_RESP_OKAY,
                         last: (rbeat == int'(arq[0].ax.len))};
          if (rbeat == int'(arq[0].ax.len)) begin
            void'(arq.pop_front());
            rbeat = 0;
          end else begin
            rbeat++;
          end
        end else begin
          r_valid_q <= 1'b0;
        end
      end
      // write responses
      if (!b_valid_q || req_i.b_ready) begin
        if (bq.size() > 0 && cyc >= bq[0].t) begin
          b_valid_q <= 1'b1;
          b_q       <= '{id: bq[0].id, resp: AXI_RESP_OKAY};
          void'(bq.pop_front());
        end else begin
          b_valid_q <= 1'b0;
        end
      end
      w_ready_q <= (aw_pend != 0);
    end
  end
endmodule
