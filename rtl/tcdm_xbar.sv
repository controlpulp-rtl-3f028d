// Logarithmic-interconnect style crossbar: NM TCDM masters to NS TCDM slaves.
//
// Every master can reach every slave in the same cycle. The slave is picked
// from addr[SEL_LSB +: log2(NS)]: SEL_LSB = 2 gives word interleaving over
// banks (L1, shared L2 banks), a higher bit gives contiguous banks (private
// L2 banks). With NS = 1 it is a plain round-robin arbiter in front of one
// shared slave. Each slave has its own round-robin pointer, which moves past
// the winner whenever the slave grants, so a conflicting master waits at most
// NM-1 grants. The address is passed on unchanged. The slave's response comes
// one cycle after its grant and is steered back to the master recorded at the
// grant, so an access without conflict takes one cycle, as the document
// states for the cluster's L1 interconnect. Round-robin arbitration is this
// design's choice.
module tcdm_xbar
  import cpulp_pkg::*;
#(
  parameter int unsigned NM      = 9,
  parameter int unsigned NS      = 16,
  parameter int unsigned SEL_LSB = 2
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  tcdm_req_t [NM-1:0]  m_req_i,
  output tcdm_rsp_t [NM-1:0]  m_rsp_o,
  output tcdm_req_t [NS-1:0]  s_req_o,
  input  tcdm_rsp_t [NS-1:0]  s_rsp_i
);
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NM-1:0][SW-1:0] tgt;          // slave addressed by each master
  logic [NS-1:0][MW-1:0] win;          // winning master per slave
  logic [NS-1:0]         win_valid;
  logic [NS-1:0][MW-1:0] rr_q;         // round-robin pointer per slave
  logic [NS-1:0][MW-1:0] rsp_m_q;      // master owed a response per slave

  always_comb begin
    for (int m = 0; m < NM; m++)
      tgt[m] = (NS > 1) ? SW'(m_req_i[m].addr >> SEL_LSB) : '0;
  end

  // Per-slave round-robin choice.
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      win[s]       = '0;
      win_valid[s] = 1'b0;
      for (int k = 0; k < NM; k++) begin
        int unsigned idx;
        idx = (int'(rr_q[s]) + k) % NM;
        if (!win_valid[s] && m_req_i[idx].req && (int'(tgt[idx]) == s)) begin
          win[s]       = MW'(idx);
          win_valid[s] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req_o[s]     = m_req_i[win[s]];
      s_req_o[s].req = win_valid[s];
    end
    for (int m = 0; m < NM; m++) begin
      m_rsp_o[m] = '0;
      for (int s = 0; s < NS; s++) begin
        if (win_valid[s] && int'(win[s]) == m) m_rsp_o[m].gnt = s_rsp_i[s].gnt;
        if (s_rsp_i[s].rvalid && int'(rsp_m_q[s]) == m) begin
          m_rsp_o[m].rvalid = 1'b1;
          m_rsp_o[m].rdata  = s_rsp_i[s].rdata;
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rr_q    <= '0;
      rsp_m_q <= '0;
    end else begin
      for (int s = 0; s < NS; s++) begin
        if (win_valid[s] && s_rsp_i[s].gnt) begin
          rsp_m_q[s] <= win[s];
          rr_q[s]    <= MW'((int'(win[s]) + 1) % NM);
        end
      end
    end
  end
endmodule
