// Platform-level interrupt controller (RISC-V PLIC) for the Manager Core.
//
// NSRC global interrupt lines (irq_i[j] is interrupt ID j+1; ID 0 means
// "none") arrive from the mailbox doorbells. Each line has a gateway that is
// level- or edge-triggered (le bit), and forwards one request at a time: a
// forwarded request sets the line's pending bit, and the gateway stays closed
// until the handler completes that ID. Among pending, enabled sources whose
// priority exceeds the threshold, the highest priority wins (lowest ID on a
// tie); its ID is registered and irq_o raised. A read of CLAIM returns that
// ID, clears its pending bit and marks it in service; a write of the ID to
// the same register completes it. Timing: an input edge is pending after one
// clock edge and irq_o rises after the second, the two-cycle input-to-output
// latency the document reports.
// Register map (byte offsets, 32-bit words):
//   0x000000 + 4*id  PRIORITY[id]   (PRIO_W bits)
//   0x001000 + 4*k   PENDING word k (read only, bit b = ID 32k+b)
//   0x001080 + 4*k   LE word k      (1 = edge-triggered)
//   0x002000 + 4*k   ENABLE word k  (single target: the Manager Core)
//   0x200000         THRESHOLD
//   0x200004         CLAIM / COMPLETE
// The source count, the single target and the latency follow the document;
// the register layout follows the RISC-V PLIC's usual map; priority width
// and the LE register are this design's choice.
module plic
  import cpulp_pkg::*;
#(
  parameter int unsigned NSRC   = 144,
  parameter int unsigned PRIO_W = 3
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [NSRC-1:0]   irq_i,
  input  tcdm_req_t         req_i,
  output tcdm_rsp_t         rsp_o,
  output logic              irq_o,
  output logic [$clog2(NSRC+1)-1:0] irq_id_o
);
  localparam int unsigned IDW   = $clog2(NSRC + 1);
  localparam int unsigned NWORD = (NSRC + 1 + 31) / 32;

  logic [PRIO_W-1:0] prio_q [NSRC+1];
  logic [NSRC:0]     ip_q, ia_q, ie_q, le_q;   // bit id; bit 0 unused
  logic [NSRC:0]     irq_prev_q, edge_q;
  logic [PRIO_W-1:0] thr_q;
  logic [IDW-1:0]    id_q;
  logic              irq_q;
  logic [31:0]       rdata_q;
  logic              rvalid_q;

  // Best candidate.
  logic [IDW-1:0]    best_id;
  logic [PRIO_W-1:0] best_prio;
  always_comb begin
    best_id   = '0;
    best_prio = thr_q;
    for (int id = 1; id <= NSRC; id++) begin
      if (ip_q[id] && ie_q[id] && prio_q[id] > best_prio) begin
        best_id   = IDW'(id);
        best_prio = prio_q[id];
      end
    end
  end

  // Bus decode.
  logic        rd, wr;
  logic [23:0] off;
  assign rd  = req_i.req && !req_i.we;
  assign wr  = req_i.req &&  req_i.we;
  assign off = req_i.addr[23:0];

  logic is_claim, is_thr;
  assign is_claim = (off == 24'h200004);
  assign is_thr   = (off == 24'h200000);

  logic [31:0]    rdata_nxt;
  int unsigned    prio_idx;
  assign prio_idx = 32'(off[11:2]);

  logic [IDW-1:0] claim_id, complete_id;
  assign claim_id    = id_q;
  assign complete_id = IDW'(req_i.wdata);

  always_comb begin
    logic [31:0] d;
    d = '0;
    if (off < 24'h001000) begin
      if (prio_idx >= 1 && prio_idx <= NSRC) d = 32'(prio_q[prio_idx]);
    end else if (off >= 24'h001000 && off < 24'h001080) begin
      for (int b = 0; b < 32; b++)
        if (32 * int'(off[6:2]) + b <= NSRC) d[b] = ip_q[32 * int'(off[6:2]) + b];
    end else if (off >= 24'h001080 && off < 24'h001100) begin
      for (int b = 0; b < 32; b++)
        if (32 * int'(off[6:2]) + b <= NSRC) d[b] = le_q[32 * int'(off[6:2]) + b];
    end else if (off >= 24'h002000 && off < 24'h002080) begin
      for (int b = 0; b < 32; b++)
        if (32 * int'(off[6:2]) + b <= NSRC) d[b] = ie_q[32 * int'(off[6:2]) + b];
    end else if (is_thr) begin
      d = 32'(thr_q);
    end else if (is_claim) begin
      d = 32'(claim_id);
    end
    rsp_o.gnt    = 1'b1;
    rsp_o.rvalid = rvalid_q;
    rsp_o.rdata  = rdata_q;
    rdata_nxt    = d;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int id = 0; id <= NSRC; id++) prio_q[id] <= '0;
      ip_q       <= '0;
      ia_q       <= '0;
      ie_q       <= '0;
      le_q       <= '0;
      irq_prev_q <= '0;
      edge_q     <= '0;
      thr_q      <= '0;
      id_q       <= '0;
      irq_q      <= 1'b0;
      rdata_q    <= '0;
      rvalid_q   <= 1'b0;
    end else begin
      rvalid_q <= req_i.req;
      if (rd) rdata_q <= rdata_nxt;

      // Gateways.
      irq_prev_q <= {irq_i, 1'b0};
      for (int id = 1; id <= NSRC; id++) begin
        logic rise, want;
        rise = irq_i[id-1] && !irq_prev_q[id];
        want = le_q[id] ? (edge_q[id] || rise) : irq_i[id-1];
        if (le_q[id] && rise) edge_q[id] <= 1'b1;
        if (want && !ip_q[id] && !ia_q[id]) begin
          ip_q[id]   <= 1'b1;
          edge_q[id] <= 1'b0;
        end
      end

      // Target notification: registered best candidate.
      id_q  <= best_id;
      irq_q <= (best_id != '0);

      // Register writes.
      if (wr) begin
        if (off < 24'h001000) begin
          if (prio_idx >= 1 && prio_idx <= NSRC)
            prio_q[prio_idx] <= req_i.wdata[PRIO_W-1:0];
        end else if (off >= 24'h001080 && off < 24'h001100) begin
          for (int b = 0; b < 32; b++)
            if (32 * int'(off[6:2]) + b <= NSRC && 32 * int'(off[6:2]) + b > 0)
              le_q[32 * int'(off[6:2]) + b] <= req_i.wdata[b];
        end else if (off >= 24'h002000 && off < 24'h002080) begin
          for (int b = 0; b < 32; b++)
            if (32 * int'(off[6:2]) + b <= NSRC && 32 * int'(off[6:2]) + b > 0)
              ie_q[32 * int'(off[6:2]) + b] <= req_i.wdata[b];
        end else if (is_thr) begin
          thr_q <= req_i.wdata[PRIO_W-1:0];
        end else if (is_claim) begin
          if (int'(complete_id) >= 1 && int'(complete_id) <= NSRC) ia_q[complete_id] <= 1'b0;
        end
      end

      // Claim: pending -> in service.
      if (rd && is_claim && claim_id != '0) begin
        ip_q[claim_id] <= 1'b0;
        ia_q[claim_id] <= 1'b1;
        id_q           <= '0;
        irq_q          <= 1'b0;
      end
    end
  end

  assign irq_o    = irq_q;
  assign irq_id_o = id_q;

  // NWORD documents the number of 32-bit words per bit-vector register.
  initial assert (NWORD <= 32) else $error("plic: too many sources for the map");
endmodule
