// Cluster event unit: event buffers, wait-for-event and a hardware barrier.
//
// Each worker core has its own register port. Events land in a per-core
// 32-bit buffer: bit 0 is the software event, bit 8+j is hardware event j
// (DMA completion, cluster timer, ...), broadcast to all cores. A core reads
// EVT_WAIT to sleep until an event it has unmasked is in its buffer: the
// read is not granted until then, core_sleep_o is high meanwhile so the
// core's clock can be gated, and the read returns the masked events and
// clears them. A core reads BARRIER to arrive at the hardware barrier; the
// read is held until every core in BARRIER_MASK has arrived, then all of
// them are granted in the same cycle and the barrier re-arms. This is the
// barrier the fork-join control-law code uses before each reduction sum.
// Per-core register map (byte offsets):
//   0x00 EVT_MASK     rw   0x04 EVT_BUFFER r, write-1-to-clear
//   0x08 EVT_WAIT     r    0x0C BARRIER_MASK rw (shared by all cores)
//   0x10 BARRIER      r    0x14 SW_EVENT  w, wdata = mask of target cores
// Responses come one cycle after the grant. The document states that a
// hardware barrier synchronises the workers; the register map, the event
// numbering and the sleep mechanism are this design's choice.
module event_unit
  import cpulp_pkg::*;
#(
  parameter int unsigned NCORES = 8,
  parameter int unsigned NHW    = 2
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  tcdm_req_t [NCORES-1:0] req_i,
  output tcdm_rsp_t [NCORES-1:0] rsp_o,
  input  logic [NHW-1:0]         hw_evt_i,
  output logic [NCORES-1:0]      core_sleep_o,
  output logic                   barrier_release_o
);
  typedef enum logic [2:0] {
    R_MASK = 3'd0, R_BUF = 3'd1, R_WAIT = 3'd2,
    R_BMASK = 3'd3, R_BAR = 3'd4, R_SW = 3'd5
  } reg_e;

  logic [NCORES-1:0][31:0] mask_q, buf_q;
  logic [NCORES-1:0]       bmask_q, arrived_q;
  logic [NCORES-1:0][31:0] rdata_q;
  logic [NCORES-1:0]       rvalid_q;

  reg_e [NCORES-1:0]       ridx;
  logic [NCORES-1:0]       bar_req, wait_req, gnt;
  logic                    release_bar;
  logic [31:0]             hw_set;
  logic [NCORES-1:0]       sw_set;

  always_comb begin
    hw_set = '0;
    for (int j = 0; j < NHW; j++) hw_set[8+j] = hw_evt_i[j];
    sw_set = '0;
    for (int c = 0; c < NCORES; c++) begin
      ridx[c]     = reg_e'(req_i[c].addr[4:2]);
      bar_req[c]  = req_i[c].req && !req_i[c].we && ridx[c] == R_BAR;
      wait_req[c] = req_i[c].req && !req_i[c].we && ridx[c] == R_WAIT;
      if (req_i[c].req && req_i[c].we && ridx[c] == R_SW)
        sw_set |= req_i[c].wdata[NCORES-1:0];
    end
    release_bar = (bmask_q != '0) && (((arrived_q | bar_req) & bmask_q) == bmask_q);
    for (int c = 0; c < NCORES; c++) begin
      if (bar_req[c])       gnt[c] = release_bar;
      else if (wait_req[c]) gnt[c] = (buf_q[c] & mask_q[c]) != '0;
      else                  gnt[c] = req_i[c].req;
      rsp_o[c].gnt    = gnt[c];
      rsp_o[c].rvalid = rvalid_q[c];
      rsp_o[c].rdata  = rdata_q[c];
      core_sleep_o[c] = (bar_req[c] || wait_req[c]) && !gnt[c];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mask_q    <= '0;
      buf_q     <= '0;
      bmask_q   <= '0;
      arrived_q <= '0;
      rdata_q   <= '0;
      rvalid_q  <= '0;
    end else begin
      arrived_q <= release_bar ? '0 : (arrived_q | bar_req);
      for (int c = 0; c < NCORES; c++) begin
        logic [31:0] clr;
        clr         = '0;
        rvalid_q[c] <= req_i[c].req && gnt[c];
        if (req_i[c].req && gnt[c]) begin
          if (req_i[c].we) begin
            unique case (ridx[c])
              R_MASK:  mask_q[c] <= req_i[c].wdata;
              R_BUF:   clr = req_i[c].wdata;
              R_BMASK: bmask_q   <= req_i[c].wdata[NCORES-1:0];
              default: ;
            endcase
          end else begin
            unique case (ridx[c])
              R_MASK:  rdata_q[c] <= mask_q[c];
              R_BUF:   rdata_q[c] <= buf_q[c];
              R_WAIT: begin
                rdata_q[c] <= buf_q[c] & mask_q[c];
                clr         = buf_q[c] & mask_q[c];
              end
              R_BMASK: rdata_q[c] <= 32'(bmask_q);
              R_BAR:   rdata_q[c] <= 32'(bmask_q);
              default: rdata_q[c] <= '0;
            endcase
          end
        end
        buf_q[c] <= (buf_q[c] & ~clr) | hw_set | {31'd0, sw_set[c]};
      end
    end
  end

  assign barrier_release_o = release_bar;
endmodule
