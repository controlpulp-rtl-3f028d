// Timer for the SoC domain and for the cluster.
//
// A 32-bit counter that advances once every PRESC+1 cycles while enabled.
// When it reaches CMP it raises irq_o for one cycle (if enabled) and, in
// continuous mode, restarts from zero, giving periodic ticks such as the
// control tasks' periods; software also reads CNT to time code sections.
// Registers (TCDM slave, one-cycle response):
//   0x00 CFG  bit0 enable, bit1 irq enable, bit2 continuous,
//             bit3 reset counter (self-clearing), bits 15:8 prescaler
//   0x04 CNT  counter value (writable)
//   0x08 CMP  compare value
// The document only names the timers; the register set is this design's
// choice.
module timer_unit
  import cpulp_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o,
  output logic      irq_o
);
  typedef struct packed {
    logic [7:0] presc;
    logic       cont;
    logic       irq_en;
    logic       en;
  } cfg_t;

  cfg_t        cfg_q;
  logic [31:0] cnt_q, cmp_q;
  logic [7:0]  pre_q;
  logic        irq_q;
  logic [31:0] rdata_q;
  logic        rvalid_q;
  logic [3:0]  reg_idx;

  assign reg_idx = req_i.addr[5:2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cfg_q    <= '0;
      cnt_q    <= '0;
      cmp_q    <= '1;
      pre_q    <= '0;
      irq_q    <= 1'b0;
      rdata_q  <= '0;
      rvalid_q <= 1'b0;
    end else begin
      irq_q    <= 1'b0;
      rvalid_q <= req_i.req;
      // Counting.
      if (cfg_q.en) begin
        if (pre_q == cfg_q.presc) begin
          pre_q <= '0;
          if (cnt_q == cmp_q) begin
            irq_q <= cfg_q.irq_en;
            cnt_q <= cfg_q.cont ? '0 : cnt_q + 1;
          end else begin
            cnt_q <= cnt_q + 1;
          end
        end else begin
          pre_q <= pre_q + 1;
        end
      end
      // Register access (a write takes priority over counting).
      if (req_i.req && req_i.we) begin
        unique case (reg_idx)
          4'd0: begin
            cfg_q <= '{presc: req_i.wdata[15:8], cont: req_i.wdata[2],
                       irq_en: req_i.wdata[1], en: req_i.wdata[0]};
            if (req_i.wdata[3]) begin
              cnt_q <= '0;
              pre_q <= '0;
            end
          end
          4'd1: cnt_q <= req_i.wdata;
          4'd2: cmp_q <= req_i.wdata;
          default: ;
        endcase
      end else if (req_i.req) begin
        unique case (reg_idx)
          4'd0:    rdata_q <= {16'd0, cfg_q.presc, 5'd0, cfg_q.cont, cfg_q.irq_en, cfg_q.en};
          4'd1:    rdata_q <= cnt_q;
          4'd2:    rdata_q <= cmp_q;
          default: rdata_q <= '0;
        endcase
      end
    end
  end

  assign rsp_o.gnt    = 1'b1;
  assign rsp_o.rvalid = rvalid_q;
  assign rsp_o.rdata  = rdata_q;
  assign irq_o        = irq_q;
endmodule
