// End-to-end testbench for the controlpulp platform at its default size
// (8 worker cores, 144 interrupt lines, 512 KiB L2, 128 KiB L1).
//
// The Manager Core and the eight worker cores are replaced by behavioural
// bus masters that follow the TCDM protocol (request held until grant,
// response one cycle after grant); a behavioural AXI memory with a 20-cycle
// latency stands for the controlled processor behind the AXI master port and
// a behavioural AXI master drives the AXI slave port. The SoC clock has a
// 10 ns period and the cluster clock 12 ns, so every SoC-cluster transfer
// really crosses between unrelated clocks. One control step is
// walked through:
//   1. firmware is loaded into L2 over the AXI slave port and fetched back
//      through the Manager Core's instruction port; an AXI access to the
//      private L2 banks is refused;
//   2. a mailbox doorbell raises a PLIC interrupt (input to output in 2
//      cycles), which is claimed and completed; the SoC timer fires;
//   3. the Manager Core writes parameters into the cluster L1 over AXI;
//   4. worker core 0 programs the DMA to gather 72 x 12 bytes of sensor
//      registers (0x190 apart) while the other cores sleep on the event
//      unit; the DMA-done event wakes them, meanwhile the Manager Core and
//      core 0 use the external AXI port at the same time as the DMA;
//   5. the cores read the gathered data in parallel (L1 bank conflicts),
//      meet at the hardware barrier, write results to L2 through the
//      cluster AXI bridge, wake each other by software event and are woken
//      by the cluster timer.
// Each named mechanism is counted and must happen at least once.
module tb_controlpulp;
  import cpulp_pkg::*;
  localparam int unsigned NC   = 8;
  localparam int unsigned NIRQ = 144;
  localparam logic [31:0] EU   = CL_PERIPH_BASE + CL_EU_OFF;
  localparam logic [31:0] CTIM = CL_PERIPH_BASE + CL_TIMER_OFF;
  localparam logic [31:0] DMA  = CL_PERIPH_BASE + CL_DMA_OFF;
  localparam logic [31:0] PVT  = 32'h2000_0000;   // sensor registers, external
  localparam logic [31:0] MBOX = 32'h3000_0000;   // mailboxes, external
  localparam logic [31:0] SH   = L2_BASE + 32'h1_0000;   // first shared L2 byte

  logic clk = 0, clk_cl = 0, rst_n = 0;
  tcdm_req_t mi_req, md_req;
  tcdm_rsp_t mi_rsp, md_rsp;
  logic irq_ext, irq_timer;
  logic [$clog2(NIRQ+1)-1:0] irq_id;
  logic [NIRQ-1:0] irq;
  tcdm_req_t [NC-1:0] c_req;
  tcdm_rsp_t [NC-1:0] c_rsp;
  logic [NC-1:0] sleep;
  logic dma_busy;
  axi_req_t slv_req, mst_req;
  axi_rsp_t slv_rsp, mst_rsp;

  int checks = 0, failures = 0;
  longint cyc = 0, ccyc = 0;   // SoC and cluster cycles
  // mechanism counters
  int n_fw_load = 0, n_priv_refused = 0, n_plic_irq = 0, n_soc_timer = 0, n_mgr_to_l1 = 0;
  int n_dma_done = 0, n_wakeup = 0, n_sleep_cycles = 0, n_l1_conflict = 0, n_barrier = 0;
  int n_core_to_l2 = 0, n_ext_contention = 0, n_cl_contention = 0, n_cl_timer = 0;
  int n_sw_event = 0;

  always #5 clk = ~clk;
  always #6 clk_cl = ~clk_cl;
  initial begin
    #300_000;                      // 30000 cycles; one control step takes about 1100
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  controlpulp dut (
    .clk_i(clk), .clk_cl_i(clk_cl), .rst_ni(rst_n),
    .mgr_instr_req_i(mi_req), .mgr_instr_rsp_o(mi_rsp),
    .mgr_data_req_i(md_req), .mgr_data_rsp_o(md_rsp),
    .mgr_irq_ext_o(irq_ext), .mgr_irq_id_o(irq_id), .mgr_irq_timer_o(irq_timer),
    .irq_i(irq),
    .cl_data_req_i(c_req), .cl_data_rsp_o(c_rsp),
    .cl_core_sleep_o(sleep), .cl_dma_busy_o(dma_busy),
    .axi_slv_req_i(slv_req), .axi_slv_rsp_o(slv_rsp),
    .axi_mst_req_o(mst_req), .axi_mst_rsp_i(mst_rsp)
  );
  axi_delay_mem #(.LATENCY(20)) i_ext (.clk_i(clk), .rst_ni(rst_n), .req_i(mst_req), .rsp_o(mst_rsp));
  axi_tb_master i_ld (.clk_i(clk), .req_o(slv_req), .rsp_i(slv_rsp));

  function automatic logic in_l1(logic [31:0] a);
    return a >= L1_BASE && a < L1_BASE + L1_SIZE;
  endfunction

  always @(posedge clk_cl) begin
    ccyc++;
    if (dut.dma_done) n_dma_done++;
    n_sleep_cycles += $countones(sleep);
    for (int c = 0; c < int'(NC); c++)
      if (c_req[c].req && in_l1(c_req[c].addr) && !c_rsp[c].gnt) n_l1_conflict++;
    if ((dut.cl_bus_req[0].ar_valid || dut.cl_bus_req[0].aw_valid) &&
        (dut.cl_bus_req[1].ar_valid || dut.cl_bus_req[1].aw_valid)) n_cl_contention++;
  end

  always @(posedge clk) begin
    cyc++;
    if ((dut.ext_req[0].ar_valid || dut.ext_req[0].aw_valid) &&
        (dut.ext_req[1].ar_valid || dut.ext_req[1].aw_valid)) n_ext_contention++;
  end

  function automatic void expect32(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endfunction

  // ---- bus masters ----
  task automatic mgr_data(input logic we, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] q);
    @(negedge clk);
    md_req = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d};
    #1;
    while (!md_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    md_req.req = 1'b0;
    #1;
    if (!md_rsp.rvalid) begin failures++; $display("FAIL manager rvalid"); end
    q = md_rsp.rdata;
  endtask

  task automatic mgr_instr(input logic [31:0] a, output logic [31:0] q);
    @(negedge clk);
    mi_req = '{req: 1'b1, addr: a, we: 1'b0, be: 4'hF, wdata: '0};
    #1;
    while (!mi_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    mi_req.req = 1'b0;
    #1;
    if (!mi_rsp.rvalid) begin failures++; $display("FAIL instr rvalid"); end
    q = mi_rsp.rdata;
  endtask

  // waits = cycles between request and grant
  task automatic core(input int c, input logic we, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] q, output int waits);
    @(negedge clk_cl);
    c_req[c] = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d};
    waits = 0;
    #1;
    while (!c_rsp[c].gnt) begin @(negedge clk_cl); waits++; #1; end
    @(negedge clk_cl);
    c_req[c].req = 1'b0;
    #1;
    if (!c_rsp[c].rvalid) begin failures++; $display("FAIL core %0d rvalid", c); end
    q = c_rsp[c].rdata;
  endtask

  logic [31:0] pvt_val [72][3];
  longint      bar_gnt [NC];

  initial begin
    logic [31:0] q;
    int w;
    mi_req = '0; md_req = '0; c_req = '0; irq = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---------- 1. firmware load over the AXI slave port ----------
    begin
      axi_data_t img [$], rd [$];
      axi_strb_t st [$];
      for (int b = 0; b < 32; b++) begin img.push_back({$urandom, $urandom}); st.push_back('1); end
      i_ld.write(SH, 32, 3'd3, AXI_BURST_INCR, 6'd1, img, st);
      for (int k = 0; k < 64; k++) begin
        mgr_instr(SH + 4 * k, q);
        expect32(q, k[0] ? img[k / 2][63:32] : img[k / 2][31:0], "instruction fetch of loaded image");
      end
      n_fw_load++;
      // the private banks refuse the AXI slave port
      mgr_data(1, L2_BASE + 32'h100, 32'hC0DE_0001, q);
      i_ld.read(L2_BASE + 32'h100, 1, 3'd2, AXI_BURST_INCR, 6'd2, rd);
      expect32(rd[0][31:0], TCDM_ERR_DATA, "AXI read of private L2");
      if (rd[0][31:0] === TCDM_ERR_DATA) n_priv_refused++;
      mgr_data(0, L2_BASE + 32'h100, 0, q);
      expect32(q, 32'hC0DE_0001, "manager private L2");
      checks++;
      if (i_ld.id_errors != 0) begin failures++; $display("FAIL AXI slave id/last"); end
    end

    // ---------- 2. PLIC doorbell and SoC timer ----------
    begin
      longint t0;
      int id;
      id = 1 + $urandom_range(0, NIRQ - 1);
      mgr_data(1, PLIC_BASE + 4 * id, 3, q);
      mgr_data(1, PLIC_BASE + 32'h2000 + 4 * (id / 32), 1 << (id % 32), q);
      mgr_data(1, PLIC_BASE + 32'h20_0000, 0, q);
      @(negedge clk);
      irq[id - 1] = 1'b1;
      t0 = cyc;
      while (!irq_ext) @(posedge clk);
      checks++;
      if (cyc - t0 != 2) begin failures++; $display("FAIL PLIC latency %0d", cyc - t0); end
      expect32(32'(irq_id), id, "PLIC id");
      mgr_data(0, PLIC_BASE + 32'h20_0004, 0, q);
      expect32(q, id, "PLIC claim");
      irq[id - 1] = 1'b0;
      repeat (3) @(posedge clk);
      checks++;
      if (irq_ext) begin failures++; $display("FAIL PLIC irq after claim"); end
      mgr_data(1, PLIC_BASE + 32'h20_0004, id, q);
      n_plic_irq++;

      mgr_data(1, SOC_TIMER_BASE + 8, 40, q);
      mgr_data(1, SOC_TIMER_BASE + 0, 32'hB, q);   // reset, enable, irq enable
      t0 = cyc;
      while (!irq_timer && cyc - t0 < 500) @(posedge clk);
      checks++;
      if (!irq_timer) begin failures++; $display("FAIL SoC timer"); end
      else n_soc_timer++;
      mgr_data(1, SOC_TIMER_BASE + 0, 32'h0, q);
    end

    // ---------- 3. Manager Core -> cluster L1 over AXI ----------
    begin
      logic [31:0] v [16];
      for (int k = 0; k < 16; k++) begin
        v[k] = $urandom;
        mgr_data(1, L1_BASE + 32'h4000 + 4 * k, v[k], q);
      end
      for (int k = 0; k < 16; k++) begin
        core(3, 0, L1_BASE + 32'h4000 + 4 * k, 0, q, w);
        expect32(q, v[k], "core reads manager data in L1");
      end
      mgr_data(0, L1_BASE + 32'h4000, 0, q);
      expect32(q, v[0], "manager reads L1");
      n_mgr_to_l1++;
    end

    // ---------- 4. DMA gather of sensor registers ----------
    for (int p = 0; p < 72; p++)
      for (int r = 0; r < 3; r++) begin
        pvt_val[p][r] = $urandom;
        i_ext.poke32(PVT + p * 32'h190 + r * 4, pvt_val[p][r]);
      end
    fork
      // workers 1..7 sleep until the DMA is done
      for (int c = 1; c < int'(NC); c++) begin
        fork
          automatic int cc = c;
          begin
            logic [31:0] r;
            int ww;
            core(cc, 1, EU + 32'h00, 32'h100, r, ww);     // mask: DMA done
            core(cc, 0, EU + 32'h08, 0, r, ww);           // wait
            expect32(r & 32'h100, 32'h100, "wake-up cause");
            n_wakeup++;
          end
        join_none
      end
      // core 0 programs the DMA, then talks to the mailboxes while it runs
      begin
        logic [31:0] r;
        int ww;
        repeat (20) @(negedge clk);
        core(0, 1, EU + 32'h00, 32'h100, r, ww);
        core(0, 1, DMA + 32'h00, PVT, r, ww);
        core(0, 1, DMA + 32'h04, L1_BASE + 32'h8000, r, ww);
        core(0, 1, DMA + 32'h08, 12, r, ww);
        core(0, 1, DMA + 32'h0C, 32'h190, r, ww);
        core(0, 1, DMA + 32'h10, 72, r, ww);
        core(0, 1, DMA + 32'h14, 0, r, ww);
        for (int k = 0; k < 4; k++) begin
          core(0, 1, MBOX + 32'h1000 + 4 * k, 32'hA000 + k, r, ww);
          core(0, 0, MBOX + 32'h1000 + 4 * k, 0, r, ww);
          expect32(r, 32'hA000 + k, "core mailbox access");
        end
        core(0, 0, EU + 32'h08, 0, r, ww);
        n_wakeup++;
      end
      // the Manager Core polls the mailboxes while the DMA runs
      begin
        logic [31:0] r;
        wait (dma_busy);
        for (int k = 0; k < 8 || (dma_busy && k < 1000); k++) begin
          mgr_data(0, MBOX + 4 * (k % 8), 0, r);
          expect32(r, i_ext.peek32(MBOX + 4 * (k % 8)), "manager mailbox read");
        end
      end
    join
    wait fork;
    checks++;
    if (dma_busy) begin failures++; $display("FAIL DMA still busy"); end

    // ---------- 5a. parallel read of the gathered data ----------
    for (int c = 0; c < int'(NC); c++) begin
      fork
        automatic int cc = c;
        begin
          logic [31:0] r;
          int ww;
          for (int k = cc; k < 216; k += NC) begin
            core(cc, 0, L1_BASE + 32'h8000 + 4 * k, 0, r, ww);
            expect32(r, pvt_val[k / 3][k % 3], "gathered sensor value");
          end
        end
      join_none
    end
    wait fork;
    // all cores on one bank
    for (int c = 0; c < int'(NC); c++) begin
      fork
        automatic int cc = c;
        begin
          logic [31:0] r;
          int ww;
          core(cc, 1, L1_BASE + 32'h1_0000 + 64 * cc, 32'h5500 + cc, r, ww);
          core(cc, 0, L1_BASE + 32'h1_0000 + 64 * cc, 0, r, ww);
          expect32(r, 32'h5500 + cc, "same-bank access");
        end
      join_none
    end
    wait fork;
    // single-cycle L1 access without conflict
    begin
      logic [31:0] r;
      int ww;
      core(5, 0, L1_BASE + 32'h1_0000 + 64 * 5, 0, r, ww);
      checks++;
      if (ww != 0) begin failures++; $display("FAIL L1 grant wait %0d", ww); end
    end

    // ---------- 5b. hardware barrier ----------
    for (int c = 0; c < int'(NC); c++) begin
      logic [31:0] r;
      int ww;
      core(c, 1, EU + 32'h0C, 32'hFF, r, ww);
    end
    for (int round = 0; round < 3; round++) begin
      for (int c = 0; c < int'(NC); c++) begin
        fork
          automatic int cc = c;
          begin
            logic [31:0] r;
            int ww;
            repeat ($urandom_range(0, 40)) @(negedge clk);
            core(cc, 0, EU + 32'h10, 0, r, ww);
            bar_gnt[cc] = ccyc;
          end
        join_none
      end
      wait fork;
      checks++;
      for (int c = 1; c < int'(NC); c++)
        if (bar_gnt[c] != bar_gnt[0]) begin
          failures++; $display("FAIL barrier release core %0d at %0d vs %0d", c, bar_gnt[c], bar_gnt[0]);
          break;
        end
      n_barrier++;
    end

    // ---------- 5c. results to L2 through the cluster AXI bridge ----------
    begin
      logic [31:0] r;
      int ww;
      for (int c = 0; c < int'(NC); c++) begin
        fork
          automatic int cc = c;
          begin
            logic [31:0] rr;
            int w2;
            core(cc, 1, SH + 32'h2000 + 4 * cc, 32'hBEEF_0000 + cc, rr, w2);
          end
        join_none
      end
      wait fork;
      for (int c = 0; c < int'(NC); c++) begin
        mgr_data(0, SH + 32'h2000 + 4 * c, 0, r);
        expect32(r, 32'hBEEF_0000 + c, "core result in L2");
      end
      core(6, 0, SH + 32'h2000 + 4 * 6, 0, r, ww);
      expect32(r, 32'hBEEF_0006, "core reads back L2");
      n_core_to_l2++;
      core(6, 0, L2_BASE + 32'h100, 0, r, ww);
      expect32(r, TCDM_ERR_DATA, "cluster read of private L2");
      if (r === TCDM_ERR_DATA) n_priv_refused++;
    end

    // ---------- 5d. software event and cluster timer ----------
    fork
      begin
        logic [31:0] r;
        int ww;
        core(4, 1, EU + 32'h00, 32'h1, r, ww);
        core(4, 0, EU + 32'h08, 0, r, ww);
        expect32(r, 32'h1, "software event");
        n_sw_event++;
      end
      begin
        logic [31:0] r;
        int ww;
        repeat (15) @(negedge clk);
        core(1, 1, EU + 32'h14, 32'h10, r, ww);
      end
      begin
        logic [31:0] r;
        int ww;
        longint t0;
        core(2, 1, EU + 32'h00, 32'h200, r, ww);
        core(2, 1, CTIM + 8, 25, r, ww);
        core(2, 1, CTIM + 0, 32'hB, r, ww);
        t0 = ccyc;
        core(2, 0, EU + 32'h08, 0, r, ww);
        expect32(r, 32'h200, "cluster timer event");
        checks++;
        if (ccyc - t0 > 40) begin failures++; $display("FAIL cluster timer late %0d", ccyc - t0); end
        n_cl_timer++;
        core(2, 1, CTIM + 0, 32'h0, r, ww);
      end
    join

    $display("mechanisms: fw_load %0d priv_refused %0d plic_irq %0d soc_timer %0d mgr_to_l1 %0d",
             n_fw_load, n_priv_refused, n_plic_irq, n_soc_timer, n_mgr_to_l1);
    $display("  dma_done %0d wakeups %0d sleep_cycles %0d l1_conflicts %0d barriers %0d",
             n_dma_done, n_wakeup, n_sleep_cycles, n_l1_conflict, n_barrier);
    $display("  core_to_l2 %0d ext_contention %0d cl_contention %0d cl_timer %0d sw_event %0d",
             n_core_to_l2, n_ext_contention, n_cl_contention, n_cl_timer, n_sw_event);
    $display("  ext bursts rd %0d wr %0d, %0d SoC cycles, %0d cluster cycles",
             i_ext.n_rd_bursts, i_ext.n_wr_bursts, cyc, ccyc);
    begin
      int m [15];
      m = '{n_fw_load, n_priv_refused, n_plic_irq, n_soc_timer, n_mgr_to_l1, n_dma_done, n_wakeup,
            n_sleep_cycles, n_l1_conflict, n_barrier, n_core_to_l2, n_ext_contention,
            n_cl_contention, n_cl_timer, n_sw_event};
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
