// Testbench for cluster_dma at its default size (128 outstanding bursts).
// The AXI side is a behavioural memory with programmable latency; the L1 side
// is one SRAM bank behind a random grant stall. Checks, against a word-by-word
// model: a 2-D gather of 72 rows of 12 bytes with a 0x190 stride (one sensor
// register block per controlled core); a long 1-D read that crosses 4 KiB
// boundaries; 2-D scatters from L1 to AXI, including that the gaps between
// rows stay untouched; random 2-D transfers in both directions queued back to
// back; STATUS counts and done pulses; with a 300-cycle memory latency the
// number of bursts in flight reaches the 128 limit and never exceeds it.
// Counted events: L1 grant stalls, command-queue-full stalls.
// Timing follows the TCDM protocol (request held until grant, response one
// cycle after grant). The stimulus is this testbench's own choice.
module tb_cluster_dma;
  import cpulp_pkg::*;
  localparam logic [31:0] L1B  = 32'h1000_0000;
  localparam int unsigned L1W  = 16384;         // 64 KiB model L1
  logic clk = 0, rst_n = 0;
  tcdm_req_t cfg_req, t_req, s_req;
  tcdm_rsp_t cfg_rsp, t_rsp, s_rsp;
  axi_req_t  m_req;
  axi_rsp_t  m_rsp;
  logic done, busy, stall;
  int checks = 0, failures = 0, dones = 0, gnt_stalls = 0, full_stalls = 0;
  int stall_pct = 0;

  always #5 clk = ~clk;
  initial begin
    #20_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  cluster_dma dut (.clk_i(clk), .rst_ni(rst_n), .cfg_req_i(cfg_req), .cfg_rsp_o(cfg_rsp),
                   .tcdm_req_o(t_req), .tcdm_rsp_i(t_rsp), .m_req_o(m_req), .m_rsp_i(m_rsp),
                   .done_o(done), .busy_o(busy));
  axi_delay_mem #(.LATENCY(20)) i_ext (.clk_i(clk), .rst_ni(rst_n), .req_i(m_req), .rsp_o(m_rsp));
  tcdm_sram #(.WORDS(L1W)) i_l1 (.clk_i(clk), .rst_ni(rst_n), .req_i(s_req), .rsp_o(s_rsp));

  // random grant stall in front of the bank
  always @(negedge clk) stall = ($urandom_range(0, 99) < stall_pct);
  always_comb begin
    s_req     = t_req;
    s_req.req = t_req.req && !stall;
    t_rsp     = s_rsp;
    t_rsp.gnt = s_rsp.gnt && !stall;
  end
  always @(posedge clk) begin
    if (done) dones++;
    if (t_req.req && !t_rsp.gnt) gnt_stalls++;
    if (cfg_req.req && !cfg_rsp.gnt) full_stalls++;
  end

  task automatic cfg(input logic we, input logic [4:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk);
    cfg_req = '{req: 1'b1, addr: 32'h1020_1800 + a, we: we, be: 4'hF, wdata: d};
    #1;
    while (!cfg_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    cfg_req.req = 1'b0;
    #1;
    q = cfg_rsp.rdata;
    if (!cfg_rsp.rvalid) begin failures++; $display("FAIL cfg rvalid"); end
  endtask

  task automatic issue(input logic [31:0] ext, l1, len, stride, reps, input logic dir);
    logic [31:0] q;
    cfg(1, 5'h00, ext, q); cfg(1, 5'h04, l1, q); cfg(1, 5'h08, len, q);
    cfg(1, 5'h0C, stride, q); cfg(1, 5'h10, reps, q); cfg(1, 5'h14, {31'd0, dir}, q);
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [31:0] l1_rd(logic [31:0] a);
    return i_l1.mem[(a - L1B) >> 2];
  endfunction

  // compare a finished transfer word by word
  task automatic check(input logic [31:0] ext, l1, len, stride, reps, input string what);
    int bad = 0;
    for (int r = 0; r < int'(reps); r++)
      for (int w = 0; w < int'(len / 4); w++) begin
        logic [31:0] ea, la;
        ea = ext + r * stride + w * 4;
        la = l1 + (r * (len / 4) + w) * 4;
        checks++;
        if (i_ext.peek32(ea) !== l1_rd(la)) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s r%0d w%0d ext %h=%h l1 %h=%h", what, r, w,
                                ea, i_ext.peek32(ea), la, l1_rd(la));
        end
      end
  endtask

  initial begin
    logic [31:0] q;
    int d0;
    cfg_req = '0;
    for (int k = 0; k < int'(L1W); k++) i_l1.mem[k] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // register read-back
    cfg(1, 5'h00, 32'h2000_0000, q); cfg(0, 5'h00, 0, q);
    checks++; if (q !== 32'h2000_0000) begin failures++; $display("FAIL readback %h", q); end
    cfg(1, 5'h10, 0, q); cfg(0, 5'h10, 0, q);
    checks++; if (q !== 32'd1) begin failures++; $display("FAIL reps 0 -> %0d", q); end

    // 2-D gather: 72 cores x 12 bytes, stride 0x190
    stall_pct = 20;
    issue(32'h2000_0000, L1B + 32'h100, 12, 32'h190, 72, 0);
    wait_idle();
    check(32'h2000_0000, L1B + 32'h100, 12, 32'h190, 72, "gather");

    // 1-D read over 4 KiB boundaries
    issue(32'h2000_0F00, L1B + 32'h2000, 4000, 0, 1, 0);
    wait_idle();
    check(32'h2000_0F00, L1B + 32'h2000, 4000, 0, 1, "1d");
    checks++;
    if (i_ext.n_rd_bursts != 72 + 5) begin   // 64+256+256+256+168 words
      failures++; $display("FAIL bursts %0d", i_ext.n_rd_bursts);
    end

    // 2-D scatter L1 -> AXI, gaps untouched
    issue(32'h3000_0000, L1B + 32'h4000, 32, 32'h40, 10, 1);
    wait_idle();
    check(32'h3000_0000, L1B + 32'h4000, 32, 32'h40, 10, "scatter");
    for (int r = 0; r < 10; r++) begin
      logic [31:0] ga;
      ga = 32'h3000_0000 + r * 32'h40 + 32;
      checks++;
      if (i_ext.mem.exists(ga[31:3])) begin failures++; $display("FAIL gap written %h", ga); end
    end

    // random transfers queued back to back
    d0 = dones;
    cfg(0, 5'h18, 0, q);
    for (int i = 0; i < 12; i++) begin
      logic [31:0] ext, l1, len, stride, reps;
      logic dir;
      dir    = 1'($urandom);
      len    = $urandom_range(1, 40) * 4;
      reps   = $urandom_range(1, 12);
      stride = len + $urandom_range(0, 16) * 4;
      ext    = (dir ? 32'h4000_0000 : 32'h2100_0000) + i * 32'h2000 + $urandom_range(0, 1000) * 4;
      l1     = L1B + 32'h6000 + i * 32'h800;   // regions are disjoint
      issue(ext, l1, len, stride, reps, dir);
      xfers[i] = '{ext, l1, len, stride, reps};
    end
    wait_idle();
    for (int i = 0; i < 12; i++)
      check(xfers[i].ext, xfers[i].l1, xfers[i].len, xfers[i].stride, xfers[i].reps, "random");
    checks++;
    if (dones - d0 != 12) begin failures++; $display("FAIL done pulses %0d", dones - d0); end
    begin
      logic [31:0] q2;
      cfg(0, 5'h18, 0, q2);
      checks++;
      if (q2[31:16] - q[31:16] != 12 || q2[15:0] - q[15:0] != 12) begin
        failures++; $display("FAIL status %h -> %h", q, q2);
      end
    end

    // outstanding limit under long latency: 200 single-word rows
    stall_pct = 0;
    i_ext.lat = 300;
    issue(32'h2200_0000, L1B + 32'h1000, 4, 8, 200, 0);
    wait_idle();
    check(32'h2200_0000, L1B + 32'h1000, 4, 8, 200, "outstanding");
    checks++;
    if (i_ext.max_rd_outst != 128) begin
      failures++; $display("FAIL max outstanding %0d", i_ext.max_rd_outst);
    end

    $display("dma: stalls %0d queue-full %0d max_outst %0d dones %0d",
             gnt_stalls, full_stalls, i_ext.max_rd_outst, dones);
    checks++;
    if (gnt_stalls == 0 || full_stalls == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] ext, l1, len, stride, reps; } xfer_t;
  xfer_t xfers [12];
endmodule
