// Testbench for tcdm_xbar: four masters hammer four word-interleaved banks at
// random. Each master owns its own rows, so it can check every read against
// its own reference copy. Checks: read data, response exactly one cycle after
// the grant, round-robin bound (a master never waits more than NM-1 cycles
// for a bank that grants every cycle), and that conflicts actually occurred.
module tb_tcdm_xbar;
  import cpulp_pkg::*;
  localparam int unsigned NM = 4, NS = 4, ROWS = 64;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [NM-1:0] m_req;
  tcdm_rsp_t [NM-1:0] m_rsp;
  tcdm_req_t [NS-1:0] s_req;
  tcdm_rsp_t [NS-1:0] s_rsp;
  int checks = 0, failures = 0, conflicts = 0, max_wait = 0;

  always #5 clk = ~clk;

  tcdm_xbar #(.NM(NM), .NS(NS), .SEL_LSB(2)) dut (
    .clk_i(clk), .rst_ni(rst_n), .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp));
  for (genvar s = 0; s < NS; s++) begin : g_b
    tcdm_sram #(.WORDS(ROWS), .ADDR_LSB(4)) i_b (.clk_i(clk), .rst_ni(rst_n), .req_i(s_req[s]), .rsp_o(s_rsp[s]));
  end

  task automatic run_master(input int m);
    logic [31:0] ref_mem [int];
    for (int i = 0; i < 400; i++) begin
      int unsigned w, wait_c;
      logic we;
      w  = (m * (ROWS / NM) + $urandom_range(0, ROWS / NM - 1)) * NS + $urandom_range(0, NS - 1);
      we = !ref_mem.exists(w) || ($urandom_range(0, 2) == 0);
      @(negedge clk);
      m_req[m] = '{req: 1'b1, addr: 32'(w) << 2, we: we, be: 4'hF, wdata: $urandom};
      wait_c = 0;
      #1;
      while (!m_rsp[m].gnt) begin
        wait_c++;
        @(negedge clk); #1;
      end
      if (wait_c > 0) conflicts++;
      if (wait_c > max_wait) max_wait = wait_c;
      if (we) ref_mem[w] = m_req[m].wdata;
      @(negedge clk);
      m_req[m].req = 1'b0;
      #1;
      checks++;
      if (!m_rsp[m].rvalid) begin failures++; $display("FAIL m%0d no rvalid", m); end
      else if (!we) begin
        checks++;
        if (m_rsp[m].rdata !== ref_mem[w]) begin
          failures++; $display("FAIL m%0d word %0d got %h exp %h", m, w, m_rsp[m].rdata, ref_mem[w]);
        end
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    m_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run_master(0);
      run_master(1);
      run_master(2);
      run_master(3);
    join
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no bank conflict happened"); end
    checks++;
    if (max_wait > NM - 1) begin failures++; $display("FAIL waited %0d cycles", max_wait); end
    $display("conflicts=%0d max_wait=%0d", conflicts, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
