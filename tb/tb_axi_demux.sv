// Testbench for axi_demux: one slave port, two memories with different
// latencies (2 and 25 cycles). Write bursts go to both by address (port 1 is
// the default route); then a stream of back-to-back read bursts alternating
// between the two targets is issued while a separate process collects R
// beats. Checks data, in-order completion across targets (the demux must
// stall a switch of target while reads are outstanding), and that each memory
// saw only its own transactions.
module tb_axi_demux;
  import cpulp_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t s_req, drv;
  axi_rsp_t s_rsp;
  axi_req_t [1:0] m_req;
  axi_rsp_t [1:0] m_rsp;
  int checks = 0, failures = 0, switch_stalls = 0;
  logic use_drv = 0;

  always #5 clk = ~clk;

  axi_demux #(.NM(2), .BASE({32'h0, 32'h1000_0000}), .SIZE({32'h0, 32'h0010_0000})) dut (
    .clk_i(clk), .rst_ni(rst_n), .s_req_i(s_req), .s_rsp_o(s_rsp), .m_req_o(m_req), .m_rsp_i(m_rsp));
  axi_delay_mem #(.LATENCY(2))  i_mem0 (.clk_i(clk), .rst_ni(rst_n), .req_i(m_req[0]), .rsp_o(m_rsp[0]));
  axi_delay_mem #(.LATENCY(25)) i_mem1 (.clk_i(clk), .rst_ni(rst_n), .req_i(m_req[1]), .rsp_o(m_rsp[1]));
  axi_req_t mst_req;
  axi_tb_master i_m (.clk_i(clk), .req_o(mst_req), .rsp_i(s_rsp));
  assign s_req = use_drv ? drv : mst_req;

  always @(posedge clk) if (s_req.ar_valid && !s_rsp.ar_ready) switch_stalls++;

  axi_data_t expq [$];

  initial begin
    axi_data_t ref_mem [longint];
    axi_addr_t bases [2];
    bases[0] = 32'h1000_0000; bases[1] = 32'h2000_0000;
    drv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      for (int k = 0; k < 8; k++) begin
        axi_data_t d [$];
        axi_strb_t s [$];
        for (int b = 0; b < 4; b++) begin d.push_back({$urandom, $urandom}); s.push_back('1); end
        i_m.write(bases[t] + k * 32, 4, 3'd3, AXI_BURST_INCR, 6'd3, d, s);
        for (int b = 0; b < 4; b++) ref_mem[(bases[t] + k * 32 + b * 8) / 8] = d[b];
      end
    end
    checks++;
    if (i_mem0.n_wr_bursts != 8 || i_mem1.n_wr_bursts != 8) begin
      failures++; $display("FAIL write routing %0d %0d", i_mem0.n_wr_bursts, i_mem1.n_wr_bursts);
    end
    // pipelined reads alternating between targets
    use_drv = 1;
    fork
      begin
        for (int i = 0; i < 16; i++) begin
          int t, k;
          t = i % 2; k = (i / 2) % 8;
          @(negedge clk);
          drv.ar_valid = 1'b1;
          drv.ar = '{id: 6'd5, addr: bases[t] + k * 32, len: 8'd3, size: 3'd3, burst: AXI_BURST_INCR};
          for (int b = 0; b < 4; b++) expq.push_back(ref_mem[(bases[t] + k * 32 + b * 8) / 8]);
          #1;
          while (!s_rsp.ar_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        drv.ar_valid = 1'b0;
      end
      begin
        int got;
        got = 0;
        drv.r_ready = 1'b1;
        while (got < 64) begin
          @(negedge clk);
          #1;
          if (s_rsp.r_valid) begin
            checks++;
            if (expq.size() == 0 || s_rsp.r.data !== expq[0]) begin
              failures++; $display("FAIL read beat %0d out of order or wrong", got);
            end
            if (expq.size() > 0) void'(expq.pop_front());
            got++;
          end
        end
      end
    join
    checks++;
    if (i_mem0.n_rd_bursts != 8 || i_mem1.n_rd_bursts != 8) begin
      failures++; $display("FAIL read routing %0d %0d", i_mem0.n_rd_bursts, i_mem1.n_rd_bursts);
    end
    checks++;
    if (switch_stalls == 0) begin failures++; $display("FAIL target switch never stalled"); end
    checks++;
    if (i_m.id_errors != 0) begin failures++; $display("FAIL id errors"); end
    $display("switch_stalls=%0d", switch_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
