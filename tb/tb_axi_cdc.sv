// Testbench for axi_cdc: an AXI master on a 100 MHz clock writes and reads
// random bursts through the crossing into a latency memory on an unrelated
// 71 MHz clock (period 14 ns against 10 ns, so the edges drift through every
// phase). Checks every read beat against a reference copy, the memory
// contents after the writes, the IDs and RLAST seen by the master, that the
// memory saw every burst, and that a beat needs at least two receiving-clock
// cycles to cross (the synchroniser depth). The stimulus is this
// testbench's own choice.
module tb_axi_cdc;
  import cpulp_pkg::*;
  logic clk_s = 0, clk_d = 0, rst_n = 0;
  axi_req_t s_req, m_req;
  axi_rsp_t s_rsp, m_rsp;
  int checks = 0, failures = 0;
  logic [63:0] ref_m [int];

  always #5 clk_s = ~clk_s;
  always #7 clk_d = ~clk_d;
  initial begin
    #2_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  axi_cdc dut (.src_clk_i(clk_s), .src_rst_ni(rst_n), .s_req_i(s_req), .s_rsp_o(s_rsp),
               .dst_clk_i(clk_d), .dst_rst_ni(rst_n), .m_req_o(m_req), .m_rsp_i(m_rsp));
  axi_delay_mem #(.LATENCY(3)) i_mem (.clk_i(clk_d), .rst_ni(rst_n), .req_i(m_req), .rsp_o(m_rsp));
  axi_tb_master i_m (.clk_i(clk_s), .req_o(s_req), .rsp_i(s_rsp));

  // crossing time of an AR: from the source handshake to valid on the far side
  // (reads are issued one at a time, so one pending flag is enough)
  realtime t_ar;
  real     min_cross = 1e9;
  logic    ar_pend = 1'b0;
  always @(posedge clk_s) if (rst_n && s_req.ar_valid && s_rsp.ar_ready) begin
    t_ar = $realtime; ar_pend = 1'b1;
  end
  always @(posedge clk_d) if (rst_n && ar_pend && m_req.ar_valid) begin
    if (($realtime - t_ar) < min_cross) min_cross = $realtime - t_ar;
    ar_pend = 1'b0;
  end

  initial begin
    int nw;
    nw = 0;
    repeat (4) @(posedge clk_d);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      axi_data_t d [$], q [$];
      axi_strb_t s [$];
      int unsigned beats, base;
      d.delete(); q.delete(); s.delete();
      beats = $urandom_range(1, 16);
      base  = 32'h4000_0000 + i * 256;
      for (int b = 0; b < int'(beats); b++) begin
        d.push_back({$urandom, $urandom}); s.push_back('1);
        ref_m[int'(base / 8) + b] = d[b];
      end
      i_m.write(base, beats, 3'd3, AXI_BURST_INCR, 6'(i % 64), d, s);
      nw++;
      i_m.read(base, beats, 3'd3, AXI_BURST_INCR, 6'((i + 7) % 64), q);
      for (int b = 0; b < int'(beats); b++) begin
        checks++;
        if (q[b] !== d[b]) begin failures++; $display("FAIL read %0d beat %0d %h vs %h", i, b, q[b], d[b]); end
      end
    end
    foreach (ref_m[k]) begin
      checks++;
      if (i_mem.peek64(32'(k) * 8) !== ref_m[k]) begin failures++; $display("FAIL memory word %0d", k); end
    end
    checks++;
    if (i_m.id_errors != 0) begin failures++; $display("FAIL id/last errors %0d", i_m.id_errors); end
    checks++;
    if (i_mem.n_wr_bursts != nw || i_mem.n_rd_bursts != nw) begin
      failures++; $display("FAIL bursts seen %0d/%0d of %0d", i_mem.n_wr_bursts, i_mem.n_rd_bursts, nw);
    end
    checks++;
    if (min_cross < 2 * 14.0 - 0.5) begin failures++; $display("FAIL crossing too fast %0t", min_cross); end
    $display("min AR crossing %0.1f ns", min_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
