// Testbench for axi_mux: two masters send random write and read bursts at
// the same time through the mux into one latency memory. Checks data read
// back, that each master gets its own IDs back untagged, that both sources
// competed for the address channels, and that the memory saw the source tag.
module tb_axi_mux;
  import cpulp_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t [1:0] s_req;
  axi_rsp_t [1:0] s_rsp;
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  int checks = 0, failures = 0, contention = 0, tag_seen = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (s_req[0].aw_valid && s_req[1].aw_valid) contention++;
    if (s_req[0].ar_valid && s_req[1].ar_valid) contention++;
    if (m_req.ar_valid && m_req.ar.id[AXI_ID_W-1]) tag_seen++;
  end

  axi_mux #(.NS(2)) dut (.clk_i(clk), .rst_ni(rst_n), .s_req_i(s_req), .s_rsp_o(s_rsp),
                         .m_req_o(m_req), .m_rsp_i(m_rsp));
  axi_delay_mem #(.LATENCY(3)) i_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(m_req), .rsp_o(m_rsp));
  axi_tb_master i_m0 (.clk_i(clk), .req_o(s_req[0]), .rsp_i(s_rsp[0]));
  axi_tb_master i_m1 (.clk_i(clk), .req_o(s_req[1]), .rsp_i(s_rsp[1]));

  task automatic traffic(input int m);
    axi_data_t ref_mem [int];
    for (int i = 0; i < 40; i++) begin
      axi_data_t d [$], q [$];
      axi_strb_t s [$];
      int unsigned beats, base;
      axi_id_t id;
      beats = $urandom_range(1, 8);
      base  = 32'h8000_0000 + m * 32'h1000 + $urandom_range(0, 31) * 64;
      id    = axi_id_t'($urandom_range(0, 15));
      for (int b = 0; b < int'(beats); b++) begin d.push_back({$urandom, $urandom}); s.push_back('1); end
      if (m == 0) i_m0.write(base, beats, 3'd3, AXI_BURST_INCR, id, d, s);
      else        i_m1.write(base, beats, 3'd3, AXI_BURST_INCR, id, d, s);
      for (int b = 0; b < int'(beats); b++) ref_mem[base / 8 + b] = d[b];
      if (m == 0) i_m0.read(base, beats, 3'd3, AXI_BURST_INCR, id, q);
      else        i_m1.read(base, beats, 3'd3, AXI_BURST_INCR, id, q);
      for (int b = 0; b < int'(beats); b++) begin
        checks++;
        if (q[b] !== ref_mem[base / 8 + b]) begin
          failures++; $display("FAIL m%0d beat %0d got %h exp %h", m, b, q[b], ref_mem[base / 8 + b]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork traffic(0); traffic(1); join
    checks++; if (i_m0.id_errors + i_m1.id_errors != 0) begin failures++; $display("FAIL id/last errors"); end
    checks++; if (contention == 0) begin failures++; $display("FAIL no contention"); end
    checks++; if (tag_seen == 0) begin failures++; $display("FAIL no source tag seen"); end
    $display("contention=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
