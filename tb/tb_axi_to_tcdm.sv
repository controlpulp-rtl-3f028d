// Testbench for axi_to_tcdm in front of a 4 KiB memory. Random INCR bursts
// of full 64-bit beats and of narrow 32-bit beats (both lanes), random
// strobes, and FIXED bursts are written and read back against a byte-level
// reference. Checks data, response IDs and WLAST/RLAST handling, and the
// address offset.
module tb_axi_to_tcdm;
  import cpulp_pkg::*;
  localparam logic [31:0] BASE = 32'h1C00_0000;
  logic clk = 0, rst_n = 0;
  axi_req_t s_req;
  axi_rsp_t s_rsp;
  tcdm_req_t t_req;
  tcdm_rsp_t t_rsp;
  int checks = 0, failures = 0, narrow = 0, fixed = 0;
  logic [7:0] ref_b [4096];

  always #5 clk = ~clk;

  axi_to_tcdm #(.ADDR_OFFSET(BASE)) dut (.clk_i(clk), .rst_ni(rst_n), .s_req_i(s_req), .s_rsp_o(s_rsp),
                                          .tcdm_req_o(t_req), .tcdm_rsp_i(t_rsp));
  tcdm_sram #(.WORDS(1024)) i_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(t_req), .rsp_o(t_rsp));
  axi_tb_master i_m (.clk_i(clk), .req_o(s_req), .rsp_i(s_rsp));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise through full beats
    for (int k = 0; k < 16; k++) begin
      axi_data_t d [$];
      axi_strb_t s [$];
      d.delete(); s.delete();
      for (int b = 0; b < 32; b++) begin
        d.push_back({$urandom, $urandom}); s.push_back('1);
        for (int y = 0; y < 8; y++) ref_b[k * 256 + b * 8 + y] = d[b][8*y +: 8];
      end
      i_m.write(BASE + k * 256, 32, 3'd3, AXI_BURST_INCR, 6'(k), d, s);
    end
    for (int i = 0; i < 200; i++) begin
      int unsigned kind, beats, sz, a;
      axi_data_t d [$], q [$];
      axi_strb_t s [$];
      d.delete(); q.delete(); s.delete();
      kind  = $urandom_range(0, 2);          // 0 full, 1 narrow, 2 fixed narrow
      sz    = (kind == 0) ? 3 : 2;
      beats = (kind == 2) ? $urandom_range(1, 3) : $urandom_range(1, 8);
      a     = (kind == 0) ? $urandom_range(0, 400) * 8 : $urandom_range(0, 900) * 4;
      if (kind == 1) narrow++;
      if (kind == 2) fixed++;
      for (int b = 0; b < int'(beats); b++) begin
        int unsigned ba;
        axi_strb_t st;
        ba = (kind == 2) ? a : a + b * (1 << sz);
        st = axi_strb_t'($urandom);
        if (sz == 2) st = ba[2] ? (st & 8'hF0) : (st & 8'h0F);
        d.push_back({$urandom, $urandom}); s.push_back(st);
        for (int y = 0; y < 8; y++)
          if (st[y]) ref_b[(ba & ~7) + y] = d[b][8*y +: 8];
      end
      i_m.write(BASE + a, beats, 3'(sz), (kind == 2) ? AXI_BURST_FIXED : AXI_BURST_INCR, 6'(i % 32), d, s);
      i_m.read(BASE + a, beats, 3'(sz), (kind == 2) ? AXI_BURST_FIXED : AXI_BURST_INCR, 6'(i % 32), q);
      for (int b = 0; b < int'(beats); b++) begin
        int unsigned ba;
        axi_data_t e;
        ba = (kind == 2) ? a : a + b * (1 << sz);
        for (int y = 0; y < 8; y++) e[8*y +: 8] = ref_b[(ba & ~7) + y];
        checks++;
        if (sz == 2) begin
          if ((ba[2] ? q[b][63:32] : q[b][31:0]) !== (ba[2] ? e[63:32] : e[31:0])) begin
            failures++; $display("FAIL narrow beat at %h", ba);
          end
        end else if (q[b] !== e) begin
          failures++; $display("FAIL beat at %h got %h exp %h", ba, q[b], e);
        end
      end
    end
    checks++;
    if (i_m.id_errors != 0) begin failures++; $display("FAIL id/last errors %0d", i_m.id_errors); end
    checks++;
    if (narrow == 0 || fixed == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
