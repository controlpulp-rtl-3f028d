// Testbench for tcdm_to_axi against a 7-cycle latency AXI memory. Random
// word writes (with byte enables) and reads in both 64-bit lanes are
// checked against the memory's contents and a reference. Checks that the
// grant waits for the AXI response, that rvalid follows one cycle later, and
// the round-trip time.
module tb_tcdm_to_axi;
  import cpulp_pkg::*;
  localparam int unsigned LAT = 7;
  logic clk = 0, rst_n = 0;
  tcdm_req_t t_req;
  tcdm_rsp_t t_rsp;
  axi_req_t m_req;
  axi_rsp_t m_rsp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tcdm_to_axi dut (.clk_i(clk), .rst_ni(rst_n), .tcdm_req_i(t_req), .tcdm_rsp_o(t_rsp),
                   .m_req_o(m_req), .m_rsp_i(m_rsp));
  axi_delay_mem #(.LATENCY(LAT)) i_mem (.clk_i(clk), .rst_ni(rst_n), .req_i(m_req), .rsp_o(m_rsp));

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] d, input logic [3:0] be,
                        output logic [31:0] q, output int cycles);
    @(negedge clk);
    t_req = '{req: 1'b1, addr: a, we: we, be: be, wdata: d};
    cycles = 1;
    #1;
    while (!t_rsp.gnt) begin cycles++; @(negedge clk); #1; end
    @(negedge clk);
    t_req.req = 1'b0;
    #1;
    checks++;
    if (!t_rsp.rvalid) begin failures++; $display("FAIL no rvalid"); end
    q = t_rsp.rdata;
  endtask

  initial begin
    logic [31:0] ref_mem [int];
    logic [31:0] q;
    int cyc;
    t_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int unsigned w;
      logic [31:0] a;
      w = $urandom_range(0, 63);
      a = 32'h4000_0000 + w * 4;
      if (!ref_mem.exists(w)) ref_mem[w] = i_mem.peek32(a);
      if ($urandom_range(0, 1) == 1) begin
        logic [31:0] d;
        logic [3:0] be;
        d = $urandom; be = 4'($urandom);
        access(1'b1, a, d, be, q, cyc);
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[w][8*b +: 8] = d[8*b +: 8];
        checks++;
        if (i_mem.peek32(a) !== ref_mem[w]) begin failures++; $display("FAIL write to %h", a); end
      end else begin
        access(1'b0, a, '0, 4'hF, q, cyc);
        checks++;
        if (q !== ref_mem[w]) begin failures++; $display("FAIL read %h got %h exp %h", a, q, ref_mem[w]); end
        checks++;
        if (cyc < int'(LAT) + 2) begin failures++; $display("FAIL read granted after %0d cycles", cyc); end
      end
    end
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
