// Testbench for tcdm_demux: one master, three slaves (two memories and a
// slave that delays its grant), plus unmapped addresses. Checks routing,
// base subtraction, response routing and the error answer.
module tb_tcdm_demux;
  import cpulp_pkg::*;
  logic clk = 0, rst_n = 0;
  tcdm_req_t m_req;
  tcdm_rsp_t m_rsp;
  tcdm_req_t [2:0] s_req;
  tcdm_rsp_t [2:0] s_rsp;
  int checks = 0, failures = 0;
  int slow_cnt;
  logic slow_rvalid;
  logic [31:0] slow_addr;

  always #5 clk = ~clk;

  tcdm_demux #(
    .N(3),
    .BASE({32'h3000_0000, 32'h2000_0000, 32'h1000_0000}),
    .SIZE({32'h0000_0100, 32'h0000_0400, 32'h0000_0400})
  ) dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp));

  tcdm_sram #(.WORDS(256)) i_m0 (.clk_i(clk), .rst_ni(rst_n), .req_i(s_req[0]), .rsp_o(s_rsp[0]));
  tcdm_sram #(.WORDS(256)) i_m1 (.clk_i(clk), .rst_ni(rst_n), .req_i(s_req[1]), .rsp_o(s_rsp[1]));

  // Slow slave: grants after 3 cycles of request, returns ~address.
  always_ff @(posedge clk) begin
    if (!rst_n) begin slow_cnt <= 0; slow_rvalid <= 0; end
    else begin
      slow_rvalid <= s_req[2].req && slow_cnt == 3;
      slow_addr   <= s_req[2].addr;
      slow_cnt    <= (s_req[2].req && slow_cnt < 3) ? slow_cnt + 1 : 0;
    end
  end
  assign s_rsp[2] = '{gnt: s_req[2].req && slow_cnt == 3, rvalid: slow_rvalid, rdata: ~slow_addr};

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    m_req = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d};
    #1;
    while (!m_rsp.gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    m_req.req = 1'b0;
    #1;
    checks++;
    if (!m_rsp.rvalid) begin failures++; $display("FAIL no rvalid for %h", a); end
    q = m_rsp.rdata;
  endtask

  initial begin
    logic [31:0] q;
    logic [31:0] ref0 [256], ref1 [256];
    m_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      ref0[i] = $urandom; ref1[i] = $urandom;
      access(1'b1, 32'h1000_0000 + 32'(i) * 4, ref0[i], q);
      access(1'b1, 32'h2000_0000 + 32'(i) * 4, ref1[i], q);
    end
    for (int i = 0; i < 300; i++) begin
      int unsigned k, w;
      logic [31:0] a, e;
      k = $urandom_range(0, 3);
      w = $urandom_range(0, 63);
      case (k)
        0: begin a = 32'h1000_0000 + w * 4; e = ref0[w]; end
        1: begin a = 32'h2000_0000 + w * 4; e = ref1[w]; end
        2: begin a = 32'h3000_0000 + w * 4; e = ~(w * 4); end
        default: begin a = 32'h4000_0000 + w * 4; e = TCDM_ERR_DATA; end
      endcase
      access(1'b0, a, '0, q);
      checks++;
      if (q !== e) begin failures++; $display("FAIL %h read %h exp %h", a, q, e); end
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
