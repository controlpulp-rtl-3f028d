// Testbench for tcdm_sram: random byte-enabled writes and reads against a
// reference array; every access must be granted at once and answered exactly
// one cycle later.
module tb_tcdm_sram;
  import cpulp_pkg::*;
  localparam int unsigned WORDS = 256;
  logic clk = 0, rst_n = 0;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [WORDS];

  always #5 clk = ~clk;

  tcdm_sram #(.WORDS(WORDS), .ADDR_LSB(2)) dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  task automatic access(input logic we, input int unsigned w, input logic [31:0] d,
                        input logic [3:0] be, output logic [31:0] q);
    @(negedge clk);
    req = '{req: 1'b1, addr: 32'(w) << 2, we: we, be: be, wdata: d};
    #1;
    checks++;
    if (!rsp.gnt) begin failures++; $display("FAIL no immediate grant"); end
    @(negedge clk);
    req.req = 1'b0;
    #1;
    checks++;
    if (!rsp.rvalid) begin failures++; $display("FAIL rvalid not one cycle after grant"); end
    q = rsp.rdata;
  endtask

  initial begin
    logic [31:0] q;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      ref_mem[w] = $urandom;
      access(1'b1, w, ref_mem[w], 4'hF, q);
    end
    for (int i = 0; i < 600; i++) begin
      int unsigned w;
      logic [31:0] d;
      logic [3:0] be;
      w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1) == 1) begin
        d = $urandom; be = 4'($urandom);
        access(1'b1, w, d, be, q);
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[w][8*b +: 8] = d[8*b +: 8];
      end else begin
        access(1'b0, w, '0, 4'hF, q);
        checks++;
        if (q !== ref_mem[w]) begin
          failures++;
          $display("FAIL word %0d read %h expected %h", w, q, ref_mem[w]);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (rsp.rvalid) begin failures++; $display("FAIL rvalid without request"); end
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
