// Testbench for l1_tcdm at its full size (128 KiB, 16 banks, 10 ports).
// Port 0 fills and checks the first and last words; then all ten ports run
// random traffic on their own slices at once. Checks data, the one-cycle
// response after grant, the single-cycle latency without conflict and that
// bank conflicts occurred and were resolved.
module tb_l1_tcdm;
  import cpulp_pkg::*;
  localparam int unsigned NM = 10;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [NM-1:0] req;
  tcdm_rsp_t [NM-1:0] rsp;
  int checks = 0, failures = 0, conflicts = 0;

  always #5 clk = ~clk;

  l1_tcdm dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  task automatic access(input int m, input logic we, input logic [31:0] a, input logic [31:0] d,
                        output logic [31:0] q, output int lat);
    @(negedge clk);
    req[m] = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d};
    lat = 1;
    #1;
    while (!rsp[m].gnt) begin lat++; @(negedge clk); #1; end
    @(negedge clk);
    req[m].req = 1'b0;
    #1;
    checks++;
    if (!rsp[m].rvalid) begin failures++; $display("FAIL m%0d no rvalid", m); end
    q = rsp[m].rdata;
  endtask

  task automatic worker(input int m);
    logic [31:0] ref_mem [int];
    logic [31:0] q;
    int lat;
    for (int i = 0; i < 300; i++) begin
      int unsigned w;
      w = m * 64 + $urandom_range(0, 63);   // 64-word slice: spans all banks
      if (!ref_mem.exists(w) || $urandom_range(0, 1) == 0) begin
        ref_mem[w] = $urandom;
        access(m, 1'b1, w * 4, ref_mem[w], q, lat);
      end else begin
        access(m, 1'b0, w * 4, '0, q, lat);
        checks++;
        if (q !== ref_mem[w]) begin failures++; $display("FAIL m%0d w%0d", m, w); end
      end
      if (lat > 1) conflicts++;
    end
  endtask

  initial begin
    logic [31:0] q;
    int lat;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 32; k++) begin
      access(0, 1'b1, 32'(k) * 4, 32'hA000 + 32'(k), q, lat);
      access(0, 1'b1, 32'h1_FF80 + 32'(k) * 4, 32'hB000 + 32'(k), q, lat);
    end
    for (int k = 0; k < 32; k++) begin
      access(NM - 1, 1'b0, 32'(k) * 4, '0, q, lat);
      checks++;
      if (q !== 32'hA000 + 32'(k)) begin failures++; $display("FAIL first words %0d", k); end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
      access(NM - 1, 1'b0, 32'h1_FF80 + 32'(k) * 4, '0, q, lat);
      checks++;
      if (q !== 32'hB000 + 32'(k)) begin failures++; $display("FAIL last words %0d", k); end
    end
    fork
      worker(0); worker(1); worker(2); worker(3); worker(4);
      worker(5); worker(6); worker(7); worker(8); worker(9);
    join
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflicts"); end
    $display("conflicts=%0d", conflicts);
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
