// Testbench for l2_memory at its full 512 KiB size. Checks: the Manager
// Core's instruction and data ports share the private and the interleaved
// banks; the shared masters reach the interleaved banks (including the last
// word of L2) but are refused by the private banks (error data, nothing
// written); concurrent masters keep their data; an access without conflict
// is answered one cycle after the request.
module tb_l2_memory;
  import cpulp_pkg::*;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [3:0] req;    // 0 instr, 1 data, 2..3 shared
  tcdm_rsp_t [3:0] rsp;
  int checks = 0, failures = 0, refused = 0;

  always #5 clk = ~clk;

  l2_memory dut (
    .clk_i(clk), .rst_ni(rst_n),
    .instr_req_i(req[0]), .instr_rsp_o(rsp[0]),
    .data_req_i(req[1]), .data_rsp_o(rsp[1]),
    .sh_req_i(req[3:2]), .sh_rsp_o(rsp[3:2]));

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

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic worker(input int m);
    logic [31:0] ref_mem [int];
    logic [31:0] q;
    int lat;
    for (int i = 0; i < 300; i++) begin
      int unsigned w;
      logic [31:0] a;
      // each master its own 1 KiB slice of the shared region
      w = 32'h4000 + m * 256 + $urandom_range(0, 255);
      a = w * 4;
      if (!ref_mem.exists(w) || $urandom_range(0, 1) == 0) begin
        ref_mem[w] = $urandom;
        access(m, 1'b1, a, ref_mem[w], q, lat);
      end else begin
        access(m, 1'b0, a, '0, q, lat);
        expect_eq(q, ref_mem[w], $sformatf("m%0d shared word %0d", m, w));
      end
    end
  endtask

  initial begin
    logic [31:0] q;
    int lat;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // private region through the data port, fetched through the instr port
    access(1, 1'b1, 32'h0000_0010, 32'hCAFE_0001, q, lat);
    access(1, 1'b1, 32'h0000_8010, 32'hCAFE_0002, q, lat);   // second private bank
    access(0, 1'b0, 32'h0000_0010, '0, q, lat);
    expect_eq(q, 32'hCAFE_0001, "instr fetch private bank 0");
    checks++;
    if (lat != 1) begin failures++; $display("FAIL uncontended latency %0d", lat); end
    access(0, 1'b0, 32'h0000_8010, '0, q, lat);
    expect_eq(q, 32'hCAFE_0002, "instr fetch private bank 1");

    // shared masters are refused by the private banks
    access(2, 1'b1, 32'h0000_0010, 32'hDEAD_BEEF, q, lat);
    access(3, 1'b0, 32'h0000_0010, '0, q, lat);
    expect_eq(q, TCDM_ERR_DATA, "shared read of private bank");
    if (q === TCDM_ERR_DATA) refused++;
    access(1, 1'b0, 32'h0000_0010, '0, q, lat);
    expect_eq(q, 32'hCAFE_0001, "private word untouched by shared write");

    // shared region: first and last words, all four banks
    for (int k = 0; k < 8; k++) begin
      access(2, 1'b1, 32'h0001_0000 + 32'(k) * 4, 32'h1000 + 32'(k), q, lat);
      access(3, 1'b1, 32'h0007_FFE0 + 32'(k) * 4, 32'h2000 + 32'(k), q, lat);
    end
    for (int k = 0; k < 8; k++) begin
      access(1, 1'b0, 32'h0001_0000 + 32'(k) * 4, '0, q, lat);
      expect_eq(q, 32'h1000 + 32'(k), "first shared words");
      access(0, 1'b0, 32'h0007_FFE0 + 32'(k) * 4, '0, q, lat);
      expect_eq(q, 32'h2000 + 32'(k), "last shared words");
    end

    // all four masters at once on the shared banks
    fork
      worker(0); worker(1); worker(2); worker(3);
    join
    checks++;
    if (refused == 0) begin failures++; $display("FAIL private protection never exercised"); end
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
