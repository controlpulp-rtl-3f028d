// Testbench for timer_unit: counting with and without prescaler, compare
// interrupt period in continuous mode, one-shot run-on, counter write and
// reset, and register read-back.
module tb_timer_unit;
  import cpulp_pkg::*;
  logic clk = 0, rst_n = 0;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  logic irq;
  int checks = 0, failures = 0;
  int irq_count = 0;
  longint cyc = 0, irq_cyc[$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (irq) begin irq_count++; irq_cyc.push_back(cyc); end
  end

  timer_unit dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .irq_o(irq));

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{req: 1'b1, addr: a, we: 1'b1, be: 4'hF, wdata: d};
    @(negedge clk);
    req.req = 1'b0;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] q);
    @(negedge clk);
    req = '{req: 1'b1, addr: a, we: 1'b0, be: 4'hF, wdata: '0};
    @(negedge clk);
    req.req = 1'b0;
    #1;
    q = rsp.rdata;
  endtask

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    logic [31:0] q, q2;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // free running, no prescaler: 20 cycles between reads -> +20
    wr(32'h8, 32'hFFFF_FFFF);
    wr(32'h0, 32'h9);             // enable + reset
    rd(32'h4, q);
    repeat (18) @(negedge clk);
    rd(32'h4, q2);
    check(q2 - q, 20, "count rate without prescaler");
    // prescaler 3: advances every 4 cycles
    wr(32'h0, 32'h0309);
    rd(32'h4, q);
    repeat (38) @(negedge clk);
    rd(32'h4, q2);
    check(q2 - q, 10, "count rate with prescaler 3");
    rd(32'h0, q);
    check(q, 32'h0301, "cfg read-back");
    // continuous mode, compare 9: irq every 10 cycles
    wr(32'h0, 32'h0);
    irq_count = 0;
    irq_cyc.delete();
    wr(32'h8, 32'd9);
    wr(32'h0, 32'hF);            // enable, irq, continuous, reset
    repeat (55) @(negedge clk);
    check(irq_count, 5, "interrupts in 55 cycles");
    if (irq_cyc.size() >= 2) check(irq_cyc[1] - irq_cyc[0], 10, "interrupt period");
    // one-shot: counts past compare, single interrupt
    wr(32'h0, 32'h0);
    irq_count = 0;
    wr(32'h8, 32'd4);
    wr(32'h0, 32'hB);            // enable, irq, reset, not continuous
    repeat (30) @(negedge clk);
    check(irq_count, 1, "one interrupt in one-shot mode");
    rd(32'h4, q);
    check(q > 20, 1, "counter runs on past compare");
    // counter write
    wr(32'h0, 32'h0);
    wr(32'h4, 32'd1234);
    rd(32'h4, q);
    check(q, 1234, "counter write while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
