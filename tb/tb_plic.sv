// Testbench for plic with all 144 sources. Checks the two-cycle input to
// output latency, claim/complete with level and edge gateways, priority
// order, lowest-ID tie break, threshold masking, enables and the pending
// register.
module tb_plic;
  import cpulp_pkg::*;
  localparam int unsigned NSRC = 144;
  logic clk = 0, rst_n = 0;
  logic [NSRC-1:0] irq;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  logic irq_o;
  logic [7:0] irq_id;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  plic #(.NSRC(NSRC)) dut (.clk_i(clk), .rst_ni(rst_n), .irq_i(irq), .req_i(req), .rsp_o(rsp),
                           .irq_o(irq_o), .irq_id_o(irq_id));

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

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic enable(input int id, input logic on);
    logic [31:0] q;
    rd(32'h2000 + 32'(id / 32) * 4, q);
    q[id % 32] = on;
    wr(32'h2000 + 32'(id / 32) * 4, q);
  endtask

  initial begin
    logic [31:0] q;
    int lat;
    irq = '0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int id = 1; id <= NSRC; id++) wr(32'(id) * 4, 32'(1 + id % 7));
    wr(32'h200000, 0);
    enable(6, 1); enable(10, 1); enable(140, 1); enable(20, 1); enable(13, 1); enable(27, 1);

    // latency: level line of ID 6 (priority 6)
    @(negedge clk);
    irq[5] = 1'b1;
    lat = 0;
    while (!irq_o) begin @(posedge clk); lat++; @(negedge clk); end
    check(lat, 2, "input to output latency");
    check(irq_id, 6, "id of single request");
    rd(32'h200004, q);
    check(q, 6, "claim");
    repeat (3) @(negedge clk);
    check(irq_o, 0, "no re-request while in service");
    wr(32'h200004, 6);        // complete with level still high -> pends again
    repeat (3) @(negedge clk);
    check(irq_o, 1, "level re-request after complete");
    irq[5] = 1'b0;
    rd(32'h200004, q);
    check(q, 6, "second claim");
    wr(32'h200004, 6);
    repeat (3) @(negedge clk);
    check(irq_o, 0, "quiet after level dropped");

    // priority: ID 10 (prio 4) and ID 140 (prio 1+140%7=1) and ID 13 (prio 7)
    irq[9] = 1'b1; irq[139] = 1'b1; irq[12] = 1'b1;
    repeat (3) @(negedge clk);
    rd(32'h1000, q);
    check(q[10], 1, "pending bit 10");
    check(q[13], 1, "pending bit 13");
    rd(32'h1000 + 4 * (140 / 32), q);
    check(q[140 % 32], 1, "pending bit 140");
    rd(32'h200004, q); check(q, 13, "highest priority first");
    rd(32'h200004, q); check(q, 10, "then next priority");
    rd(32'h200004, q); check(q, 140, "then lowest priority");
    irq[9] = 1'b0; irq[139] = 1'b0; irq[12] = 1'b0;
    wr(32'h200004, 13); wr(32'h200004, 10); wr(32'h200004, 140);

    // tie: IDs 20 and 27 both priority 7 -> lower ID wins
    irq[19] = 1'b1; irq[26] = 1'b1;
    repeat (3) @(negedge clk);
    rd(32'h200004, q); check(q, 20, "tie goes to lower id");
    rd(32'h200004, q); check(q, 27, "then the other");
    irq[19] = 1'b0; irq[26] = 1'b0;
    wr(32'h200004, 20); wr(32'h200004, 27);

    // threshold: priority 4 (ID 10) masked by threshold 4
    wr(32'h200000, 4);
    irq[9] = 1'b1;
    repeat (4) @(negedge clk);
    check(irq_o, 0, "threshold masks equal priority");
    wr(32'h200000, 3);
    repeat (3) @(negedge clk);
    check(irq_o, 1, "lower threshold lets it through");
    rd(32'h200004, q); check(q, 10, "claim after threshold");
    irq[9] = 1'b0;
    wr(32'h200004, 10);
    wr(32'h200000, 0);

    // disabled source stays silent
    irq[99] = 1'b1;
    repeat (4) @(negedge clk);
    check(irq_o, 0, "disabled source");
    irq[99] = 1'b0;

    // edge-triggered gateway on ID 20: one-cycle pulse is caught once
    wr(32'h1080, 32'h1 << 20);
    @(negedge clk); irq[19] = 1'b1; @(negedge clk); irq[19] = 1'b0;
    repeat (3) @(negedge clk);
    check(irq_o, 1, "edge pulse caught");
    rd(32'h200004, q); check(q, 20, "edge claim");
    wr(32'h200004, 20);
    repeat (3) @(negedge clk);
    check(irq_o, 0, "edge does not re-trigger");
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
