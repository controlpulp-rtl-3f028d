// Testbench for event_unit with 8 cores. Checks: the hardware barrier holds
// every core until the last one in the mask arrives and then releases all in
// the same cycle, repeatedly, with cores arriving in random order; cores
// outside the mask are not waited for; wait-for-event sleeps until an
// unmasked hardware or software event and clears it; masked events do not
// wake a core; sleep output while waiting.
module tb_event_unit;
  import cpulp_pkg::*;
  localparam int unsigned NC = 8;
  logic clk = 0, rst_n = 0;
  tcdm_req_t [NC-1:0] req;
  tcdm_rsp_t [NC-1:0] rsp;
  logic [1:0] hw_evt;
  logic [NC-1:0] sleep;
  logic release_o;
  int checks = 0, failures = 0, releases = 0;
  longint cyc = 0;
  longint grant_cyc [NC];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (release_o) releases++;
  end

  event_unit #(.NCORES(NC), .NHW(2)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .hw_evt_i(hw_evt),
    .core_sleep_o(sleep), .barrier_release_o(release_o));

  task automatic access(input int c, input logic we, input logic [31:0] a, input logic [31:0] d,
                        output logic [31:0] q);
    @(negedge clk);
    req[c] = '{req: 1'b1, addr: a, we: we, be: 4'hF, wdata: d};
    #1;
    while (!rsp[c].gnt) begin @(negedge clk); #1; end
    grant_cyc[c] = cyc;
    @(negedge clk);
    req[c].req = 1'b0;
    #1;
    q = rsp[c].rdata;
  endtask

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic barrier_core(input int c, input int delay);
    logic [31:0] q;
    repeat (delay) @(negedge clk);
    access(c, 1'b0, 32'h10, '0, q);
  endtask

  initial begin
    logic [31:0] q;
    int last_delay;
    req = '0; hw_evt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    access(0, 1'b1, 32'h0C, 32'hFF, q);      // all 8 cores in the team
    for (int round = 0; round < 5; round++) begin
      int d [NC];
      last_delay = 0;
      for (int c = 0; c < NC; c++) begin
        d[c] = $urandom_range(0, 20);
        if (d[c] > last_delay) last_delay = d[c];
      end
      fork
        barrier_core(0, d[0]); barrier_core(1, d[1]); barrier_core(2, d[2]); barrier_core(3, d[3]);
        barrier_core(4, d[4]); barrier_core(5, d[5]); barrier_core(6, d[6]); barrier_core(7, d[7]);
      join
      for (int c = 1; c < NC; c++) check(grant_cyc[c], grant_cyc[0], "all cores released together");
    end
    check(releases, 5, "barrier releases");
    // team of cores 0..3 only
    access(0, 1'b1, 32'h0C, 32'h0F, q);
    fork
      barrier_core(0, 0); barrier_core(1, 3); barrier_core(2, 6); barrier_core(3, 9);
    join
    check(grant_cyc[0], grant_cyc[3], "team of four released together");
    check(releases, 6, "team barrier release");

    // wait for event: core 2 waits on hw event 0 (bit 8)
    access(2, 1'b1, 32'h00, 32'h100, q);
    access(2, 1'b1, 32'h04, 32'hFFFF_FFFF, q);    // clear old events
    fork
      begin access(2, 1'b0, 32'h08, '0, q); check(q, 32'h100, "wait returns the event"); end
      begin
        repeat (5) @(negedge clk);
        check(sleep[2], 1, "core sleeps while waiting");
        hw_evt[1] = 1'b1; @(negedge clk); hw_evt[1] = 1'b0;   // masked: must not wake
        repeat (3) @(negedge clk);
        check(sleep[2], 1, "masked event does not wake");
        hw_evt[0] = 1'b1; @(negedge clk); hw_evt[0] = 1'b0;
      end
    join
    access(2, 1'b0, 32'h04, '0, q);
    check(q, 32'h200, "buffer keeps the masked event, clears the waited one");
    // software event from core 5 to core 6
    access(6, 1'b1, 32'h00, 32'h1, q);
    fork
      begin access(6, 1'b0, 32'h08, '0, q); check(q, 32'h1, "software event wakes"); end
      begin repeat (4) @(negedge clk); access(5, 1'b1, 32'h14, 32'h40, q); end
    join
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
