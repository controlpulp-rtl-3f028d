// Behavioural AXI4 master for testbenches (simulation only).
//
// write() sends one burst (AW, then its W beats, then waits for B) and
// read() sends one burst and collects its R beats; both check the response
// ID. Signals change on the falling clock edge. Calls are sequential per
// instance; several instances give concurrent traffic.
module axi_tb_master
  import cpulp_pkg::*;
(
  input  logic     clk_i,
  output axi_req_t req_o,
  input  axi_rsp_t rsp_i
);
  int id_errors = 0;

  initial req_o = '0;

  task automatic write(input axi_addr_t addr, input int unsigned beats, input logic [2:0] size,
                       input logic [1:0] burst, input axi_id_t id,
                       input axi_data_t data [$], input axi_strb_t strb [$]);
    @(negedge clk_i);
    req_o.aw_valid = 1'b1;
    req_o.aw = '{id: id, addr: addr, len: 8'(beats - 1), size: size, burst: burst};
    #1;
    while (!rsp_i.aw_ready) begin @(negedge clk_i); #1; end
    @(negedge clk_i);
    req_o.aw_valid = 1'b0;
    for (int b = 0; b < int'(beats); b++) begin
      req_o.w_valid = 1'b1;
      req_o.w = '{data: data[b], strb: strb[b], last: (b == int'(beats) - 1)};
      #1;
      while (!rsp_i.w_ready) begin @(negedge clk_i); #1; end
      @(negedge clk_i);
    end
    req_o.w_valid = 1'b0;
    req_o.b_ready = 1'b1;
    #1;
    while (!rsp_i.b_valid) begin @(negedge clk_i); #1; end
    if (rsp_i.b.id !== id) id_errors++;
    @(negedge clk_i);
    req_o.b_ready = 1'b0;
  endtask

  task automatic read(input axi_addr_t addr, input int unsigned beats, input logic [2:0] size,
                      input logic [1:0] burst, input axi_id_t id, output axi_data_t data [$]);
    data.delete();
    @(negedge clk_i);
    req_o.ar_valid = 1'b1;
    req_o.ar = '{id: id, addr: addr, len: 8'(beats - 1), size: size, burst: burst};
    #1;
    while (!rsp_i.ar_ready) begin @(negedge clk_i); #1; end
    @(negedge clk_i);
    req_o.ar_valid = 1'b0;
    req_o.r_ready  = 1'b1;
    while (data.size() < beats) begin
      #1;
      if (rsp_i.r_valid) begin
        data.push_back(rsp_i.r.data);
        if (rsp_i.r.id !== id) id_errors++;
        if (rsp_i.r.last !== (data.size() == beats)) id_errors++;
      end
      @(negedge clk_i);
    end
    req_o.r_ready = 1'b0;
  endtask
endmodule
