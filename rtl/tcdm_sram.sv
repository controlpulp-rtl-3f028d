// Single-port SRAM bank with a TCDM slave port.
//
// One bank of the L1 or L2 memory. It grants every request at once and
// returns rvalid, with the read data, one cycle later, so the access time
// is constant whenever the interconnect in front of it sees no conflict.
// The row is taken from addr[ADDR_LSB +: log2(WORDS)]: ADDR_LSB = 2 for a
// bank that holds a contiguous range, 2 + log2(banks) for a bank of a
// word-interleaved group. Byte enables select the bytes written.
// The bank sizes come from the platform's memory sizes; the one-cycle
// latency and the port protocol are this design's choice.
module tcdm_sram
  import cpulp_pkg::*;
#(
  parameter int unsigned WORDS    = 2048,
  parameter int unsigned ADDR_LSB = 2
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);
  localparam int unsigned RW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];
  logic [RW-1:0] row;
  logic [31:0] rdata_q;
  logic        rvalid_q;

  assign row = req_i.addr[ADDR_LSB +: RW];

  always_ff @(posedge clk_i) begin
    if (req_i.req) begin
      if (req_i.we) begin
        for (int b = 0; b < 4; b++)
          if (req_i.be[b]) mem[row][8*b +: 8] <= req_i.wdata[8*b +: 8];
      end else begin
        rdata_q <= mem[row];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= req_i.req;
  end

  assign rsp_o.gnt    = 1'b1;
  assign rsp_o.rvalid = rvalid_q;
  assign rsp_o.rdata  = rdata_q;

  initial assert (2**RW >= WORDS) else $error("tcdm_sram: row width too small");
endmodule
