// Asynchronous FIFO for one clock-domain crossing.
//
// Carries WIDTH-bit words from the source clock domain to the destination
// clock domain with a valid/ready handshake on both sides. Storage is a
// DEPTH-entry register array written in the source domain. The read and write
// pointers cross the boundary as Gray code through two flip-flop
// synchronisers, so each pointer changes one bit at a time and is always
// sampled either old or new. Full and empty are computed from the local
// pointer and the synchronised far pointer, so both sides are conservative:
// a word becomes visible to the destination 2-3 destination cycles after it
// is written, and a freed slot takes 2-3 source cycles to become usable.
// Interface: src_valid_i/src_ready_o/src_data_i on src_clk_i,
// dst_valid_o/dst_ready_i/dst_data_o on dst_clk_i; each side has its own
// active-low reset, both must be asserted together. DEPTH is a power of two,
// at least 4.
// The Gray-pointer FIFO is this design's choice: the document only shows a
// clock-domain crossing on the AXI path between the SoC and the cluster.
module cdc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             src_clk_i,
  input  logic             src_rst_ni,
  input  logic             src_valid_i,
  output logic             src_ready_o,
  input  logic [WIDTH-1:0] src_data_i,
  input  logic             dst_clk_i,
  input  logic             dst_rst_ni,
  output logic             dst_valid_o,
  input  logic             dst_ready_i,
  output logic [WIDTH-1:0] dst_data_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DEPTH-1:0][WIDTH-1:0] mem_q;
  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] rgray_s1_q, rgray_s2_q;   // read pointer in the source domain
  logic [AW:0] wgray_s1_q, wgray_s2_q;   // write pointer in the destination domain
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- source domain ----
  assign src_ready_o = (wgray_q != {~rgray_s2_q[AW:AW-1], rgray_s2_q[AW-2:0]});
  assign wbin_n      = wbin_q + (AW+1)'(src_valid_i && src_ready_o);

  always_ff @(posedge src_clk_i or negedge src_rst_ni) begin
    if (!src_rst_ni) begin
      wbin_q     <= '0;
      wgray_q    <= '0;
      rgray_s1_q <= '0;
      rgray_s2_q <= '0;
      mem_q      <= '0;
    end else begin
      if (src_valid_i && src_ready_o) mem_q[wbin_q[AW-1:0]] <= src_data_i;
      wbin_q     <= wbin_n;
      wgray_q    <= bin2gray(wbin_n);
      rgray_s1_q <= rgray_q;
      rgray_s2_q <= rgray_s1_q;
    end
  end

  // ---- destination domain ----
  assign dst_valid_o = (rgray_q != wgray_s2_q);
  assign dst_data_o  = mem_q[rbin_q[AW-1:0]];
  assign rbin_n      = rbin_q + (AW+1)'(dst_valid_o && dst_ready_i);

  always_ff @(posedge dst_clk_i or negedge dst_rst_ni) begin
    if (!dst_rst_ni) begin
      rbin_q     <= '0;
      rgray_q    <= '0;
      wgray_s1_q <= '0;
      wgray_s2_q <= '0;
    end else begin
      rbin_q     <= rbin_n;
      rgray_q    <= bin2gray(rbin_n);
      wgray_s1_q <= wgray_q;
      wgray_s2_q <= wgray_s1_q;
    end
  end
endmodule
