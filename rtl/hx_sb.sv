// hx_sb: sparse (edge) buffer of the heterogeneous accelerator, 16 KB.
//
// Written by the DMA as 128-bit words of four 32-bit COO entries (entry 4w in bits
// 31:0 of word w) and read by the SIMD control one entry per cycle, with a
// one-cycle read latency. The 16 KB size is the published one; the entry packing is
// this design's choice.
module hx_sb #(
  parameter int ENTRIES = 4096
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(ENTRIES/4)-1:0]  waddr,
  input  logic [127:0]                  wdata,
  input  logic [$clog2(ENTRIES)-1:0]    raddr,
  output logic [31:0]                   rdata
);
  logic [127:0] mem [ENTRIES/4];
  logic [127:0] word_q;
  logic [1:0]   lane_q;
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    word_q <= mem[raddr / 4];
    lane_q <= raddr[1:0];
  end
  assign rdata = word_q[32*lane_q +: 32];
endmodule
