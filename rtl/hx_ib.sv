// hx_ib: intermediate buffer of the heterogeneous accelerator.
//
// Holds one 128-value (8-bit) feature vector per node of a graph tile, written
// either by the LIMC result path or by the DMA as 128-bit words (16 features), and
// read by the SIMD core one whole node vector (1024 bits) per cycle. Node vectors are
// split across NG = COLS/16 column groups, each a RAM indexed by node, so a 128-bit
// word write touches one group and a node read touches all of them. A second,
// 128-bit read port serves the DMA for Store. Word address = node * NG + group.
// Both reads have a one-cycle latency.
// The published buffer has 16 banks so that 16 edges can be served per cycle; this
// SIMD core issues one edge per cycle, so banking by node is not needed and the
// split here is by column group (this design's choice).
module hx_ib #(
  parameter int NODES = 1024,
  parameter int COLS  = 128
) (
  input  logic                                  clk,
  input  logic                                  we,
  input  logic [$clog2(NODES*COLS/16)-1:0]      waddr,
  input  logic [127:0]                          wdata,
  input  logic [$clog2(NODES)-1:0]              node_addr,
  output logic [COLS-1:0][7:0]                  node_data,
  input  logic                                  wre,
  input  logic [$clog2(NODES*COLS/16)-1:0]      wraddr,
  output logic [127:0]                          wrdata
);
  localparam int NG = COLS / 16;

  logic [127:0] grp [NG][NODES];

  always_ff @(posedge clk) begin
    if (we) grp[waddr % NG][waddr / NG] <= wdata;
    for (int g = 0; g < NG; g++) node_data[g*16 +: 16] <= grp[g][node_addr];
    if (wre) begin
      wrdata <= grp[wraddr % NG][wraddr / NG];
    end
  end
endmodule
