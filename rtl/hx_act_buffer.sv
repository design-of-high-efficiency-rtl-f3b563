// hx_act_buffer: double-buffered activation buffer (AB) of the heterogeneous
// accelerator.
//
// Two halves of HALF_DEPTH 128-bit words. The DMA fills one half (Load) while the
// scatter-gather unit reads the tile under computation from the other, so tile
// loading overlaps computation. The half is the top address bit. Write and
// synchronous read ports are independent; read data appears one cycle after re.
// rd_half_busy tells the buffer which half the reader is working on, and an
// assertion checks that the DMA never writes that half meanwhile.
// Double buffering is the published design; HALF_DEPTH (16 KB per half) is this
// design's choice, as the document gives no size for the buffer.
module hx_act_buffer #(
  parameter int HALF_DEPTH = 1024
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                we,
  input  logic [$clog2(2*HALF_DEPTH)-1:0]     waddr,
  input  logic [127:0]                        wdata,
  input  logic                                re,
  input  logic [$clog2(2*HALF_DEPTH)-1:0]     raddr,
  output logic [127:0]                        rdata,
  input  logic                                rd_active,
  input  logic                                rd_half
);
  localparam int AW = $clog2(2 * HALF_DEPTH);
  logic [127:0] half0 [HALF_DEPTH];
  logic [127:0] half1 [HALF_DEPTH];

  always_ff @(posedge clk) begin
    if (we && !waddr[AW-1]) half0[waddr[AW-2:0]] <= wdata;
    if (we &&  waddr[AW-1]) half1[waddr[AW-2:0]] <= wdata;
    if (re) rdata <= raddr[AW-1] ? half1[raddr[AW-2:0]] : half0[raddr[AW-2:0]];
  end

  a_no_write_to_busy_half: assert property (@(posedge clk) disable iff (!rst_n)
    (we && rd_active) |-> (waddr[AW-1] != rd_half));
endmodule
