// limc_macro: weight storage of one LIMC macro, one 8-bit output column.
//
// A macro is split into BANKS banks of ROWS rows of 8-bit storage cells (30 x 15 =
// 450 weights, the published sizes: 15 rows per bank so that 3x3 and 5x5 kernels
// map without waste, 30 banks as the area/latency optimum). Weight k of the column
// lives in bank k / ROWS, row k % ROWS. In every compute iteration one row address
// is applied to all banks at once, so BANKS weights leave the macro per cycle, one
// per bank, toward that bank's Booth multiplier.
//
// Interface: one write port (wr_en, wr_addr = weight index 0..BANKS*ROWS-1, wr_data)
// and one read row address (rd_row) with the BANKS weights on rd_w, combinational.
// The published cells are latches; here they are written as edge-triggered
// registers, which behave the same at the clock edge and keep the design free of
// latch timing (this design's choice). No reset: weights are always written before
// use.
module limc_macro #(
  parameter int BANKS = 30,
  parameter int ROWS  = 15
) (
  input  logic                                    clk,
  input  logic                                    wr_en,
  input  logic [$clog2(BANKS*ROWS)-1:0]           wr_addr,
  input  logic [7:0]                              wr_data,
  input  logic [$clog2(ROWS)-1:0]                 rd_row,
  output logic [BANKS-1:0][7:0]                   rd_w
);

  logic [7:0] cells [BANKS][ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) cells[wr_addr / ROWS][wr_addr % ROWS] <= wr_data;
  end

  always_comb begin
    for (int b = 0; b < BANKS; b++) rd_w[b] = cells[b][rd_row];
  end

endmodule
