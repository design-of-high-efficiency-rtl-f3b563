// hx_ram: single-clock RAM with one write port and one synchronous read port.
//
// Used for the 512 KB global buffer (SMEM, 32768 x 128-bit words), the output
// buffer and the instruction buffer of the heterogeneous accelerator. The global
// buffer is a 128-bit wide SRAM in the published design; here it is written as a
// memory array that synthesis maps to RAM. Read data appears one cycle after rd_en;
// a read and a write to the same word in one cycle return the old word. No reset.
module hx_ram #(
  parameter int W     = 128,
  parameter int DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
