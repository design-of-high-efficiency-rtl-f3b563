// hx_dma: DMA engine of the heterogeneous accelerator; executes Load and Store.
//
// A transfer copies count 128-bit words from word address src to word address dst
// of the accelerator's flat memory map (global buffer, LIMC ping/pong, activation,
// intermediate, sparse, output and instruction buffers; see hx_pkg). The engine
// reads one word per cycle and writes it one cycle later, so a transfer of N words
// takes N+1 cycles after start; the region decoding of both addresses is done by
// the surrounding accelerator, which returns read data one cycle after rd_en.
// The Load/Store fields (source, destination, 10-bit transfer count) follow the
// published instruction format; the one-word-per-cycle pipeline is this design's
// choice.
module hx_dma (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   src,
  input  logic [31:0]   dst,
  input  logic [9:0]    count,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [31:0]   rd_addr,
  input  logic [127:0]  rd_data,
  output logic          wr_en,
  output logic [31:0]   wr_addr,
  output logic [127:0]  wr_data
);
  logic [9:0]  left;
  logic [31:0] src_q, dst_q;
  logic        rd_q;

  assign rd_en   = (left != 0);
  assign rd_addr = src_q;
  assign busy    = (left != 0) || rd_q;
  assign wr_data = rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; src_q <= '0; dst_q <= '0; rd_q <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_q <= rd_en;
      if (start && !busy) begin
        left  <= count;
        src_q <= src;
        dst_q <= dst;
        done  <= (count == 0);
      end else if (rd_en) begin
        left  <= left - 1'b1;
        src_q <= src_q + 1;
      end
      // the word read last cycle is written now
      if (rd_q) begin
        dst_q <= dst_q + 1;
        if (left == 0 && !rd_en) done <= 1'b1;
      end
    end
  end
  // write strobe and address align with rd_data (one cycle after the read)
  always_comb begin
    wr_en   = rd_q;
    wr_addr = dst_q;
  end
endmodule
