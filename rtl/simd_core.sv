// simd_core: SIMD core for sparse work (GCN feature aggregation, SpMV, partial-sum
// reduction, ReLU).
//
// ROWS rows of COLS processing elements. Each PE multiplies a feature value by a
// scale (the edge value of the COO entry, or 1 when scaling is off), adds it to the
// partial result of the target node held in its scratch pad (SPAD), and can apply
// ReLU when results are read out. A node is owned by exactly one PE row, row =
// node mod ROWS, at SPAD entry node / ROWS, so no two rows ever touch the same node.
//
// The control unit walks num_edges COO entries (value, destination, source) of the
// sparse buffer, fetches the feature vector of each source node from the banked
// intermediate buffer, and issues the edge to the destination's PE row: one edge per
// cycle through a three-stage pipeline (edge read, feature read, accumulate). The
// read-modify-write of a SPAD entry finishes in one cycle, so consecutive edges to
// the same node need no stall. SpMV uses the same path: the matrix entry is the
// scale and the vector element sits in feature column 0.
//
// Interface: start/num_edges/scale_en/clear start a pass; done pulses when the last
// edge has been accumulated. Read ports to the sparse buffer (eb_*) and intermediate
// buffer (ib_*) have a one-cycle latency. Results are read per node (rd_node) with
// optional ReLU and right shift, saturated to 8 bits, combinationally.
// The PE function (scale, add, ReLU, SPAD, 16 rows x 128 columns) follows the
// published design; issuing one edge per cycle instead of up to 16, the SPAD depth,
// the accumulator width and the read-out format are this design's choices.
module simd_core
  import hx_pkg::*;
#(
  parameter int ROWS   = 16,
  parameter int COLS   = 128,
  parameter int ACC_W  = 24,
  parameter int DEPTH  = 64,     // nodes per PE row: tile of 1024 nodes / 16 rows
  parameter int EB_AW  = 12      // sparse buffer: 16 KB of 32-bit entries
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          clear,      // zero all SPADs (one cycle)
  input  logic                          scale_en,   // 1: multiply by edge value, 0: by 1
  input  logic [EB_AW:0]                num_edges,
  output logic                          busy,
  output logic                          done,
  // sparse buffer read
  output logic [EB_AW-1:0]              eb_addr,
  input  coo_t                          eb_data,
  // intermediate buffer read
  output logic [11:0]                   ib_addr,
  input  logic [COLS-1:0][7:0]          ib_data,
  // read-out
  input  logic [11:0]                   rd_node,
  input  logic                          rd_relu,
  input  logic [3:0]                    rd_shift,
  output logic [COLS-1:0][7:0]          rd_data,
  output logic [31:0]                   edge_cnt
);

  localparam int RSEL = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int DSEL = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // per-row scratch pads
  logic signed [ACC_W-1:0] spad [ROWS][DEPTH][COLS];

  // ---------------- control: edge walk ----------------
  logic [EB_AW:0] idx;
  logic           walking;
  logic           s1_v, s2_v;
  logic [11:0]    s2_dst;
  logic signed [7:0] s2_val;

  assign eb_addr = idx[EB_AW-1:0];
  assign busy    = walking || s1_v || s2_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; walking <= 1'b0; s1_v <= 1'b0; s2_v <= 1'b0;
      s2_dst <= '0; s2_val <= '0; done <= 1'b0; edge_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        idx     <= '0;
        walking <= (num_edges != 0);
      end else if (walking) begin
        idx <= idx + 1'b1;
        if (idx + 1'b1 == num_edges) walking <= 1'b0;
      end
      // stage 1: edge word arrives, feature read issued (ib_addr below)
      s1_v <= walking;
      // stage 2: features arrive
      s2_v   <= s1_v;
      s2_dst <= eb_data.dst;
      s2_val <= scale_en ? eb_data.val : 8'sd1;
      if (s2_v) edge_cnt <= edge_cnt + 1;
      if (s2_v && !s1_v && !walking) done <= 1'b1;
    end
  end

  assign ib_addr = eb_data.src;

  // ---------------- PE rows: scale, add, store ----------------
  logic [RSEL-1:0] row_sel;
  logic [DSEL-1:0] ent_sel;
  assign row_sel = RSEL'(s2_dst % ROWS);
  assign ent_sel = DSEL'(s2_dst / ROWS);

  always_ff @(posedge clk) begin
    if (clear) begin
      for (int r = 0; r < ROWS; r++)
        for (int d = 0; d < DEPTH; d++)
          for (int c = 0; c < COLS; c++) spad[r][d][c] <= '0;
    end else if (s2_v) begin
      for (int c = 0; c < COLS; c++)
        spad[row_sel][ent_sel][c] <= spad[row_sel][ent_sel][c]
                                   + ACC_W'(s2_val * $signed(ib_data[c]));
    end
  end

  // ---------------- read-out with ReLU ----------------
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic signed [ACC_W-1:0] v;
      v = spad[RSEL'(rd_node % ROWS)][DSEL'(rd_node / ROWS)][c] >>> rd_shift;
      if (rd_relu && v < 0) v = '0;
      if (v > 127)       rd_data[c] = 8'sd127;
      else if (v < -128) rd_data[c] = -8'sd128;
      else               rd_data[c] = v[7:0];
    end
  end

  a_node_in_tile: assert property (@(posedge clk) disable iff (!rst_n)
    s2_v |-> (s2_dst < ROWS * DEPTH));

endmodule
