// ai_accel_suite: top level that places the accelerator designs side by side.
//
// The three designs share nothing but the clock and reset, and each brings its own
// ports out at this level with a prefix:
//   hx_*  heterogeneous SoC accelerator engine (LIMC + SIMD cores, DMA, buffers)
//   gcn_* GCN accelerator aggregation datapath (6 cores, banked feature memory,
//         reduction engine)
//   vit_* vision-transformer datapath (patch-embedding systolic array, max pool)
// Each design is a complete, separately testable unit; putting them under one top
// is this design's packaging choice, not something the document describes.
module ai_accel_suite (
  input  logic                             clk,
  input  logic                             rst_n,
  // ---- heterogeneous accelerator ----
  input  logic                             hx_host_we,
  input  logic [14:0]                      hx_host_waddr,
  input  logic [127:0]                     hx_host_wdata,
  input  logic                             hx_host_re,
  input  logic [14:0]                      hx_host_raddr,
  output logic [127:0]                     hx_host_rdata,
  input  logic                             hx_cfg_start,
  input  logic [31:0]                      hx_cfg_addr,
  input  logic [8:0]                       hx_cfg_count,
  output logic                             hx_busy,
  output logic                             hx_done,
  output logic [31:0]                      hx_n_instr,
  output logic [31:0]                      hx_n_overlap,
  output logic [31:0]                      hx_n_matmul,
  output logic [31:0]                      hx_n_agg,
  output logic [31:0]                      hx_limc_skip_iter,
  output logic [31:0]                      hx_limc_skip_digit,
  output logic [31:0]                      hx_simd_edge_cnt,
  output logic [1:0]                       hx_feed_token,
  // ---- GCN accelerator ----
  input  logic                             gcn_start,
  input  logic                             gcn_clear,
  output logic                             gcn_busy,
  output logic                             gcn_done,
  input  logic [5:0]                       gcn_eb_we,
  input  logic [9:0]                       gcn_eb_waddr,
  input  logic [31:0]                      gcn_eb_wdata,
  input  logic                             gcn_fm_we,
  input  logic [9:0]                       gcn_fm_wnode,
  input  logic [65:0][7:0]                 gcn_fm_wdata,
  input  logic [5:0]                       gcn_vf_we,
  input  logic [7:0]                       gcn_vf_waddr,
  input  logic [65:0][7:0]                 gcn_vf_wdata,
  input  logic [2:0]                       gcn_rd_core,
  input  logic [9:0]                       gcn_rd_node,
  output logic [65:0][15:0]                gcn_rd_h,
  input  logic                             gcn_rd_en,
  input  logic                             gcn_rd_relu,
  output logic                             gcn_rd_valid,
  output logic [65:0][19:0]                gcn_red_data,
  output logic [31:0]                      gcn_n_edges,
  output logic [31:0]                      gcn_n_stall,
  // ---- vision transformer datapath ----
  input  logic                             vit_clear,
  input  logic                             vit_in_valid,
  input  logic signed [31:0][7:0]          vit_a_in,
  input  logic signed [23:0][3:0]          vit_b_in,
  output logic                             vit_done,
  output logic signed [31:0][23:0][23:0]   vit_acc,
  input  logic                             vit_mp_valid,
  input  logic signed [23:0][7:0]          vit_mp_data,
  output logic                             vit_mp_out_valid,
  output logic signed [23:0][7:0]          vit_mp_out
);

  hetero_accel u_hx (
    .clk, .rst_n,
    .host_we(hx_host_we), .host_waddr(hx_host_waddr), .host_wdata(hx_host_wdata),
    .host_re(hx_host_re), .host_raddr(hx_host_raddr), .host_rdata(hx_host_rdata),
    .cfg_start(hx_cfg_start), .cfg_addr(hx_cfg_addr), .cfg_count(hx_cfg_count),
    .busy(hx_busy), .done(hx_done), .n_instr(hx_n_instr), .n_overlap(hx_n_overlap),
    .n_matmul(hx_n_matmul), .n_agg(hx_n_agg), .limc_skip_iter(hx_limc_skip_iter),
    .limc_skip_digit(hx_limc_skip_digit), .simd_edge_cnt(hx_simd_edge_cnt),
    .feed_token(hx_feed_token));

  gcn_accel u_gcn (
    .clk, .rst_n, .start(gcn_start), .clear(gcn_clear), .busy(gcn_busy), .done(gcn_done),
    .eb_we(gcn_eb_we), .eb_waddr(gcn_eb_waddr), .eb_wdata(gcn_eb_wdata),
    .fm_we(gcn_fm_we), .fm_wnode(gcn_fm_wnode), .fm_wdata(gcn_fm_wdata),
    .vf_we(gcn_vf_we), .vf_waddr(gcn_vf_waddr), .vf_wdata(gcn_vf_wdata),
    .rd_core(gcn_rd_core), .rd_node(gcn_rd_node), .rd_h(gcn_rd_h),
    .rd_en(gcn_rd_en), .rd_relu(gcn_rd_relu), .rd_valid(gcn_rd_valid), .red_data(gcn_red_data),
    .n_edges(gcn_n_edges), .n_stall(gcn_n_stall));

  os_systolic_array #(.ROWS(32), .COLS(24), .A_W(8), .B_W(4), .ACC_W(24)) u_vit_sa (
    .clk, .rst_n, .clear(vit_clear), .in_valid(vit_in_valid), .a_in(vit_a_in), .b_in(vit_b_in),
    .done(vit_done), .acc(vit_acc));

  maxpool_engine #(.LANES(24), .W(8), .WIN(16)) u_vit_mp (
    .clk, .rst_n, .in_valid(vit_mp_valid), .in_data(vit_mp_data),
    .out_valid(vit_mp_out_valid), .max_out(vit_mp_out));

endmodule
