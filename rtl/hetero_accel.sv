// hetero_accel: heterogeneous dense/sparse AI accelerator engine with a ping-pong
// latch-based in-memory-compute (LIMC) core and a SIMD core.
//
// Dense multiply-accumulate work (convolutions, fully connected layers, GCN feature
// transformation) runs on the LIMC core; sparse work (GCN feature aggregation, SpMV,
// partial-sum reduction, ReLU) runs on the SIMD core, which reads compressed (COO)
// sparse data so zeros are never moved. Everything is driven by five 128-bit
// instructions - Load, Store, Matmul, Conv, Agg - that the host core places in the
// 512 KB global buffer together with weights and activations.
//
// Data path: global buffer -> (DMA) -> LIMC ping/pong weights, activation buffer,
// intermediate buffer, sparse buffer; activation buffer -> scatter-gather / data
// rearrange / data select / shift register -> shared Booth encoder -> LIMC ->
// results into the intermediate buffer (for a following Agg) or the output buffer;
// sparse buffer + intermediate buffer -> SIMD core -> output buffer -> (DMA Store)
// -> global buffer.
//
// Interface: the host writes and reads the global buffer through host_* (allowed
// while the engine is idle; this stands in for the host's bus path) and starts a
// program with cfg_start / cfg_addr / cfg_count (the configuration-register write
// of the host core). done pulses when the program has completed. Statistics
// outputs count instructions, Loads that overlapped computation, LIMC skips and
// SIMD edges. All addresses are 128-bit word addresses of the memory map in hx_pkg.
// Buffer sizes not given by the document (activation, output, instruction buffers)
// and the memory map are this design's choices.
module hetero_accel
  import hx_pkg::*;
#(
  parameter int SMEM_WORDS = 32768,   // 512 KB
  parameter int AB_HALF    = 1024,
  parameter int OB_WORDS   = 2048,
  parameter int IBUF_DEPTH = 256,
  parameter int IB_NODES   = 1024,
  parameter int SB_ENTRIES = 4096     // 16 KB
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // host access to the global buffer
  input  logic                             host_we,
  input  logic [$clog2(SMEM_WORDS)-1:0]    host_waddr,
  input  logic [127:0]                     host_wdata,
  input  logic                             host_re,
  input  logic [$clog2(SMEM_WORDS)-1:0]    host_raddr,
  output logic [127:0]                     host_rdata,
  // configuration register write
  input  logic                             cfg_start,
  input  logic [31:0]                      cfg_addr,
  input  logic [$clog2(IBUF_DEPTH):0]      cfg_count,
  output logic                             busy,
  output logic                             done,
  // statistics
  output logic [31:0]                      n_instr,
  output logic [31:0]                      n_overlap,
  output logic [31:0]                      n_matmul,
  output logic [31:0]                      n_agg,
  output logic [31:0]                      limc_skip_iter,
  output logic [31:0]                      limc_skip_digit,
  output logic [31:0]                      simd_edge_cnt,
  output logic [1:0]                       feed_token
);

  localparam int AB_AW = $clog2(2 * AB_HALF);
  localparam int SM_AW = $clog2(SMEM_WORDS);
  localparam int OB_AW = $clog2(OB_WORDS);
  localparam int IQ_AW = $clog2(IBUF_DEPTH);
  localparam int IB_AW = $clog2(IB_NODES * 8);
  localparam int SB_AW = $clog2(SB_ENTRIES);

  // ---------------- control ----------------
  logic        dma_start, dma_busy, dma_done;
  logic [31:0] dma_src, dma_dst;
  logic [9:0]  dma_count;
  logic        ex_start, ex_busy, ex_bank, ex_ab_half;
  comp_instr_t ex_instr;
  logic        ibuf_re;
  logic [IQ_AW-1:0] ibuf_addr;
  logic [127:0] ibuf_data;

  hx_ctrl #(.IBUF_DEPTH(IBUF_DEPTH), .AB_AW(AB_AW)) u_ctrl (
    .clk, .rst_n, .cfg_start, .cfg_addr, .cfg_count, .busy, .done,
    .ibuf_re, .ibuf_addr, .ibuf_data,
    .dma_start, .dma_src, .dma_dst, .dma_count, .dma_busy,
    .ex_start, .ex_instr, .ex_busy, .ex_bank, .ex_ab_half, .n_overlap, .n_instr);

  // ---------------- DMA and region decode ----------------
  logic        dma_rd_en, dma_wr_en;
  logic [31:0] dma_rd_addr, dma_wr_addr;
  logic [127:0] dma_rd_data, dma_wr_data;

  hx_dma u_dma (
    .clk, .rst_n, .start(dma_start), .src(dma_src), .dst(dma_dst), .count(dma_count),
    .busy(dma_busy), .done(dma_done), .rd_en(dma_rd_en), .rd_addr(dma_rd_addr),
    .rd_data(dma_rd_data), .wr_en(dma_wr_en), .wr_addr(dma_wr_addr), .wr_data(dma_wr_data));

  function automatic logic in_region(input logic [31:0] a, input logic [31:0] base);
    return a[31:16] == base[31:16];
  endfunction

  // read side: SMEM, OB or IB, selected one cycle later
  typedef enum logic [1:0] {RS_SMEM, RS_OB, RS_IB} rsel_e;
  rsel_e rsel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel_q <= RS_SMEM;
    else if (dma_rd_en)
      rsel_q <= in_region(dma_rd_addr, MAP_OB) ? RS_OB :
                in_region(dma_rd_addr, MAP_IB) ? RS_IB : RS_SMEM;
  end

  // ---------------- memories ----------------
  logic [127:0] smem_rdata, ob_rdata, ib_wrdata;
  logic         smem_we, smem_re;
  logic [SM_AW-1:0] smem_waddr, smem_raddr;
  logic [127:0] smem_wdata;

  assign smem_we    = (dma_wr_en && in_region(dma_wr_addr, MAP_SMEM)) || (host_we && !busy);
  assign smem_waddr = (dma_wr_en && in_region(dma_wr_addr, MAP_SMEM)) ? SM_AW'(dma_wr_addr) : host_waddr;
  assign smem_wdata = (dma_wr_en && in_region(dma_wr_addr, MAP_SMEM)) ? dma_wr_data : host_wdata;
  assign smem_re    = (dma_rd_en && in_region(dma_rd_addr, MAP_SMEM)) || (host_re && !busy);
  assign smem_raddr = (dma_rd_en && in_region(dma_rd_addr, MAP_SMEM)) ? SM_AW'(dma_rd_addr) : host_raddr;
  assign host_rdata = smem_rdata;

  hx_ram #(.W(128), .DEPTH(SMEM_WORDS)) u_smem (
    .clk, .we(smem_we), .waddr(smem_waddr), .wdata(smem_wdata),
    .re(smem_re), .raddr(smem_raddr), .rdata(smem_rdata));

  hx_ram #(.W(128), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .we(dma_wr_en && in_region(dma_wr_addr, MAP_IBUF)), .waddr(IQ_AW'(dma_wr_addr)),
    .wdata(dma_wr_data), .re(ibuf_re), .raddr(ibuf_addr), .rdata(ibuf_data));

  // execution results (exec has priority; the issue rules keep the DMA off these buffers meanwhile)
  logic        res_we;
  logic [31:0] res_addr;
  logic [127:0] res_data;

  logic ob_we;  logic [OB_AW-1:0] ob_waddr; logic [127:0] ob_wdata;
  assign ob_we    = (res_we && in_region(res_addr, MAP_OB)) || (dma_wr_en && in_region(dma_wr_addr, MAP_OB));
  assign ob_waddr = (res_we && in_region(res_addr, MAP_OB)) ? OB_AW'(res_addr) : OB_AW'(dma_wr_addr);
  assign ob_wdata = (res_we && in_region(res_addr, MAP_OB)) ? res_data : dma_wr_data;
  hx_ram #(.W(128), .DEPTH(OB_WORDS)) u_ob (
    .clk, .we(ob_we), .waddr(ob_waddr), .wdata(ob_wdata),
    .re(dma_rd_en && in_region(dma_rd_addr, MAP_OB)), .raddr(OB_AW'(dma_rd_addr)), .rdata(ob_rdata));

  logic ib_we;  logic [IB_AW-1:0] ib_waddr; logic [127:0] ib_wdata;
  logic [11:0] simd_ib_addr;
  logic [127:0][7:0] ib_node_data;
  assign ib_we    = (res_we && in_region(res_addr, MAP_IB)) || (dma_wr_en && in_region(dma_wr_addr, MAP_IB));
  assign ib_waddr = (res_we && in_region(res_addr, MAP_IB)) ? IB_AW'(res_addr) : IB_AW'(dma_wr_addr);
  assign ib_wdata = (res_we && in_region(res_addr, MAP_IB)) ? res_data : dma_wr_data;
  hx_ib #(.NODES(IB_NODES), .COLS(128)) u_ib (
    .clk, .we(ib_we), .waddr(ib_waddr), .wdata(ib_wdata),
    .node_addr($clog2(IB_NODES)'(simd_ib_addr)), .node_data(ib_node_data),
    .wre(dma_rd_en && in_region(dma_rd_addr, MAP_IB)), .wraddr(IB_AW'(dma_rd_addr)), .wrdata(ib_wrdata));

  always_comb begin
    case (rsel_q)
      RS_OB:   dma_rd_data = ob_rdata;
      RS_IB:   dma_rd_data = ib_wrdata;
      default: dma_rd_data = smem_rdata;
    endcase
  end

  // ---------------- activation buffer and feeder ----------------
  logic              fd_start, fd_is_conv, fd_busy, ab_re;
  logic [9:0]        fd_count, fd_in_width;
  logic [AB_AW-1:0]  fd_base, ab_raddr;
  logic [3:0]        fd_kernel, fd_stride;
  logic [4:0]        fd_chans;
  logic [127:0]      ab_rdata;
  logic              act_valid, act_ready, act_last;
  logic [29:0][7:0]  act_data;

  hx_act_buffer #(.HALF_DEPTH(AB_HALF)) u_ab (
    .clk, .rst_n, .we(dma_wr_en && in_region(dma_wr_addr, MAP_AB)), .waddr(AB_AW'(dma_wr_addr)),
    .wdata(dma_wr_data), .re(ab_re), .raddr(ab_raddr), .rdata(ab_rdata),
    .rd_active(ex_busy), .rd_half(ex_ab_half));

  hx_feeder #(.BANKS(30), .ROWS(15), .AB_AW(AB_AW)) u_feed (
    .clk, .rst_n, .start(fd_start), .is_conv(fd_is_conv), .count(fd_count), .base(fd_base),
    .kernel(fd_kernel), .stride(fd_stride), .in_width(fd_in_width), .chans(fd_chans),
    .busy(fd_busy), .ab_re, .ab_addr(ab_raddr), .ab_data(ab_rdata),
    .act_valid, .act_ready, .act_last, .act_data, .token(feed_token));

  // ---------------- LIMC core ----------------
  logic [1:0]               limc_mode;
  logic                     limc_valid, limc_busy;
  logic signed [15:0][31:0] limc_data;

  limc_core #(.NMAC(16), .BANKS(30), .ROWS(15), .ACC_W(32)) u_limc (
    .clk, .rst_n,
    .wr_en(dma_wr_en && in_region(dma_wr_addr, MAP_LIMC)), .wr_bank(dma_wr_addr[9]),
    .wr_addr(dma_wr_addr[8:0]), .wr_data(dma_wr_data),
    .mode(limc_mode), .cmp_bank(ex_bank),
    .act_valid, .act_ready, .act_last, .act_data,
    .out_valid(limc_valid), .out_data(limc_data), .busy(limc_busy),
    .skip_iter_cnt(limc_skip_iter), .skip_digit_cnt(limc_skip_digit));

  // ---------------- sparse buffer and SIMD core ----------------
  logic        simd_start, simd_clear, simd_busy, simd_done, simd_relu;
  logic [12:0] simd_edges;
  logic [11:0] simd_eb_addr, simd_rd_node;
  logic [3:0]  simd_shift;
  logic [2:0]  simd_group;
  logic [31:0] sb_rdata;
  logic [127:0][7:0] simd_rd_data;

  hx_sb #(.ENTRIES(SB_ENTRIES)) u_sb (
    .clk, .we(dma_wr_en && in_region(dma_wr_addr, MAP_SB)), .waddr($clog2(SB_ENTRIES/4)'(dma_wr_addr)),
    .wdata(dma_wr_data), .raddr(SB_AW'(simd_eb_addr + SB_AW'(ex_instr.src))), .rdata(sb_rdata));

  simd_core #(.ROWS(16), .COLS(128), .ACC_W(24), .DEPTH(IB_NODES / 16), .EB_AW(SB_AW)) u_simd (
    .clk, .rst_n, .start(simd_start), .clear(simd_clear), .scale_en(1'b1), .num_edges(simd_edges),
    .busy(simd_busy), .done(simd_done), .eb_addr(simd_eb_addr), .eb_data(coo_t'(sb_rdata)),
    .ib_addr(simd_ib_addr), .ib_data(ib_node_data),
    .rd_node(simd_rd_node), .rd_relu(simd_relu), .rd_shift(simd_shift), .rd_data(simd_rd_data),
    .edge_cnt(simd_edge_cnt));

  // ---------------- execution sequencer ----------------
  hx_exec #(.NMAC(16), .ACC_W(32), .AB_AW(AB_AW)) u_exec (
    .clk, .rst_n, .start(ex_start), .instr(ex_instr), .busy(ex_busy), .bank(ex_bank), .ab_half(ex_ab_half),
    .fd_start, .fd_is_conv, .fd_count, .fd_base, .fd_kernel, .fd_stride, .fd_in_width, .fd_chans, .fd_busy,
    .limc_mode, .limc_valid, .limc_data, .limc_busy,
    .simd_start, .simd_clear, .simd_edges, .simd_done, .simd_rd_node, .simd_rd_relu(simd_relu),
    .simd_rd_shift(simd_shift), .simd_rd_data(simd_rd_data[16*simd_group +: 16]), .simd_rd_group(simd_group),
    .res_we, .res_addr, .res_data, .n_matmul, .n_agg);

  a_no_result_dma_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(res_we && dma_wr_en && res_addr[31:16] == dma_wr_addr[31:16]));

endmodule
