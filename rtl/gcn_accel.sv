// gcn_accel: aggregation datapath of the FPGA GCN accelerator with M cores.
//
// The destination nodes of a tile are split evenly over M cores; each core has its
// own edge buffer and vertical-feature memory (gcn_agg_core). Source-node features
// live in a banked memory with one bank per core: node n is stored in bank n % M at
// address n / M, and a core's EFFF read returns that address from every bank.
// start launches all cores at once; done pulses when the last one has finished.
// Horizontal partial outputs are read per core (rd_core, rd_node). The vertical
// partial outputs of all cores belong to the same nodes and are summed by the
// reduction engine, optionally with ReLU: rd_valid one cycle after rd_en gives
// red_data for rd_node.
// From the document: M cores sharing a banked source memory with M banks, per-core
// edge buffers and vertical memories, the reduction engine. This design's choices:
// each bank answers all cores in the same cycle (the document sizes the banks for
// parallel requests but does not say how conflicts resolve), the write ports, and
// leaving out the transformation mode, task scheduler, DMA and HBM interface.
module gcn_accel #(
  parameter int M         = 6,
  parameter int R         = 10,
  parameter int C         = 66,
  parameter int TILE      = 1020,
  parameter int EB_DEPTH  = 1024,
  parameter int ACC_W     = 16,
  parameter int DST_NODES = TILE / M,
  parameter int OUT_W     = ACC_W + $clog2(M) + 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic                            clear,
  output logic                            busy,
  output logic                            done,
  input  logic [M-1:0]                    eb_we,
  input  logic [$clog2(EB_DEPTH)-1:0]     eb_waddr,
  input  logic [31:0]                     eb_wdata,
  input  logic                            fm_we,
  input  logic [$clog2(TILE)-1:0]         fm_wnode,
  input  logic [C-1:0][7:0]               fm_wdata,
  input  logic [M-1:0]                    vf_we,
  input  logic [$clog2(DST_NODES)-1:0]    vf_waddr,
  input  logic [C-1:0][7:0]               vf_wdata,
  input  logic [$clog2(M)-1:0]            rd_core,
  input  logic [$clog2(TILE)-1:0]         rd_node,
  output logic [C-1:0][ACC_W-1:0]         rd_h,
  input  logic                            rd_en,
  input  logic                            rd_relu,
  output logic                            rd_valid,
  output logic [C-1:0][OUT_W-1:0]         red_data,
  output logic [31:0]                     n_edges,
  output logic [31:0]                     n_stall
);
  localparam int BD = (TILE + M - 1) / M;

  logic [C-1:0][7:0] bank [M][BD];
  always_ff @(posedge clk)
    if (fm_we) bank[fm_wnode % M][fm_wnode / M] <= fm_wdata;

  logic [M-1:0]                      c_busy, c_done, c_re, fin;
  logic [M-1:0][15:0]                c_addr;
  logic [M-1:0][M-1:0][C-1:0][7:0]   c_fm;
  logic [M-1:0][C-1:0][ACC_W-1:0]    c_h, c_v;
  logic [M-1:0][31:0]                c_edges, c_stall, c_vert;

  for (genvar k = 0; k < M; k++) begin : g_core
    always_ff @(posedge clk)
      if (c_re[k]) for (int b = 0; b < M; b++) c_fm[k][b] <= bank[b][c_addr[k] % BD];

    gcn_agg_core #(.R(R), .C(C), .M(M), .DST_NODES(DST_NODES), .SRC_NODES(TILE),
                   .EB_DEPTH(EB_DEPTH), .ACC_W(ACC_W)) u_core (
      .clk, .rst_n, .start, .clear, .busy(c_busy[k]), .done(c_done[k]),
      .eb_we(eb_we[k]), .eb_waddr, .eb_wdata,
      .fm_re(c_re[k]), .fm_addr(c_addr[k]), .fm_data(c_fm[k]),
      .vf_we(vf_we[k]), .vf_waddr, .vf_wdata,
      .rd_node, .rd_h(c_h[k]), .rd_v(c_v[k]),
      .n_edges(c_edges[k]), .n_stall(c_stall[k]), .n_vertical(c_vert[k]));
  end

  assign rd_h = c_h[rd_core];

  // all cores finished
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin <= '0; done <= 1'b0; busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin fin <= '0; busy <= 1'b1; end
      else if (busy) begin
        if ((fin | c_done) == '1) begin busy <= 1'b0; done <= 1'b1; end
        fin <= fin | c_done;
      end
    end
  end

  always_comb begin
    n_edges = '0; n_stall = '0;
    for (int k = 0; k < M; k++) begin n_edges += c_edges[k]; n_stall += c_stall[k]; end
  end

  gcn_reduction #(.M(M), .C(C), .ACC_W(ACC_W), .OUT_W(OUT_W)) u_red (
    .clk, .rst_n, .in_valid(rd_en), .in_po(c_v), .acc(1'b0), .in_prev('0), .relu(rd_relu),
    .out_valid(rd_valid), .out_data(red_data));
endmodule
