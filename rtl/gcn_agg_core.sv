// gcn_agg_core: aggregation side of one compute core of the FPGA GCN accelerator.
//
// A core owns an edge buffer of 32-bit entries that is read in order, one entry per
// cycle, by the aggregation scheduler. An entry whose upper 16 bits are FFFF is a
// configuration word (bit 0 of the lower half: 1 = non-diagonal tile, so vertical
// aggregation is computed as well); EFFF is a memory read: the lower half is an
// address of the banked source-feature memory, and the features stored at that
// address in all M banks (source nodes addr*M .. addr*M+M-1) are copied into the
// core's local buffer; FFFFFFFF ends the list. Any other entry is an edge
// {row[31:16], col[15:0]}.
// Adjacency entries are ones, so aggregation is addition only. For an edge the
// horizontal aggregation adds source col's features (local buffer, bank col % M) to
// destination row; on a non-diagonal tile the vertical aggregation also adds
// destination row's features (the core's own vertical-feature memory) to node col.
// Each addition occupies one PE row for PE_CYCLES (4) cycles. The scheduler gives an
// edge a free PE row (two for a non-diagonal tile); when none is free it stalls.
// A PE row writes its result into the horizontal or vertical partial-output store
// when it finishes; stores are cleared with clear and read through rd_*.
// Timing: entry i is fetched from edge-buffer address i; an EFFF read costs one extra
// cycle for the feature memory's read latency; with 1 edge per cycle a stall needs
// fewer than 4 (diagonal) or 8 (non-diagonal) PE rows. done comes PE_CYCLES + 2
// cycles after the end word is reached.
// From the document: entry codes, banked source memory and local buffer, per-core
// vertical-feature memory, 4 cycles per edge, free-row check and stall, the
// two-row rule, R = 10 PE rows of C = 66 lanes. This design's choices: the config
// word's bit meaning, 16-bit accumulators, tile-local node numbering, the ports.
module gcn_agg_core #(
  parameter int R         = 10,    // PE rows
  parameter int C         = 66,    // PEs per row (feature lanes)
  parameter int M         = 6,     // cores = source-memory banks
  parameter int DST_NODES = 170,   // destination nodes of this core in a tile
  parameter int SRC_NODES = 1020,  // nodes in a tile (vertical destinations)
  parameter int EB_DEPTH  = 1024,
  parameter int PE_CYCLES = 4,
  parameter int ACC_W     = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              clear,
  output logic                              busy,
  output logic                              done,
  // edge buffer (written by the task scheduler)
  input  logic                              eb_we,
  input  logic [$clog2(EB_DEPTH)-1:0]       eb_waddr,
  input  logic [31:0]                       eb_wdata,
  // banked source-feature memory, 1-cycle read latency
  output logic                              fm_re,
  output logic [15:0]                       fm_addr,
  input  logic [M-1:0][C-1:0][7:0]          fm_data,
  // vertical-feature memory of this core
  input  logic                              vf_we,
  input  logic [$clog2(DST_NODES)-1:0]      vf_waddr,
  input  logic [C-1:0][7:0]                 vf_wdata,
  // partial-output read
  input  logic [$clog2(SRC_NODES)-1:0]      rd_node,
  output logic [C-1:0][ACC_W-1:0]           rd_h,
  output logic [C-1:0][ACC_W-1:0]           rd_v,
  // statistics
  output logic [31:0]                       n_edges,
  output logic [31:0]                       n_stall,
  output logic [31:0]                       n_vertical
);
  localparam int EAW = $clog2(EB_DEPTH);
  localparam int DAW = $clog2(DST_NODES);
  localparam int SAW = $clog2(SRC_NODES);
  localparam int PCW = $clog2(PE_CYCLES + 1);

  logic [31:0] eb [EB_DEPTH];
  always_ff @(posedge clk) if (eb_we) eb[eb_waddr] <= eb_wdata;

  logic [C-1:0][7:0] vfm [DST_NODES];
  always_ff @(posedge clk) if (vf_we) vfm[vf_waddr] <= vf_wdata;

  // ---------------- scheduler ----------------
  typedef enum logic [1:0] {A_IDLE, A_RUN, A_MEM, A_DRAIN} astate_e;
  astate_e           st;
  logic [EAW-1:0]    pc;
  logic              nondiag;
  logic [M-1:0][C-1:0][7:0] lbuf;
  logic [31:0]       ent;
  assign ent = eb[pc];

  // PE rows
  logic [R-1:0]             row_busy;
  logic [R-1:0][PCW-1:0]    row_cnt;
  logic [R-1:0]             row_vert;
  logic [R-1:0][SAW-1:0]    row_dst;
  logic [R-1:0][C-1:0][7:0] row_opd;

  // first two free rows
  logic [$clog2(R)-1:0] f0, f1;
  logic                 has0, has1;
  always_comb begin
    has0 = 1'b0; has1 = 1'b0; f0 = '0; f1 = '0;
    for (int r = 0; r < R; r++) begin
      if (!row_busy[r]) begin
        if (!has0) begin has0 = 1'b1; f0 = $clog2(R)'(r); end
        else if (!has1) begin has1 = 1'b1; f1 = $clog2(R)'(r); end
      end
    end
  end

  logic is_cfg, is_mem, is_end, is_edge, can_issue, issue;
  assign is_end    = (ent == 32'hFFFF_FFFF);
  assign is_cfg    = (ent[31:16] == 16'hFFFF) && !is_end;
  assign is_mem    = (ent[31:16] == 16'hEFFF);
  assign is_edge   = !is_end && !is_cfg && !is_mem;
  assign can_issue = nondiag ? (has0 && has1) : has0;
  assign issue     = (st == A_RUN) && is_edge && can_issue;
  assign fm_re     = (st == A_RUN) && is_mem;
  assign fm_addr   = ent[15:0];
  assign busy      = (st != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; pc <= '0; nondiag <= 1'b0; done <= 1'b0;
      n_edges <= '0; n_stall <= '0; n_vertical <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        A_IDLE: if (start) begin st <= A_RUN; pc <= '0; end
        A_RUN: begin
          if (is_end) st <= A_DRAIN;
          else if (is_cfg) begin nondiag <= ent[0]; pc <= pc + 1'b1; end
          else if (is_mem) begin st <= A_MEM; pc <= pc + 1'b1; end
          else if (can_issue) begin
            pc <= pc + 1'b1; n_edges <= n_edges + 1;
            if (nondiag) n_vertical <= n_vertical + 1;
          end else n_stall <= n_stall + 1;
        end
        A_MEM: st <= A_RUN;    // local buffer is loaded at the end of this cycle
        A_DRAIN: if (row_busy == '0) begin st <= A_IDLE; done <= 1'b1; end
        default: st <= A_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) if (st == A_MEM) lbuf <= fm_data;

  // ---------------- PE rows and partial outputs ----------------
  logic [C-1:0][ACC_W-1:0] po_h [DST_NODES];
  logic [C-1:0][ACC_W-1:0] po_v [SRC_NODES];
  logic [DST_NODES-1:0]    val_h;
  logic [SRC_NODES-1:0]    val_v;

  logic [$clog2(M)-1:0] sbank;
  assign sbank = $clog2(M)'(ent[15:0] % M);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_busy <= '0; row_cnt <= '0; row_vert <= '0; row_dst <= '0;
    end else begin
      for (int r = 0; r < R; r++)
        if (row_busy[r]) begin
          row_cnt[r] <= row_cnt[r] + 1'b1;
          if (row_cnt[r] == PCW'(PE_CYCLES - 1)) row_busy[r] <= 1'b0;
        end
      if (issue) begin
        row_busy[f0] <= 1'b1; row_cnt[f0] <= '0; row_vert[f0] <= 1'b0;
        row_dst[f0]  <= SAW'(ent[31:16]);
        if (nondiag) begin
          row_busy[f1] <= 1'b1; row_cnt[f1] <= '0; row_vert[f1] <= 1'b1;
          row_dst[f1]  <= SAW'(ent[15:0]);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      row_opd[f0] <= lbuf[sbank];
      if (nondiag) row_opd[f1] <= vfm[DAW'(ent[31:16])];
    end
  end

  // write-back when a row finishes: at most one horizontal and one vertical per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_h <= '0; val_v <= '0;
    end else if (clear) begin
      val_h <= '0; val_v <= '0;
    end else begin
      for (int r = 0; r < R; r++)
        if (row_busy[r] && row_cnt[r] == PCW'(PE_CYCLES - 1)) begin
          if (row_vert[r]) val_v[row_dst[r]] <= 1'b1;
          else             val_h[DAW'(row_dst[r])] <= 1'b1;
        end
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < R; r++)
      if (row_busy[r] && row_cnt[r] == PCW'(PE_CYCLES - 1)) begin
        for (int c = 0; c < C; c++) begin
          if (row_vert[r])
            po_v[row_dst[r]][c] <= (val_v[row_dst[r]] ? po_v[row_dst[r]][c] : '0) + ACC_W'($signed(row_opd[r][c]));
          else
            po_h[DAW'(row_dst[r])][c] <= (val_h[DAW'(row_dst[r])] ? po_h[DAW'(row_dst[r])][c] : '0) + ACC_W'($signed(row_opd[r][c]));
        end
      end
  end

  always_comb begin
    for (int c = 0; c < C; c++) begin
      rd_h[c] = (rd_node < SAW'(DST_NODES) && val_h[DAW'(rd_node)]) ? po_h[DAW'(rd_node)][c] : '0;
      rd_v[c] = val_v[rd_node] ? po_v[rd_node][c] : '0;
    end
  end

  // an edge's source must lie in the group held by the local buffer
  logic [15:0] lb_addr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lb_addr <= '0; else if (fm_re) lb_addr <= fm_addr;
  a_src_in_local_buffer: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (ent[15:0] / M == lb_addr));
  a_dst_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (ent[31:16] < DST_NODES && ent[15:0] < SRC_NODES));
endmodule
