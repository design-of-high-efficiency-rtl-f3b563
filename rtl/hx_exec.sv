// hx_exec: execution sequencer for the compute instructions of the heterogeneous
// accelerator (Matmul and Conv on the LIMC core, Agg on the SIMD core).
//
// Matmul / Conv: starts the activation feeder with the instruction's source,
// count and convolution fields, holds the LIMC precision mode and ping/pong select
// for the whole instruction, and writes every LIMC result (16 column sums) back as
// one 128-bit word of 16 bytes after an arithmetic right shift, optional ReLU and
// saturation. Result r goes to dst + 8*r when dst is in the intermediate buffer
// (node r, the 16 features of one column group, so the SIMD core can aggregate it
// next) and to dst + r otherwise (output buffer).
//
// Agg: clears the SIMD scratch pads, runs one pass over count COO entries of the
// sparse buffer (scaled by the edge values), then reads out in_width nodes, eight
// 128-bit words per node, to dst + 8*node + group, with the instruction's ReLU and
// shift.
//
// busy rises the cycle after start and falls when the last result word is written.
// The write-back formats are this design's choices; which unit runs which
// instruction follows the published instruction table.
module hx_exec
  import hx_pkg::*;
#(
  parameter int NMAC  = 16,
  parameter int ACC_W = 32,
  parameter int AB_AW = 11
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  comp_instr_t                       instr,
  output logic                              busy,
  output logic                              bank,       // LIMC copy in use
  output logic                              ab_half,    // activation-buffer half in use
  // feeder
  output logic                              fd_start,
  output logic                              fd_is_conv,
  output logic [9:0]                        fd_count,
  output logic [AB_AW-1:0]                  fd_base,
  output logic [3:0]                        fd_kernel,
  output logic [3:0]                        fd_stride,
  output logic [9:0]                        fd_in_width,
  output logic [4:0]                        fd_chans,
  input  logic                              fd_busy,
  // LIMC
  output logic [1:0]                        limc_mode,
  input  logic                              limc_valid,
  input  logic signed [NMAC-1:0][ACC_W-1:0] limc_data,
  input  logic                              limc_busy,
  // SIMD
  output logic                              simd_start,
  output logic                              simd_clear,
  output logic [12:0]                       simd_edges,
  input  logic                              simd_done,
  output logic [11:0]                       simd_rd_node,
  output logic                              simd_rd_relu,
  output logic [3:0]                        simd_rd_shift,
  input  logic [127:0]                      simd_rd_data,   // selected column group
  output logic [2:0]                        simd_rd_group,
  // result write
  output logic                              res_we,
  output logic [31:0]                       res_addr,
  output logic [127:0]                      res_data,
  output logic [31:0]                       n_matmul,
  output logic [31:0]                       n_agg
);

  typedef enum logic [2:0] {X_IDLE, X_MM, X_CLR, X_AGG, X_AGGW, X_DRAIN} xstate_e;
  xstate_e     st;
  comp_instr_t iq;
  logic [9:0]  res_cnt;
  logic [12:0] drain_cnt;     // node*8 + group
  logic        dst_is_ib;

  assign dst_is_ib = (iq.dst[31:16] == MAP_IB[31:16]);
  assign busy      = (st != X_IDLE);
  assign bank      = iq.bank;
  assign ab_half   = iq.src[AB_AW-1];

  assign fd_is_conv  = (iq.op == OP_CONV);
  assign fd_count    = iq.count;
  assign fd_base     = AB_AW'(iq.src - MAP_AB);
  assign fd_kernel   = iq.kernel;
  assign fd_stride   = iq.stride;
  assign fd_in_width = iq.in_width;
  assign fd_chans    = iq.chans;
  assign limc_mode   = iq.mode;

  assign simd_edges    = 13'(iq.count);
  assign simd_rd_node  = 12'(drain_cnt[12:3]);
  assign simd_rd_group = drain_cnt[2:0];
  assign simd_rd_relu  = iq.relu;
  assign simd_rd_shift = iq.shift;

  // requantised LIMC word
  logic [127:0] mm_word;
  always_comb begin
    for (int m = 0; m < NMAC; m++) begin
      logic signed [ACC_W-1:0] v;
      v = $signed(limc_data[m]) >>> iq.shift;
      if (iq.relu && v < 0) v = '0;
      if (v > 127)       mm_word[8*m +: 8] = 8'h7f;
      else if (v < -128) mm_word[8*m +: 8] = 8'h80;
      else               mm_word[8*m +: 8] = v[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= X_IDLE; iq <= '0; res_cnt <= '0; drain_cnt <= '0;
      fd_start <= 1'b0; simd_start <= 1'b0; simd_clear <= 1'b0;
      res_we <= 1'b0; res_addr <= '0; res_data <= '0; n_matmul <= '0; n_agg <= '0;
    end else begin
      fd_start <= 1'b0; simd_start <= 1'b0; simd_clear <= 1'b0; res_we <= 1'b0;
      case (st)
        X_IDLE: if (start) begin
          iq      <= instr;
          res_cnt <= '0;
          if (instr.op == OP_MATMUL || instr.op == OP_CONV) begin
            st <= X_MM; fd_start <= 1'b1; n_matmul <= n_matmul + 1;
          end else if (instr.op == OP_AGG) begin
            st <= X_CLR; simd_clear <= 1'b1; n_agg <= n_agg + 1;
          end
        end
        X_MM: begin
          if (limc_valid) begin
            res_we   <= 1'b1;
            res_addr <= dst_is_ib ? iq.dst + {19'd0, res_cnt, 3'd0} : iq.dst + {22'd0, res_cnt};
            res_data <= mm_word;
            res_cnt  <= res_cnt + 1'b1;
          end
          if (res_cnt == iq.count && !fd_busy && !limc_busy) st <= X_IDLE;
        end
        X_CLR: begin
          simd_start <= 1'b1;
          st <= X_AGG;
        end
        X_AGG: st <= X_AGGW;    // SIMD busy is visible from here on
        X_AGGW: if (simd_done || iq.count == 0) begin
          drain_cnt <= '0;
          st <= (iq.in_width == 0) ? X_IDLE : X_DRAIN;
        end
        X_DRAIN: begin
          res_we    <= 1'b1;
          res_addr  <= iq.dst + {19'd0, drain_cnt};
          res_data  <= simd_rd_data;
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == {iq.in_width - 10'd1, 3'd7}) st <= X_IDLE;
        end
        default: st <= X_IDLE;
      endcase
    end
  end

endmodule
