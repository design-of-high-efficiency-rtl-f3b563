// hx_ctrl: control logic and instruction sequencing of the heterogeneous
// accelerator.
//
// The host core writes the word address and length of a program in the global
// buffer (cfg_start, cfg_addr, cfg_count). The control logic first has the DMA copy
// the program into the instruction buffer, then fetches, decodes and issues the
// 128-bit instructions strictly in order. Load and Store go to the DMA; Matmul,
// Conv and Agg go to the execution sequencer. An instruction issues when its unit
// is free and it has no conflict with the work in progress:
//   - Load/Store wait for the DMA;
//   - a Load may run beside a computation only if it writes the LIMC copy that is
//     not computing (the ping-pong overlap) or the activation-buffer half that is
//     not being read (double buffering); any other Load, and every Store, waits
//     until the computation has finished;
//   - Matmul, Conv and Agg wait for both the DMA and the running computation.
// done pulses when the last instruction has completed. n_overlap counts Loads that
// ran beside a computation.
// In-order issue from an instruction buffer filled by the DMA follows the published
// design; the exact hazard rules are this design's reading of it.
module hx_ctrl
  import hx_pkg::*;
#(
  parameter int IBUF_DEPTH = 256,
  parameter int AB_AW      = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_start,
  input  logic [31:0]                   cfg_addr,
  input  logic [$clog2(IBUF_DEPTH):0]   cfg_count,
  output logic                          busy,
  output logic                          done,
  // instruction buffer read
  output logic                          ibuf_re,
  output logic [$clog2(IBUF_DEPTH)-1:0] ibuf_addr,
  input  logic [127:0]                  ibuf_data,
  // DMA
  output logic                          dma_start,
  output logic [31:0]                   dma_src,
  output logic [31:0]                   dma_dst,
  output logic [9:0]                    dma_count,
  input  logic                          dma_busy,
  // execution sequencer
  output logic                          ex_start,
  output comp_instr_t                   ex_instr,
  input  logic                          ex_busy,
  input  logic                          ex_bank,
  input  logic                          ex_ab_half,
  output logic [31:0]                   n_overlap,
  output logic [31:0]                   n_instr
);

  localparam int PW = $clog2(IBUF_DEPTH);

  typedef enum logic [2:0] {C_IDLE, C_LOADP, C_WAITP, C_FETCH, C_DEC, C_ISSUE, C_DRAIN} cstate_e;
  cstate_e              st;
  logic [PW:0]          pc, nins;
  logic [127:0]         iw;
  ldst_instr_t          li;
  comp_instr_t          ci;

  assign li = ldst_instr_t'(iw);
  assign ci = comp_instr_t'(iw);
  assign busy = (st != C_IDLE);
  assign ibuf_re   = (st == C_FETCH);
  assign ibuf_addr = pc[PW-1:0];

  // may this instruction issue now?
  logic can_issue, overlap;
  always_comb begin
    can_issue = 1'b0;
    overlap   = 1'b0;
    case (li.op)
      OP_LOAD: begin
        if (!dma_busy) begin
          if (!ex_busy) can_issue = 1'b1;
          else if (li.dst[31:16] == MAP_LIMC[31:16] && li.dst[9] != ex_bank) begin
            can_issue = 1'b1; overlap = 1'b1;
          end else if (li.dst[31:16] == MAP_AB[31:16] && li.dst[AB_AW-1] != ex_ab_half) begin
            can_issue = 1'b1; overlap = 1'b1;
          end
        end
      end
      OP_STORE:                     can_issue = !dma_busy && !ex_busy;
      OP_MATMUL, OP_CONV, OP_AGG:   can_issue = !dma_busy && !ex_busy;
      default:                      can_issue = 1'b1;   // NOP and unknown codes are skipped
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; pc <= '0; nins <= '0; iw <= '0; done <= 1'b0;
      dma_start <= 1'b0; dma_src <= '0; dma_dst <= '0; dma_count <= '0;
      ex_start <= 1'b0; ex_instr <= '0; n_overlap <= '0; n_instr <= '0;
    end else begin
      done <= 1'b0; dma_start <= 1'b0; ex_start <= 1'b0;
      case (st)
        C_IDLE: if (cfg_start) begin
          nins <= cfg_count;
          pc   <= '0;
          if (cfg_count == 0) done <= 1'b1;
          else st <= C_LOADP;
        end
        C_LOADP: if (!dma_busy) begin
          dma_start <= 1'b1;
          dma_src   <= cfg_addr;
          dma_dst   <= MAP_IBUF;
          dma_count <= 10'(nins);
          st        <= C_WAITP;
        end
        C_WAITP: if (!dma_start && !dma_busy) st <= C_FETCH;
        C_FETCH: st <= C_DEC;
        C_DEC: begin
          iw <= ibuf_data;
          st <= C_ISSUE;
        end
        C_ISSUE: if (can_issue) begin
          n_instr <= n_instr + 1;
          if (li.op == OP_LOAD || li.op == OP_STORE) begin
            dma_start <= 1'b1;
            dma_src   <= li.src;
            dma_dst   <= li.dst;
            dma_count <= li.count;
            if (overlap) n_overlap <= n_overlap + 1;
          end else if (li.op == OP_MATMUL || li.op == OP_CONV || li.op == OP_AGG) begin
            ex_start <= 1'b1;
            ex_instr <= ci;
          end
          pc <= pc + 1'b1;
          st <= (pc + 1'b1 == nins) ? C_DRAIN : C_FETCH;
        end
        C_DRAIN: if (!dma_start && !ex_start && !dma_busy && !ex_busy) begin
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
