// hx_pkg: shared types and constants of the heterogeneous LIMC + SIMD accelerator.
//
// The accelerator runs five 128-bit instructions (Load, Store, Matmul, Conv, Agg)
// fetched in order from an instruction buffer. Opcode values and the Load/Store field
// layout (4-bit opcode, 32-bit source address, 32-bit destination address, 10-bit
// transfer count, upper bits zero) follow the published instruction table and figure.
// The fields of Matmul, Conv and Agg are not published; the layout below is this
// design's own choice. Addresses are 128-bit word addresses in a flat memory map,
// also this design's own choice.
package hx_pkg;

  // Opcodes (4-bit field, the published 3-bit codes zero-extended).
  typedef enum logic [3:0] {
    OP_NOP    = 4'b0000,
    OP_LOAD   = 4'b0001,
    OP_STORE  = 4'b0010,
    OP_MATMUL = 4'b0011,
    OP_CONV   = 4'b0100,
    OP_AGG    = 4'b0101
  } opcode_e;

  // Load / Store layout: [3:0] opcode, [35:4] source, [67:36] destination,
  // [77:68] number of 128-bit transfers, [127:78] zero.
  typedef struct packed {
    logic [49:0] zero;
    logic [9:0]  count;
    logic [31:0] dst;
    logic [31:0] src;
    opcode_e     op;
  } ldst_instr_t;

  // Compute layout (own choice): [3:0] opcode, [35:4] source (activation buffer word
  // or sparse buffer entry), [67:36] destination (output buffer word), [77:68] number
  // of activation rows or edges, [79:78] LIMC precision mode, [80] LIMC bank select
  // (0 ping, 1 pong), [81] ReLU at the output, [85:82] output right shift,
  // [89:86] conv kernel size, [93:90] conv stride, [103:94] conv input width (Conv)
  // or number of nodes to read out (Agg), [108:104] conv input channels,
  // [127:109] zero.
  typedef struct packed {
    logic [18:0] zero;
    logic [4:0]  chans;
    logic [9:0]  in_width;
    logic [3:0]  stride;
    logic [3:0]  kernel;
    logic [3:0]  shift;
    logic        relu;
    logic        bank;
    logic [1:0]  mode;
    logic [9:0]  count;
    logic [31:0] dst;
    logic [31:0] src;
    opcode_e     op;
  } comp_instr_t;

  // Memory map, in 128-bit words (own choice).
  localparam logic [31:0] MAP_SMEM  = 32'h0000_0000; // global buffer, 512 KB = 32768 words
  localparam logic [31:0] MAP_LIMC  = 32'h0001_0000; // +0..449 ping, +512..961 pong
  localparam logic [31:0] MAP_AB    = 32'h0002_0000; // activation buffer
  localparam logic [31:0] MAP_IB    = 32'h0003_0000; // intermediate buffer (node features)
  localparam logic [31:0] MAP_SB    = 32'h0004_0000; // sparse (edge) buffer, 4 COO entries per word
  localparam logic [31:0] MAP_OB    = 32'h0005_0000; // output buffer
  localparam logic [31:0] MAP_IBUF  = 32'h0006_0000; // instruction buffer

  // 32-bit COO entry of the sparse buffer (own choice): value, destination, source.
  typedef struct packed {
    logic signed [7:0] val;
    logic [11:0]       dst;
    logic [11:0]       src;
  } coo_t;

  // Radix-4 (modified) Booth digit: partial product select.
  typedef enum logic [2:0] {
    PP_ZERO = 3'd0, PP_P1 = 3'd1, PP_P2 = 3'd2, PP_M1 = 3'd3, PP_M2 = 3'd4
  } pp_sel_e;

  function automatic pp_sel_e booth_decode(input logic [2:0] tri_bits);
    case (tri_bits)
      3'b001, 3'b010: return PP_P1;
      3'b011:         return PP_P2;
      3'b100:         return PP_M2;
      3'b101, 3'b110: return PP_M1;
      default:        return PP_ZERO; // 000 and 111: operation skipped
    endcase
  endfunction

  // Precision mode: 01 low nibble, 10 high nibble, 00/11 full byte (signed).
  function automatic logic signed [7:0] nibble_sel(input logic [7:0] v, input logic [1:0] mode);
    case (mode)
      2'b01:   return {{4{v[3]}}, v[3:0]};
      2'b10:   return {{4{v[7]}}, v[7:4]};
      default: return v;
    endcase
  endfunction

endpackage
