// limc_pp_tree: Booth partial products of one LIMC column and their adder tree.
//
// For each of the BANKS banks the shared Booth encoder supplies one radix-4 digit
// (0, +W, +2W, -W, -2W); this block forms the partial product of the bank's weight,
// shifted by two bits per digit position, and sums all banks in a pipelined binary
// adder tree of $clog2(BANKS) levels (five levels for 30 banks, the published
// "5 stage adder"). Digits 000/111 give a zero product: that is the fine-grained
// operation skip. The precision mode picks the low nibble (01), the high nibble (10)
// or the whole byte (00/11) of each weight, as in the published bank diagram.
//
// Timing: in_valid/in_last enter with the digits; sum_valid/sum_last come out
// $clog2(BANKS) cycles later with the sum. One digit set per cycle, no stalls.
// Register-per-level tree and the signed interpretation are this design's choices.
module limc_pp_tree
  import hx_pkg::*;
#(
  parameter int BANKS = 30,
  parameter int ACC_W = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_last,
  input  logic [1:0]                    mode,
  input  logic [1:0]                    digit_pos,   // Booth digit index: shift by 2*digit_pos
  input  pp_sel_e [BANKS-1:0]           sel,
  input  logic [BANKS-1:0][7:0]         w,
  output logic                          sum_valid,
  output logic                          sum_last,
  output logic signed [ACC_W-1:0]       sum
);

  localparam int LEVELS = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int P2     = 1 << LEVELS;

  logic signed [ACC_W-1:0] lvl [LEVELS+1][P2];
  logic [LEVELS:0]         vpipe, lpipe;

  // Level 0: partial products.
  always_comb begin
    for (int b = 0; b < P2; b++) begin
      lvl[0][b] = '0;
      if (b < BANKS) begin
        logic signed [ACC_W-1:0] wv;
        wv = ACC_W'(nibble_sel(w[b], mode));
        case (sel[b])
          PP_P1:   lvl[0][b] = wv;
          PP_P2:   lvl[0][b] = wv <<< 1;
          PP_M1:   lvl[0][b] = -wv;
          PP_M2:   lvl[0][b] = -(wv <<< 1);
          default: lvl[0][b] = '0;
        endcase
        lvl[0][b] = lvl[0][b] <<< (2 * digit_pos);
      end
    end
    vpipe[0] = in_valid;
    lpipe[0] = in_last;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vpipe[l+1] <= 1'b0;
        lpipe[l+1] <= 1'b0;
      end else begin
        vpipe[l+1] <= vpipe[l];
        lpipe[l+1] <= lpipe[l];
      end
    end
    always_ff @(posedge clk) begin
      for (int j = 0; j < P2 / 2; j++) lvl[l+1][j] <= lvl[l][2*j] + lvl[l][2*j+1];
      for (int j = P2 / 2; j < P2; j++) lvl[l+1][j] <= '0;
    end
  end

  assign sum       = lvl[LEVELS][0];
  assign sum_valid = vpipe[LEVELS];
  assign sum_last  = lpipe[LEVELS];

endmodule
