// os_systolic_array: output-stationary systolic array for matrix multiplication.
//
// ROWS x COLS processing elements. Row r of the left operand enters at the left edge
// of array row r and moves one PE to the right per cycle; column c of the right
// operand enters at the top of array column c and moves one PE down per cycle. PE
// (r, c) multiplies the two values passing through it and keeps the sum, so after K
// input steps it holds element (r, c) of the ROWS x COLS product. The array skews
// the inputs itself (row r delayed r cycles, column c delayed c cycles), so the
// caller presents one K-slice of both operands per cycle, unskewed. Used for the
// patch-embedding convolution and the window attention of the vision-transformer
// cores, where convolutions are presented as matrix products.
//
// Interface: clear zeroes all accumulators; in_valid with a_in (ROWS values of the
// left operand, signed A_W bits) and b_in (COLS values of the right operand, signed
// B_W bits) is one K step. The products are complete ROWS+COLS cycles after the
// last step (done pulses one cycle later) and are read through acc, all in parallel, which is
// how the outputs of each systolic unit can be taken out at once. Activation and
// weight widths (8-bit activations, 4-bit weights) and the accumulator width are
// this design's reading of the quantised model; the array shape is a parameter.
module os_systolic_array #(
  parameter int ROWS  = 32,
  parameter int COLS  = 24,
  parameter int A_W   = 8,
  parameter int B_W   = 4,
  parameter int ACC_W = 24
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          clear,
  input  logic                                          in_valid,
  input  logic signed [ROWS-1:0][A_W-1:0]               a_in,
  input  logic signed [COLS-1:0][B_W-1:0]               b_in,
  output logic                                          done,
  output logic signed [ROWS-1:0][COLS-1:0][ACC_W-1:0]   acc
);

  // skew registers: row r delayed r cycles, column c delayed c cycles
  logic signed [A_W-1:0] a_pipe [ROWS][COLS];    // value at PE (r,c) left input
  logic signed [B_W-1:0] b_pipe [ROWS][COLS];    // value at PE (r,c) top input
  logic                  v_pipe [ROWS][COLS];
  logic signed [A_W-1:0] a_skew [ROWS][ROWS];
  logic signed [B_W-1:0] b_skew [COLS][COLS];
  logic                  va_skew [ROWS][ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) for (int k = 0; k < ROWS; k++) begin
        a_skew[r][k] <= '0; va_skew[r][k] <= 1'b0;
      end
      for (int c = 0; c < COLS; c++) for (int k = 0; k < COLS; k++) b_skew[c][k] <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        a_skew[r][0]  <= in_valid ? a_in[r] : '0;
        va_skew[r][0] <= in_valid;
        for (int k = 1; k < ROWS; k++) begin
          a_skew[r][k]  <= a_skew[r][k-1];
          va_skew[r][k] <= va_skew[r][k-1];
        end
      end
      for (int c = 0; c < COLS; c++) begin
        b_skew[c][0] <= in_valid ? b_in[c] : '0;
        for (int k = 1; k < COLS; k++) b_skew[c][k] <= b_skew[c][k-1];
      end
    end
  end

  // PE grid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        a_pipe[r][c] <= '0; b_pipe[r][c] <= '0; v_pipe[r][c] <= 1'b0; acc[r][c] <= '0;
      end
    end else begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        logic signed [A_W-1:0] a_l;
        logic signed [B_W-1:0] b_t;
        a_l = (c == 0) ? a_skew[r][r] : a_pipe[r][c-1];
        b_t = (r == 0) ? b_skew[c][c] : b_pipe[r-1][c];
        a_pipe[r][c] <= a_l;
        b_pipe[r][c] <= b_t;
        v_pipe[r][c] <= (c == 0) ? va_skew[r][r] : v_pipe[r][c-1];
        if (clear) acc[r][c] <= '0;
        else       acc[r][c] <= acc[r][c] + ACC_W'(a_l * b_t);
      end
    end
  end

  // the bottom-right PE sees the last step ROWS+COLS-1 cycles after it enters
  logic last_v_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_v_q <= 1'b0;
    else        last_v_q <= v_pipe[ROWS-1][COLS-1];
  end
  assign done = last_v_q && !v_pipe[ROWS-1][COLS-1];

endmodule
