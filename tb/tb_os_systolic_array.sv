// tb_os_systolic_array: self-checking test of the output-stationary systolic array
// at its default 32 x 24 shape. Two random signed matrix products (K = 20 and K = 7,
// with a clear in between) are compared element by element with a direct triple
// loop, and the time from the last input step to done is checked against
// ROWS + COLS + 1 cycles (skew, array depth and the done register).
module tb_os_systolic_array;
  localparam int ROWS = 32, COLS = 24, A_W = 8, B_W = 4, ACC_W = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid, done;
  logic signed [ROWS-1:0][A_W-1:0] a_in;
  logic signed [COLS-1:0][B_W-1:0] b_in;
  logic signed [ROWS-1:0][COLS-1:0][ACC_W-1:0] acc;

  os_systolic_array dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [A_W-1:0] A [ROWS][64];
  logic signed [B_W-1:0] B [64][COLS];

  task automatic run(input int K);
    int t_last, t_done;
    for (int r = 0; r < ROWS; r++) for (int k = 0; k < K; k++) A[r][k] = A_W'($urandom);
    for (int k = 0; k < K; k++) for (int c = 0; c < COLS; c++) B[k][c] = B_W'($urandom);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < K; k++) begin
      in_valid = 1;
      for (int r = 0; r < ROWS; r++) a_in[r] = A[r][k];
      for (int c = 0; c < COLS; c++) b_in[c] = B[k][c];
      @(posedge clk); t_last = $time / 10; @(negedge clk);
    end
    in_valid = 0; a_in = '0; b_in = '0;
    while (!done) @(posedge clk);
    t_done = $time / 10;
    checks++;
    if (t_done - t_last != ROWS + COLS + 1) begin
      failures++; $display("done after %0d cycles", t_done - t_last);
    end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      int s = 0;
      for (int k = 0; k < K; k++) s += int'(A[r][k]) * int'(B[k][c]);
      checks++;
      if (acc[r][c] != ACC_W'(s)) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d) got %0d exp %0d", r, c, acc[r][c], s);
      end
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; a_in = '0; b_in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    run(20);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
