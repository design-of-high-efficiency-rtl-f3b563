// tb_limc_core: self-checking test of the ping-pong LIMC core.
// Loads random signed weights into ping, computes dot products of random activation
// vectors (with whole zero iterations to exercise the coarse skip) in 8-bit and
// 4-bit modes, writes pong while ping computes, then computes on pong. Results are
// compared with a plain multiply-accumulate model; the cycle count of a vector is
// checked against 4 cycles per non-zero iteration (2 in 4-bit mode), 1 per
// skipped iteration (2 right after a computed one), the tree depth and 1 for the
// accumulator.
module tb_limc_core;
  import hx_pkg::*;
  localparam int NMAC = 16, BANKS = 30, ROWS = 15, ACC_W = 32;
  localparam int K = BANKS * ROWS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en, wr_bank; logic [$clog2(K)-1:0] wr_addr; logic [NMAC-1:0][7:0] wr_data;
  logic [1:0] mode; logic cmp_bank;
  logic act_valid, act_ready, act_last; logic [BANKS-1:0][7:0] act_data;
  logic out_valid; logic signed [NMAC-1:0][ACC_W-1:0] out_data; logic busy;
  logic [31:0] skip_iter_cnt, skip_digit_cnt;

  limc_core dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] W [2][NMAC][K];
  logic [7:0] A [K];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_bank(input int bank);
    for (int k = 0; k < K; k++) begin
      wr_en <= 1; wr_bank <= bank[0]; wr_addr <= k[$clog2(K)-1:0];
      for (int m = 0; m < NMAC; m++) begin
        W[bank][m][k] = 8'($urandom);
        wr_data[m] <= W[bank][m][k];
      end
      @(posedge clk);
    end
    wr_en <= 0;
  endtask

  function automatic int sx(input logic [7:0] v, input logic [1:0] md);
    return int'(nibble_sel(v, md));
  endfunction

  // run one vector; returns cycles from first beat accepted to out_valid
  task automatic run_vector(input int bank, input logic [1:0] md, input int zero_iters);
    int exp_cyc, t0, nz;
    longint expv [NMAC];
    mode <= md; cmp_bank <= bank[0];
    for (int k = 0; k < K; k++) A[k] = 8'($urandom);
    // zero some whole iterations
    for (int z = 0; z < zero_iters; z++) begin
      int it = (z * 4) % ROWS;
      for (int b = 0; b < BANKS; b++) A[b*ROWS + it] = 0;
    end
    for (int m = 0; m < NMAC; m++) begin
      expv[m] = 0;
      for (int k = 0; k < K; k++) expv[m] += longint'(sx(W[bank][m][k], md) * sx(A[k], md));
    end
    nz = 0; exp_cyc = 0;
    for (int i = 0; i < ROWS; i++) begin
      bit allz = 1;
      for (int b = 0; b < BANKS; b++) if (sx(A[b*ROWS+i], md) != 0) allz = 0;
      exp_cyc += allz ? 1 : ((md == 2'b01 || md == 2'b10) ? 2 : 4);
      // a skipped iteration waits one more cycle when digits were still in progress
      if (allz && i > 0) begin
        bit prevz = 1;
        for (int b = 0; b < BANKS; b++) if (sx(A[b*ROWS+i-1], md) != 0) prevz = 0;
        if (!prevz) exp_cyc += 1;
      end
    end
    @(negedge clk);
    t0 = 0;
    for (int i = 0; i < ROWS; i++) begin
      act_valid = 1; act_last = (i == ROWS-1);
      for (int b = 0; b < BANKS; b++) act_data[b] = A[b*ROWS + i];
      #1;
      while (!act_ready) begin @(negedge clk); #1; end
      @(posedge clk);   // beat accepted on this edge
      if (i == 0) t0 = $time / 10;
      @(negedge clk);
    end
    act_valid = 0;
    while (!out_valid) @(posedge clk);
    // exp: issue cycles + tree levels + accumulate register
    checks++;
    if (($time/10 - t0) != exp_cyc + $clog2(BANKS) + 1) begin
      failures++;
      $display("cycle mismatch: got %0d exp %0d", $time/10 - t0, exp_cyc + $clog2(BANKS) + 1);
    end
    for (int m = 0; m < NMAC; m++) begin
      checks++;
      if (out_data[m] != ACC_W'(expv[m])) begin
        failures++;
        $display("col %0d mismatch got %0d exp %0d", m, out_data[m], expv[m]);
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_bank = 0; wr_addr = 0; wr_data = '0; mode = 0; cmp_bank = 0;
    act_valid = 0; act_last = 0; act_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    write_bank(0);
    run_vector(0, 2'b00, 0);
    run_vector(0, 2'b00, 3);
    run_vector(0, 2'b01, 2);
    run_vector(0, 2'b10, 0);
    // ping-pong: load pong while ping computes
    fork
      run_vector(0, 2'b00, 1);
      write_bank(1);
    join
    run_vector(1, 2'b00, 0);
    run_vector(1, 2'b11, 4);
    checks++;
    if (skip_iter_cnt == 0 || skip_digit_cnt == 0) begin
      failures++; $display("skip counters did not move");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
