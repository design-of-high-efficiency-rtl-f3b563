// tb_gcn_agg_core: self-checking test of the GCN core's aggregation scheduler.
//
// Builds edge-buffer programs (configuration word, EFFF memory reads, edges sorted
// by source group, end word) for a diagonal tile and then a non-diagonal tile, runs
// them, and compares the horizontal and vertical partial outputs with sums computed
// here. The core is built with 5 PE rows so that the non-diagonal tile (two rows per
// edge, 4 cycles each) must stall while the diagonal tile must not. The diagonal run
// is also timed: one cycle per entry, one extra per memory read, then one for the end word, PE_CYCLES to drain
// and one for done.
module tb_gcn_agg_core;
  localparam int R = 5, C = 8, M = 6, DN = 20, SN = 60, EBD = 256, ACC_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, clear, busy, done, eb_we, fm_re, vf_we;
  logic [7:0] eb_waddr; logic [31:0] eb_wdata;
  logic [15:0] fm_addr; logic [M-1:0][C-1:0][7:0] fm_data;
  logic [4:0] vf_waddr; logic [C-1:0][7:0] vf_wdata;
  logic [5:0] rd_node; logic [C-1:0][ACC_W-1:0] rd_h, rd_v;
  logic [31:0] n_edges, n_stall, n_vertical;

  gcn_agg_core #(.R(R), .C(C), .M(M), .DST_NODES(DN), .SRC_NODES(SN), .EB_DEPTH(EBD), .ACC_W(ACC_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source-feature memory model: address a holds nodes a*M .. a*M+M-1
  logic signed [7:0] feat [SN][C];
  logic signed [7:0] vfeat [DN][C];
  always @(posedge clk) if (fm_re)
    for (int b = 0; b < M; b++) for (int c = 0; c < C; c++) fm_data[b][c] <= feat[fm_addr * M + b][c];

  int exp_h [DN][C], exp_v [SN][C];

  task automatic run_tile(input bit nondiag, input int ne, output int cycles, output int nmem);
    int n, nent;
    n = 0;
    nmem = 0;
    for (int d = 0; d < DN; d++) for (int c = 0; c < C; c++) exp_h[d][c] = 0;
    for (int s = 0; s < SN; s++) for (int c = 0; c < C; c++) exp_v[s][c] = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    eb_we = 1;
    eb_waddr = 8'(n++); eb_wdata = {16'hFFFF, 15'd0, nondiag}; @(negedge clk);
    for (int g = 0; g < SN / M && n < EBD - 8; g++) begin
      int k;
      k = ne / (SN / M) + ($urandom % 2);
      if (k == 0) continue;
      eb_waddr = 8'(n++); eb_wdata = {16'hEFFF, 16'(g)}; nmem++; @(negedge clk);
      for (int j = 0; j < k; j++) begin
        int row, col;
        row = $urandom % DN; col = g * M + $urandom % M;
        eb_waddr = 8'(n++); eb_wdata = {16'(row), 16'(col)}; @(negedge clk);
        for (int c = 0; c < C; c++) begin
          exp_h[row][c] += feat[col][c];
          if (nondiag) exp_v[col][c] += vfeat[row][c];
        end
      end
    end
    nent = n;
    eb_waddr = 8'(n++); eb_wdata = 32'hFFFF_FFFF; @(negedge clk);
    eb_we = 0;
    start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    cycles = cycles + 0;
    for (int s = 0; s < SN; s++) begin
      rd_node = 6'(s); #1;
      for (int c = 0; c < C; c++) begin
        if (s < DN) begin
          checks++;
          if ($signed(rd_h[c]) != exp_h[s][c]) begin failures++; if (failures < 8) $display("h n%0d c%0d got %0d exp %0d", s, c, $signed(rd_h[c]), exp_h[s][c]); end
        end
        checks++;
        if ($signed(rd_v[c]) != exp_v[s][c]) begin failures++; if (failures < 8) $display("v n%0d c%0d got %0d exp %0d", s, c, $signed(rd_v[c]), exp_v[s][c]); end
      end
    end
    cycles = cycles - nent - nmem;   // cycles beyond one per entry and one per read
  endtask

  initial begin
    int cyc, nmem, e0, s0;
    start = 0; clear = 0; eb_we = 0; eb_waddr = 0; eb_wdata = 0; vf_we = 0; vf_waddr = 0; vf_wdata = 0; rd_node = 0;
    for (int s = 0; s < SN; s++) for (int c = 0; c < C; c++) feat[s][c] = 8'($urandom);
    for (int d = 0; d < DN; d++) for (int c = 0; c < C; c++) vfeat[d][c] = 8'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int d = 0; d < DN; d++) begin
      @(negedge clk); vf_we = 1; vf_waddr = 5'(d);
      for (int c = 0; c < C; c++) vf_wdata[c] = vfeat[d][c];
    end
    @(negedge clk); vf_we = 0;

    run_tile(0, 40, cyc, nmem);
    $display("diagonal: edges=%0d stalls=%0d extra cycles=%0d", n_edges, n_stall, cyc);
    checks++; if (n_stall != 0) begin failures++; $display("diagonal tile stalled"); end
    checks++; if (cyc != 4 + 2) begin failures++; $display("diagonal timing: %0d extra cycles, expected %0d", cyc, 6); end
    checks++; if (n_vertical != 0) failures++;
    e0 = n_edges; s0 = n_stall;
    run_tile(1, 40, cyc, nmem);
    $display("non-diagonal: edges=%0d stalls=%0d vertical=%0d", n_edges - e0, n_stall - s0, n_vertical);
    checks++; if (n_stall == s0) begin failures++; $display("non-diagonal tile never stalled"); end
    checks++; if (n_vertical != n_edges - e0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
