// tb_gcn_accel: self-checking test of the multi-core GCN aggregation datapath.
//
// Writes source features into the banked memory and vertical features into every
// core, then gives each core its own edge list for one non-diagonal tile (config
// word, EFFF reads in ascending source order, edges, end word) and starts all cores.
// Checks every core's horizontal partial outputs and the reduction engine's sum of
// the vertical partial outputs over all cores, with and without ReLU. Counts edges
// and stalls (the small PE-row count used here forces stalls).
module tb_gcn_accel;
  localparam int M = 3, R = 5, C = 4, TILE = 30, EBD = 64, ACC_W = 16;
  localparam int DN = TILE / M, OUT_W = ACC_W + $clog2(M) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, clear, busy, done, fm_we, rd_en, rd_relu, rd_valid;
  logic [M-1:0] eb_we, vf_we;
  logic [$clog2(EBD)-1:0] eb_waddr; logic [31:0] eb_wdata;
  logic [$clog2(TILE)-1:0] fm_wnode, rd_node; logic [C-1:0][7:0] fm_wdata, vf_wdata;
  logic [$clog2(DN)-1:0] vf_waddr; logic [$clog2(M)-1:0] rd_core;
  logic [C-1:0][ACC_W-1:0] rd_h; logic [C-1:0][OUT_W-1:0] red_data;
  logic [31:0] n_edges, n_stall;

  gcn_accel #(.M(M), .R(R), .C(C), .TILE(TILE), .EB_DEPTH(EBD), .ACC_W(ACC_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] feat [TILE][C];
  logic signed [7:0] vfeat [M][DN][C];
  int exp_h [M][DN][C], exp_v [TILE][C], total;

  initial begin
    start = 0; clear = 0; eb_we = '0; eb_waddr = '0; eb_wdata = '0; fm_we = 0; fm_wnode = '0; fm_wdata = '0;
    vf_we = '0; vf_waddr = '0; vf_wdata = '0; rd_core = '0; rd_node = '0; rd_en = 0; rd_relu = 0;
    foreach (exp_h[k, d, c]) exp_h[k][d][c] = 0;
    foreach (exp_v[s, c]) exp_v[s][c] = 0;
    total = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < TILE; n++) begin
      @(negedge clk); fm_we = 1; fm_wnode = $bits(fm_wnode)'(n);
      for (int c = 0; c < C; c++) begin feat[n][c] = 8'($urandom); fm_wdata[c] = feat[n][c]; end
    end
    @(negedge clk); fm_we = 0;
    for (int k = 0; k < M; k++) for (int d = 0; d < DN; d++) begin
      @(negedge clk); vf_we = '0; vf_we[k] = 1; vf_waddr = $bits(vf_waddr)'(d);
      for (int c = 0; c < C; c++) begin vfeat[k][d][c] = 8'($urandom); vf_wdata[c] = vfeat[k][d][c]; end
    end
    @(negedge clk); vf_we = '0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < M; k++) begin
      int n;
      n = 0;
      eb_we = '0; eb_we[k] = 1;
      eb_waddr = $bits(eb_waddr)'(n++); eb_wdata = {16'hFFFF, 16'd1}; @(negedge clk);
      for (int g = 0; g < TILE / M; g++) begin
        int ne;
        ne = $urandom % 3;
        if (ne == 0) continue;
        eb_waddr = $bits(eb_waddr)'(n++); eb_wdata = {16'hEFFF, 16'(g)}; @(negedge clk);
        for (int j = 0; j < ne; j++) begin
          int row, col;
          row = $urandom % DN; col = g * M + $urandom % M;
          eb_waddr = $bits(eb_waddr)'(n++); eb_wdata = {16'(row), 16'(col)}; @(negedge clk);
          total++;
          for (int c = 0; c < C; c++) begin
            exp_h[k][row][c] += feat[col][c];
            exp_v[col][c]    += vfeat[k][row][c];
          end
        end
      end
      eb_waddr = $bits(eb_waddr)'(n++); eb_wdata = 32'hFFFF_FFFF; @(negedge clk);
    end
    eb_we = '0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int k = 0; k < M; k++) for (int d = 0; d < DN; d++) begin
      rd_core = $bits(rd_core)'(k); rd_node = $bits(rd_node)'(d); #1;
      for (int c = 0; c < C; c++) begin
        checks++;
        if ($signed(rd_h[c]) != exp_h[k][d][c]) begin failures++; if (failures < 6) $display("h k%0d n%0d c%0d got %0d exp %0d", k, d, c, $signed(rd_h[c]), exp_h[k][d][c]); end
      end
    end
    for (int pass = 0; pass < 2; pass++)
      for (int s = 0; s < TILE; s++) begin
        @(negedge clk); rd_en = 1; rd_relu = 1'(pass); rd_node = $bits(rd_node)'(s);
        @(negedge clk); rd_en = 0;
        checks++; if (!rd_valid) failures++;
        for (int c = 0; c < C; c++) begin
          int e;
          e = (pass == 1 && exp_v[s][c] < 0) ? 0 : exp_v[s][c];
          checks++;
          if ($signed(red_data[c]) != e) begin failures++; if (failures < 6) $display("v n%0d c%0d got %0d exp %0d", s, c, $signed(red_data[c]), e); end
        end
      end
    $display("edges=%0d stalls=%0d", n_edges, n_stall);
    checks++; if (n_edges != total) failures++;
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
