// tb_simd_core: self-checking test of the SIMD core.
// Random COO edges over a 1024-node tile and random node features are held in
// testbench memories with one-cycle read latency. A scaled aggregation pass and an
// unscaled pass (plain sum) are run; every node's result, read with and without
// ReLU, is compared with a sum computed directly from the edge list. The pass time
// is checked: one edge per cycle plus the three-stage pipeline and the done register.
module tb_simd_core;
  import hx_pkg::*;
  localparam int ROWS = 16, COLS = 128, DEPTH = 64, NODES = ROWS * DEPTH, NE = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, clear, scale_en, busy, done;
  logic [12:0] num_edges;
  logic [11:0] eb_addr; coo_t eb_data;
  logic [11:0] ib_addr; logic [COLS-1:0][7:0] ib_data;
  logic [11:0] rd_node; logic rd_relu; logic [3:0] rd_shift;
  logic [COLS-1:0][7:0] rd_data; logic [31:0] edge_cnt;

  simd_core dut (.*);

  coo_t edges [4096];
  logic [COLS-1:0][7:0] feat [NODES];
  always_ff @(posedge clk) begin
    eb_data <= edges[eb_addr];
    ib_data <= feat[ib_addr[9:0]];
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_acc [NODES][COLS];

  task automatic run_pass(input bit scale);
    int t0, t1;
    for (int n = 0; n < NODES; n++) for (int c = 0; c < COLS; c++) ref_acc[n][c] = 0;
    for (int e = 0; e < NE; e++)
      for (int c = 0; c < COLS; c++)
        ref_acc[edges[e].dst][c] += (scale ? int'(edges[e].val) : 1) * int'($signed(feat[edges[e].src][c]));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    scale_en = scale; num_edges = NE; start = 1;
    @(posedge clk); t0 = $time / 10; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    t1 = $time / 10;
    checks++;
    if (t1 - t0 != NE + 3) begin failures++; $display("pass took %0d cycles, expected %0d", t1 - t0, NE + 3); end
    @(negedge clk);
    for (int n = 0; n < NODES; n += 7) begin
      for (int r = 0; r < 2; r++) begin
        rd_node = n[11:0]; rd_relu = r[0]; rd_shift = 0; #1;
        for (int c = 0; c < COLS; c++) begin
          int v = ref_acc[n][c];
          if (r == 1 && v < 0) v = 0;
          if (v > 127) v = 127; if (v < -128) v = -128;
          checks++;
          if ($signed(rd_data[c]) != v) begin
            failures++;
            if (failures < 10) $display("node %0d col %0d relu %0d: got %0d exp %0d", n, c, r, $signed(rd_data[c]), v);
          end
        end
      end
    end
  endtask

  initial begin
    start = 0; clear = 0; scale_en = 0; num_edges = 0; rd_node = 0; rd_relu = 0; rd_shift = 0;
    for (int n = 0; n < NODES; n++)
      for (int c = 0; c < COLS; c++) feat[n][c] = 8'($signed(5'($urandom)));
    // edges sorted by source, several per destination
    for (int e = 0; e < NE; e++) begin
      edges[e].src = 12'(e * NODES / NE);
      edges[e].dst = 12'($urandom % 64);      // few destinations: repeated hits
      edges[e].val = 8'($signed(3'($urandom)));
    end
    repeat (3) @(posedge clk); rst_n = 1;
    run_pass(1);
    run_pass(0);
    checks++;
    if (edge_cnt != 2 * NE) begin failures++; $display("edge count %0d", edge_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
