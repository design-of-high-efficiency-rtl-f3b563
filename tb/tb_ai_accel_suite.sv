// tb_ai_accel_suite: end-to-end test of the top level, with every parameter at its
// default. Both designs under the top run at the same time:
//  - heterogeneous accelerator: the host writes two weight tiles, an activation tile,
//    a convolution input map, a COO edge list and a ten-instruction program into the
//    global buffer and starts it (Load LIMC ping; Load AB; Matmul -> intermediate
//    buffer; Load LIMC pong beside the Matmul; Matmul on pong with ReLU; Load AB half 1
//    beside it; Load sparse buffer; Agg with ReLU; Conv 3x3; Store). The stored
//    results are compared with values computed here.
//  - GCN aggregation datapath: source features for a few node groups and vertical
//    features are written, each of the 6 cores gets an edge list for one
//    non-diagonal tile, and the horizontal partial outputs of every core and the
//    reduction engine's sum of the vertical ones are checked.
//  - vision-transformer datapath: a 32x24 product over K steps in the patch-embedding
//    systolic array (8-bit activations, 4-bit weights) and 16-value max-pool windows.
// Mechanisms counted, each must happen: Loads overlapping computation (ping-pong and
// double buffering), LIMC coarse and fine skips, a full feeder shift register,
// SIMD aggregation, GCN edge-buffer memory reads and two-row (horizontal plus
// vertical) edges, systolic-array completion, max-pool window completion. A GCN
// PE-row stall cannot occur with 10 rows (an edge needs at most 2 rows for 4 cycles
// and one edge is issued per cycle); the stall count is printed and must be zero.
module tb_ai_accel_suite;
  import hx_pkg::*;
  localparam int R = 4;           // rows of A (nodes)
  localparam int E = 12;          // edges
  localparam int S1 = 6, S2 = 7;  // output shifts
  localparam int CW = 6, CC = 2;  // conv input width/height and channels
  localparam int CO = (CW - 3) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hx_host_we, hx_host_re; logic [14:0] hx_host_waddr, hx_host_raddr; logic [127:0] hx_host_wdata, hx_host_rdata;
  logic hx_cfg_start; logic [31:0] hx_cfg_addr; logic [8:0] hx_cfg_count;
  logic hx_busy, hx_done;
  logic [31:0] hx_n_instr, hx_n_overlap, hx_n_matmul, hx_n_agg, hx_limc_skip_iter, hx_limc_skip_digit, hx_simd_edge_cnt;
  logic [1:0] hx_feed_token;

  logic vit_clear, vit_in_valid, vit_done, vit_mp_valid, vit_mp_out_valid;
  logic signed [31:0][7:0] vit_a_in;
  logic signed [23:0][3:0] vit_b_in;
  logic signed [31:0][23:0][23:0] vit_acc;
  logic signed [23:0][7:0] vit_mp_data, vit_mp_out;

  ai_accel_suite dut (.*);

  int checks = 0, failures = 0;
  int token_full = 0;
  always @(posedge clk) if (hx_feed_token == 2) token_full++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] W0 [450][16], W1 [450][16], A [R][464], X [CW][CW][16];
  coo_t       ed [E];
  logic [127:0] prog [10];

  function automatic int sx(input logic [7:0] v); return int'($signed(v)); endfunction
  function automatic int rq(input longint v, input int sh, input bit relu);
    longint t = v >>> sh;
    if (relu && t < 0) t = 0;
    if (t > 127) t = 127; if (t < -128) t = -128;
    return int'(t);
  endfunction

  task automatic hw(input int a, input logic [127:0] d);
    @(negedge clk); hx_host_we = 1; hx_host_waddr = 15'(a); hx_host_wdata = d; @(negedge clk); hx_host_we = 0;
  endtask
  task automatic hr(input int a, output logic [127:0] d);
    @(negedge clk); hx_host_re = 1; hx_host_raddr = 15'(a); @(posedge clk); #1; d = hx_host_rdata; hx_host_re = 0;
  endtask

  function automatic logic [127:0] ldst(input opcode_e op, input logic [31:0] s, input logic [31:0] d, input int n);
    ldst_instr_t i; i = '0; i.op = op; i.src = s; i.dst = d; i.count = 10'(n); return i;
  endfunction
  function automatic logic [127:0] comp(input opcode_e op, input logic [31:0] s, input logic [31:0] d, input int n,
                                        input bit bank, input bit relu, input int sh,
                                        input int k, input int st, input int wid, input int ch);
    comp_instr_t i; i = '0; i.op = op; i.src = s; i.dst = d; i.count = 10'(n); i.bank = bank; i.relu = relu;
    i.shift = 4'(sh); i.kernel = 4'(k); i.stride = 4'(st); i.in_width = 10'(wid); i.chans = 5'(ch); i.mode = 2'b00;
    return i;
  endfunction



  // ---------------- GCN aggregation datapath ----------------
  localparam int GM = 6, GC = 66, GDN = 170, GG = 5;   // GG node groups used
  logic gcn_start, gcn_clear, gcn_busy, gcn_done, gcn_fm_we, gcn_rd_en, gcn_rd_relu, gcn_rd_valid;
  logic [5:0] gcn_eb_we, gcn_vf_we;
  logic [9:0] gcn_eb_waddr, gcn_fm_wnode, gcn_rd_node;
  logic [31:0] gcn_eb_wdata, gcn_n_edges, gcn_n_stall;
  logic [65:0][7:0] gcn_fm_wdata, gcn_vf_wdata;
  logic [7:0] gcn_vf_waddr;
  logic [2:0] gcn_rd_core;
  logic [65:0][15:0] gcn_rd_h;
  logic [65:0][19:0] gcn_red_data;
  int gcn_checks = 0, gcn_failures = 0, gcn_total = 0, gcn_mem_reads = 0;
  bit gcn_fin = 0;
  logic signed [7:0] gfeat [GG*GM][GC];
  logic signed [7:0] gvf [GM][10][GC];
  int gexp_h [GM][10][GC], gexp_v [GG*GM][GC];
  initial begin
    gcn_start = 0; gcn_clear = 0; gcn_eb_we = '0; gcn_eb_waddr = '0; gcn_eb_wdata = '0; gcn_fm_we = 0;
    gcn_fm_wnode = '0; gcn_fm_wdata = '0; gcn_vf_we = '0; gcn_vf_waddr = '0; gcn_vf_wdata = '0;
    gcn_rd_core = '0; gcn_rd_node = '0; gcn_rd_en = 0; gcn_rd_relu = 0;
    foreach (gexp_h[k, d, c]) gexp_h[k][d][c] = 0;
    foreach (gexp_v[n, c]) gexp_v[n][c] = 0;
    wait (rst_n); repeat (2) @(negedge clk);
    for (int n = 0; n < GG*GM; n++) begin
      @(negedge clk); gcn_fm_we = 1; gcn_fm_wnode = 10'(n);
      for (int c = 0; c < GC; c++) begin gfeat[n][c] = 8'($urandom); gcn_fm_wdata[c] = gfeat[n][c]; end
    end
    @(negedge clk); gcn_fm_we = 0;
    for (int k = 0; k < GM; k++) for (int d = 0; d < 10; d++) begin
      @(negedge clk); gcn_vf_we = '0; gcn_vf_we[k] = 1; gcn_vf_waddr = 8'(d);
      for (int c = 0; c < GC; c++) begin gvf[k][d][c] = 8'($urandom); gcn_vf_wdata[c] = gvf[k][d][c]; end
    end
    @(negedge clk); gcn_vf_we = '0;
    @(negedge clk); gcn_clear = 1; @(negedge clk); gcn_clear = 0;
    for (int k = 0; k < GM; k++) begin
      int n;
      n = 0;
      gcn_eb_we = '0; gcn_eb_we[k] = 1;
      gcn_eb_waddr = 10'(n++); gcn_eb_wdata = {16'hFFFF, 16'd1}; @(negedge clk);
      for (int g = 0; g < GG; g++) begin
        gcn_eb_waddr = 10'(n++); gcn_eb_wdata = {16'hEFFF, 16'(g)}; gcn_mem_reads++; @(negedge clk);
        for (int j = 0; j < 3; j++) begin
          int row, col;
          row = $urandom % 10; col = g * GM + $urandom % GM;
          gcn_eb_waddr = 10'(n++); gcn_eb_wdata = {16'(row), 16'(col)}; @(negedge clk);
          gcn_total++;
          for (int c = 0; c < GC; c++) begin
            gexp_h[k][row][c] += gfeat[col][c];
            gexp_v[col][c]    += gvf[k][row][c];
          end
        end
      end
      gcn_eb_waddr = 10'(n++); gcn_eb_wdata = 32'hFFFF_FFFF; @(negedge clk);
    end
    gcn_eb_we = '0;
    gcn_start = 1; @(negedge clk); gcn_start = 0;
    while (!gcn_done) @(negedge clk);
    for (int k = 0; k < GM; k++) for (int d = 0; d < 10; d++) begin
      gcn_rd_core = 3'(k); gcn_rd_node = 10'(d); #1;
      for (int c = 0; c < GC; c++) begin
        gcn_checks++;
        if ($signed(gcn_rd_h[c]) != gexp_h[k][d][c]) begin gcn_failures++; if (gcn_failures < 5) $display("gcn h k%0d n%0d c%0d got %0d exp %0d", k, d, c, $signed(gcn_rd_h[c]), gexp_h[k][d][c]); end
      end
    end
    for (int n = 0; n < GG*GM; n++) begin
      @(negedge clk); gcn_rd_en = 1; gcn_rd_relu = 1; gcn_rd_node = 10'(n);
      @(negedge clk); gcn_rd_en = 0;
      gcn_checks++; if (!gcn_rd_valid) gcn_failures++;
      for (int c = 0; c < GC; c++) begin
        int e;
        e = gexp_v[n][c] < 0 ? 0 : gexp_v[n][c];
        gcn_checks++;
        if ($signed(gcn_red_data[c]) != e) begin gcn_failures++; if (gcn_failures < 5) $display("gcn v n%0d c%0d got %0d exp %0d", n, c, $signed(gcn_red_data[c]), e); end
      end
    end
    gcn_fin = 1;
  end

  // ---------------- vision-transformer datapath ----------------
  localparam int K = 20;
  int vit_checks = 0, vit_failures = 0, sa_done_cnt = 0, mp_win_cnt = 0;
  bit vit_fin = 0;
  always @(posedge clk) begin
    if (vit_done) sa_done_cnt++;
    if (vit_mp_out_valid) mp_win_cnt++;
  end
  initial begin
    logic signed [7:0] av [K][32];
    logic signed [3:0] bv [K][24];
    logic signed [7:0] mx [24];
    vit_clear = 0; vit_in_valid = 0; vit_a_in = '0; vit_b_in = '0; vit_mp_valid = 0; vit_mp_data = '0;
    wait (rst_n); repeat (2) @(negedge clk);
    vit_clear = 1; @(negedge clk); vit_clear = 0;
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < 32; r++) av[k][r] = 8'($urandom);
      for (int c = 0; c < 24; c++) bv[k][c] = 4'($urandom);
      vit_in_valid = 1;
      for (int r = 0; r < 32; r++) vit_a_in[r] = av[k][r];
      for (int c = 0; c < 24; c++) vit_b_in[c] = bv[k][c];
      @(negedge clk);
    end
    vit_in_valid = 0;
    while (!vit_done) @(negedge clk);
    @(negedge clk);
    for (int r = 0; r < 32; r++) for (int c = 0; c < 24; c++) begin
      int s; s = 0;
      for (int k = 0; k < K; k++) s += int'(av[k][r]) * int'(bv[k][c]);
      vit_checks++;
      if ($signed(vit_acc[r][c]) != s) begin vit_failures++; if (vit_failures < 5) $display("sa r%0d c%0d got %0d exp %0d", r, c, $signed(vit_acc[r][c]), s); end
    end
    for (int w = 0; w < 4; w++) begin
      for (int l = 0; l < 24; l++) mx[l] = -128;
      for (int i = 0; i < 16; i++) begin
        vit_mp_valid = 1;
        for (int l = 0; l < 24; l++) begin
          vit_mp_data[l] = 8'($urandom);
          if ($signed(vit_mp_data[l]) > mx[l]) mx[l] = vit_mp_data[l];
        end
        @(negedge clk);
      end
      vit_mp_valid = 0;
      for (int l = 0; l < 24; l++) begin
        vit_checks++;
        if ($signed(vit_mp_out[l]) != mx[l]) vit_failures++;
      end
    end
    vit_fin = 1;
  end

  int mm1 [R][16], mm2 [R][16], ib0 [R][16], agg [R][16], cv [CO*CO][16];

  initial begin
    logic [127:0] w;
    hx_host_we = 0; hx_host_re = 0; hx_host_waddr = 0; hx_host_raddr = 0; hx_host_wdata = 0;
    hx_cfg_start = 0; hx_cfg_addr = 0; hx_cfg_count = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- data ----
    for (int k = 0; k < 450; k++) for (int m = 0; m < 16; m++) begin W0[k][m] = 8'($urandom); W1[k][m] = 8'($urandom); end
    for (int r = 0; r < R; r++) for (int p = 0; p < 464; p++)
      A[r][p] = (p % 15 == 3 || p >= 450) ? 8'd0 : 8'($signed(4'($urandom)));   // iteration 3 all zero: coarse skip
    for (int y = 0; y < CW; y++) for (int x = 0; x < CW; x++) for (int c = 0; c < 16; c++)
      X[y][x][c] = (c < CC) ? 8'($signed(5'($urandom))) : 8'd0;
    for (int e = 0; e < E; e++) begin
      ed[e].src = 12'($urandom % R); ed[e].dst = 12'($urandom % R); ed[e].val = 8'($signed(3'($urandom)));
    end
    for (int k = 0; k < 450; k++) begin
      for (int m = 0; m < 16; m++) w[8*m +: 8] = W0[k][m]; hw(32'h1000 + k, w);
      for (int m = 0; m < 16; m++) w[8*m +: 8] = W1[k][m]; hw(32'h1400 + k, w);
    end
    for (int r = 0; r < R; r++) for (int j = 0; j < 29; j++) begin
      for (int b = 0; b < 16; b++) w[8*b +: 8] = A[r][16*j + b];
      hw(32'h2000 + r*32 + j, w);
    end
    for (int y = 0; y < CW; y++) for (int x = 0; x < CW; x++) begin
      for (int c = 0; c < 16; c++) w[8*c +: 8] = X[y][x][c];
      hw(32'h2800 + y*CW + x, w);
    end
    for (int q = 0; q < E/4; q++) begin
      for (int l = 0; l < 4; l++) w[32*l +: 32] = ed[4*q + l];
      hw(32'h3000 + q, w);
    end

    // ---- program ----
    prog[0] = ldst(OP_LOAD, 32'h1000, MAP_LIMC, 450);
    prog[1] = ldst(OP_LOAD, 32'h2000, MAP_AB, R*32);
    prog[2] = comp(OP_MATMUL, MAP_AB, MAP_IB, R, 0, 0, S1, 0, 0, 0, 0);
    prog[3] = ldst(OP_LOAD, 32'h1400, MAP_LIMC + 512, 450);
    prog[4] = comp(OP_MATMUL, MAP_AB, MAP_OB, R, 1, 1, S1, 0, 0, 0, 0);
    prog[5] = ldst(OP_LOAD, 32'h2800, MAP_AB + 1024, CW*CW);
    prog[6] = ldst(OP_LOAD, 32'h3000, MAP_SB, E/4);
    prog[7] = comp(OP_AGG, 0, MAP_OB + 64, E, 0, 1, 1, 0, 0, R, 0);
    prog[8] = comp(OP_CONV, MAP_AB + 1024, MAP_OB + 128, CO*CO, 0, 0, S2, 3, 1, CW, CC);
    prog[9] = ldst(OP_STORE, MAP_OB, 32'h4000, 128 + CO*CO);
    for (int i = 0; i < 10; i++) hw(i, prog[i]);

    // ---- reference ----
    for (int r = 0; r < R; r++) for (int m = 0; m < 16; m++) begin
      longint s1, s2;
      s1 = 0; s2 = 0;
      for (int k = 0; k < 450; k++) begin s1 += sx(A[r][k]) * sx(W0[k][m]); s2 += sx(A[r][k]) * sx(W1[k][m]); end
      ib0[r][m] = rq(s1, S1, 0);
      mm2[r][m] = rq(s2, S1, 1);
    end
    for (int d = 0; d < R; d++) for (int c = 0; c < 16; c++) begin
      longint s;
      s = 0;
      for (int e = 0; e < E; e++) if (ed[e].dst == 12'(d)) s += int'(ed[e].val) * ib0[ed[e].src][c];
      agg[d][c] = rq(s, 1, 1);
    end
    for (int o = 0; o < CO*CO; o++) for (int m = 0; m < 16; m++) begin
      longint s;
      int oy, ox;
      s = 0;
      oy = o / CO; ox = o % CO;
      for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) for (int c = 0; c < CC; c++)
        s += sx(X[oy+ky][ox+kx][c]) * sx(W0[(ky*3+kx)*CC + c][m]);
      cv[o][m] = rq(s, S2, 0);
    end

    // ---- run ----
    @(negedge clk); hx_cfg_start = 1; hx_cfg_addr = 0; hx_cfg_count = 10; @(negedge clk); hx_cfg_start = 0;
    while (!hx_done) @(posedge clk);
    repeat (2) @(posedge clk);

    // ---- check ----
    for (int r = 0; r < R; r++) begin
      hr(32'h4000 + r, w);
      for (int m = 0; m < 16; m++) begin
        checks++;
        if (sx(w[8*m +: 8]) != mm2[r][m]) begin failures++; if (failures < 10) $display("matmul r%0d m%0d got %0d exp %0d", r, m, sx(w[8*m +: 8]), mm2[r][m]); end
      end
    end
    for (int d = 0; d < R; d++) begin
      hr(32'h4000 + 64 + d*8, w);
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (sx(w[8*c +: 8]) != agg[d][c]) begin failures++; if (failures < 40) $display("agg n%0d c%0d got %0d exp %0d", d, c, sx(w[8*c +: 8]), agg[d][c]); end
      end
    end
    for (int o = 0; o < CO*CO; o++) begin
      hr(32'h4000 + 128 + o, w);
      for (int m = 0; m < 16; m++) begin
        checks++;
        if (sx(w[8*m +: 8]) != cv[o][m]) begin failures++; if (failures < 60) $display("conv o%0d m%0d got %0d exp %0d", o, m, sx(w[8*m +: 8]), cv[o][m]); end
      end
    end
    wait (vit_fin && gcn_fin);
    checks += vit_checks + gcn_checks; failures += vit_failures + gcn_failures;
    $display("gcn edges=%0d (two-row: %0d) memory reads=%0d stalls=%0d", gcn_n_edges, gcn_total, gcn_mem_reads, gcn_n_stall);
    checks++; if (gcn_n_edges != gcn_total || gcn_total == 0) begin failures++; $display("GCN edge count wrong"); end
    checks++; if (gcn_n_stall != 0) begin failures++; $display("GCN stalled with 10 PE rows"); end
    // mechanisms
    $display("sa_done=%0d maxpool_windows=%0d", sa_done_cnt, mp_win_cnt);
    checks++; if (sa_done_cnt == 0) begin failures++; $display("systolic array never finished"); end
    checks++; if (mp_win_cnt != 4) begin failures++; $display("max-pool windows %0d", mp_win_cnt); end
    $display("instr=%0d overlap=%0d matmul=%0d agg=%0d skip_iter=%0d skip_digit=%0d edges=%0d token_full=%0d",
             hx_n_instr, hx_n_overlap, hx_n_matmul, hx_n_agg, hx_limc_skip_iter, hx_limc_skip_digit, hx_simd_edge_cnt, token_full);
    checks++; if (hx_n_instr != 10) failures++;
    checks++; if (hx_n_overlap < 2) begin failures++; $display("ping-pong / double-buffer overlap missing"); end
    checks++; if (hx_n_matmul != 3 || hx_n_agg != 1) failures++;
    checks++; if (hx_limc_skip_iter == 0) begin failures++; $display("no coarse skip"); end
    checks++; if (hx_limc_skip_digit == 0) begin failures++; $display("no fine skip"); end
    checks++; if (hx_simd_edge_cnt != E) begin failures++; $display("SIMD aggregation edges %0d", hx_simd_edge_cnt); end
    checks++; if (token_full == 0) begin failures++; $display("shift register never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
