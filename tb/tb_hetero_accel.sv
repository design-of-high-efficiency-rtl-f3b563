// tb_hetero_accel: end-to-end test of the heterogeneous accelerator engine.
//
// The testbench plays the host: it writes two weight tiles, an activation tile, a
// small convolution input map, a COO edge list and a ten-instruction program into
// the global buffer and starts the program. The program runs a GCN-style layer and
// a convolution:
//   Load LIMC ping; Load AB half 0; Matmul (-> intermediate buffer, node features);
//   Load LIMC pong (runs beside the Matmul: ping-pong); Matmul on pong (-> output
//   buffer, ReLU); Load AB half 1 (runs beside the Matmul: double buffering);
//   Load sparse buffer; Agg (SIMD aggregation of the first Matmul's results, ReLU);
//   Conv 3x3 on AB half 1 with the ping weights; Store output buffer -> global buffer.
// The stored results are read back and compared with values computed here from the
// same inputs. Mechanisms counted: Loads overlapping computation, LIMC coarse and
// fine skips, full shift register (token = 2), Matmul/Conv/Agg runs.
module tb_hetero_accel;
  import hx_pkg::*;
  localparam int R = 4;           // rows of A (nodes)
  localparam int E = 12;          // edges
  localparam int S1 = 6, S2 = 7;  // output shifts
  localparam int CW = 6, CC = 2;  // conv input width/height and channels
  localparam int CO = (CW - 3) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we, host_re; logic [14:0] host_waddr, host_raddr; logic [127:0] host_wdata, host_rdata;
  logic cfg_start; logic [31:0] cfg_addr; logic [8:0] cfg_count;
  logic busy, done;
  logic [31:0] n_instr, n_overlap, n_matmul, n_agg, limc_skip_iter, limc_skip_digit, simd_edge_cnt;
  logic [1:0] feed_token;

  hetero_accel dut (.*);

  int checks = 0, failures = 0;
  int token_full = 0;
  always @(posedge clk) if (feed_token == 2) token_full++;

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
    @(negedge clk); host_we = 1; host_waddr = 15'(a); host_wdata = d; @(negedge clk); host_we = 0;
  endtask
  task automatic hr(input int a, output logic [127:0] d);
    @(negedge clk); host_re = 1; host_raddr = 15'(a); @(posedge clk); #1; d = host_rdata; host_re = 0;
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

  int mm1 [R][16], mm2 [R][16], ib0 [R][16], agg [R][16], cv [CO*CO][16];

  initial begin
    logic [127:0] w;
    host_we = 0; host_re = 0; host_waddr = 0; host_raddr = 0; host_wdata = 0;
    cfg_start = 0; cfg_addr = 0; cfg_count = 0;
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
    @(negedge clk); cfg_start = 1; cfg_addr = 0; cfg_count = 10; @(negedge clk); cfg_start = 0;
    while (!done) @(posedge clk);
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
    // mechanisms
    $display("instr=%0d overlap=%0d matmul=%0d agg=%0d skip_iter=%0d skip_digit=%0d edges=%0d token_full=%0d",
             n_instr, n_overlap, n_matmul, n_agg, limc_skip_iter, limc_skip_digit, simd_edge_cnt, token_full);
    checks++; if (n_instr != 10) failures++;
    checks++; if (n_overlap < 2) begin failures++; $display("ping-pong / double-buffer overlap missing"); end
    checks++; if (n_matmul != 3 || n_agg != 1) failures++;
    checks++; if (limc_skip_iter == 0) begin failures++; $display("no coarse skip"); end
    checks++; if (limc_skip_digit == 0) begin failures++; $display("no fine skip"); end
    checks++; if (simd_edge_cnt != E) failures++;
    checks++; if (token_full == 0) begin failures++; $display("shift register never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
