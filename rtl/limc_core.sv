// limc_core: ping-pong latch-based in-memory-compute (LIMC) core.
//
// NMAC macros form one LIMC array (16 macros x 8 bits = the 128-bit system bus);
// the array is present twice, as "ping" and "pong". While one copy computes, the
// other can be rewritten with the next weight tile, which hides the weight-update
// time behind computation. Only the storage is duplicated: the Booth encoder, the
// partial-product logic and the adder trees are shared, and a multiplexer picks
// the copy selected by cmp_bank. A copy can be left unused by never selecting it.
//
// Compute: one input vector of BANKS*ROWS activations is presented as ROWS
// iterations; iteration i carries the BANKS activations for row i of every bank
// (activation k of the vector goes with weight k). Each non-skipped iteration takes
// one cycle per Booth digit (4 for 8-bit mode, 2 for 4-bit modes). An iteration
// whose BANKS activations are all zero is skipped in one cycle (coarse skip); a
// digit 000/111 gives a zero partial product (fine skip). After the iteration
// flagged act_last the NMAC dot products leave on out_data (one per output column),
// $clog2(BANKS)+1 cycles after its last digit.
//
// Interface: weight write (wr_en, wr_bank, wr_addr = weight index, wr_data = one
// byte per macro), activation stream with valid/ready, result pulse out_valid.
// Counters report skipped iterations and zero digits. Activations and weights are
// signed. The iteration-to-row mapping, the handshake and the counters are this
// design's choices; the sizes, the ping-pong sharing and the two skip levels
// follow the published design.
module limc_core
  import hx_pkg::*;
#(
  parameter int NMAC  = 16,
  parameter int BANKS = 30,
  parameter int ROWS  = 15,
  parameter int ACC_W = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // weight load
  input  logic                              wr_en,
  input  logic                              wr_bank,
  input  logic [$clog2(BANKS*ROWS)-1:0]     wr_addr,
  input  logic [NMAC-1:0][7:0]              wr_data,
  // configuration
  input  logic [1:0]                        mode,
  input  logic                              cmp_bank,
  // activation stream
  input  logic                              act_valid,
  output logic                              act_ready,
  input  logic                              act_last,
  input  logic [BANKS-1:0][7:0]             act_data,
  // results
  output logic                              out_valid,
  output logic signed [NMAC-1:0][ACC_W-1:0] out_data,
  output logic                              busy,
  output logic [31:0]                       skip_iter_cnt,
  output logic [31:0]                       skip_digit_cnt
);

  localparam int RW = $clog2(ROWS);

  // ---------------- storage: ping and pong ----------------
  logic [NMAC-1:0][BANKS-1:0][7:0] w_ping, w_pong;
  logic [RW-1:0]                   row_q;

  for (genvar m = 0; m < NMAC; m++) begin : g_mac
    limc_macro #(.BANKS(BANKS), .ROWS(ROWS)) u_ping (
      .clk, .wr_en(wr_en && !wr_bank), .wr_addr, .wr_data(wr_data[m]),
      .rd_row(row_q), .rd_w(w_ping[m]));
    limc_macro #(.BANKS(BANKS), .ROWS(ROWS)) u_pong (
      .clk, .wr_en(wr_en && wr_bank), .wr_addr, .wr_data(wr_data[m]),
      .rd_row(row_q), .rd_w(w_pong[m]));
  end

  // ---------------- shared Booth encoder and sequencer ----------------
  logic [BANKS-1:0][7:0] act_q;
  logic                  running, last_q;
  logic [1:0]            digit_q;
  logic [1:0]            ndig_m1;
  logic                  all_zero;
  pp_sel_e [BANKS-1:0]   sel;
  logic                  tree_valid, tree_last;

  assign ndig_m1 = (mode == 2'b01 || mode == 2'b10) ? 2'd1 : 2'd3;

  always_comb begin
    all_zero = 1'b1;
    for (int b = 0; b < BANKS; b++)
      if (nibble_sel(act_data[b], mode) != 8'sd0) all_zero = 1'b0;
  end

  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      logic [8:0] ext;
      ext    = {nibble_sel(act_q[b], mode), 1'b0};
      sel[b] = booth_decode(ext[2*digit_q +: 3]);
    end
  end

  // A non-zero iteration may be taken during the last digit of the previous one, so
  // back-to-back iterations run at one digit per cycle; a skipped (all-zero)
  // iteration is taken only when no digits are in progress.
  logic last_dig;
  assign last_dig  = running && (digit_q == ndig_m1);
  assign act_ready = !running || (last_dig && !all_zero);

  // A coarse-skipped iteration that closes a vector still has to release the result:
  // it sends one all-zero digit set through the tree.
  logic skip_last;
  assign skip_last = act_valid && act_ready && all_zero && act_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running       <= 1'b0;
      digit_q       <= '0;
      row_q         <= '0;
      last_q        <= 1'b0;
      act_q         <= '0;
      skip_iter_cnt <= '0;
    end else if (act_valid && act_ready) begin
      if (last_dig) row_q <= last_q ? '0 : RW'(row_q + 1'b1);
      begin
        if (all_zero) begin
          skip_iter_cnt <= skip_iter_cnt + 1;
          row_q         <= act_last ? '0 : RW'(row_q + 1'b1);
        end else begin
          running <= 1'b1;
          act_q   <= act_data;
          last_q  <= act_last;
          digit_q <= '0;
        end
      end
    end else if (running) begin
      if (digit_q == ndig_m1) begin
        running <= 1'b0;
        row_q   <= last_q ? '0 : RW'(row_q + 1'b1);
      end
      digit_q <= digit_q + 1'b1;
    end
  end

  // fine-skip counter: zero digits of non-zero activations
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) skip_digit_cnt <= '0;
    else if (running) begin
      logic [31:0] n;
      n = '0;
      for (int b = 0; b < BANKS; b++)
        if (sel[b] == PP_ZERO && act_q[b] != 8'd0) n = n + 1;
      skip_digit_cnt <= skip_digit_cnt + n;
    end
  end

  // ---------------- per-column partial products and adder trees ----------------
  logic [NMAC-1:0]                   s_valid, s_last;
  logic signed [NMAC-1:0][ACC_W-1:0] s_sum;
  logic                              in_v, in_l;

  assign in_v = running || skip_last;
  assign in_l = running ? (last_q && digit_q == ndig_m1) : skip_last;

  for (genvar m = 0; m < NMAC; m++) begin : g_tree
    pp_sel_e [BANKS-1:0] sel_m;
    always_comb begin
      for (int b = 0; b < BANKS; b++) sel_m[b] = running ? sel[b] : PP_ZERO;
    end
    limc_pp_tree #(.BANKS(BANKS), .ACC_W(ACC_W)) u_tree (
      .clk, .rst_n, .in_valid(in_v), .in_last(in_l), .mode, .digit_pos(digit_q),
      .sel(sel_m), .w(cmp_bank ? w_pong[m] : w_ping[m]),
      .sum_valid(s_valid[m]), .sum_last(s_last[m]), .sum(s_sum[m]));
  end

  assign tree_valid = s_valid[0];
  assign tree_last  = s_last[0];

  // ---------------- accumulation ----------------
  logic signed [NMAC-1:0][ACC_W-1:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (tree_valid) begin
        for (int m = 0; m < NMAC; m++) begin
          if (tree_last) begin
            out_data[m] <= acc[m] + s_sum[m];
            acc[m]      <= '0;
          end else begin
            acc[m] <= acc[m] + s_sum[m];
          end
        end
        out_valid <= tree_last;
      end
    end
  end

  // busy while digits are issued or results are still in the trees
  logic [7:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 8'(in_v && in_l) - 8'(tree_valid && tree_last);
  end
  assign busy = running || (inflight != 0);

  // Rule of the ping-pong scheme: never rewrite the copy that is computing.
  a_no_write_active: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && busy) |-> (wr_bank != cmp_bank));

endmodule
