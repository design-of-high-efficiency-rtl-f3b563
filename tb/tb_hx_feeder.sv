// tb_hx_feeder: self-checking test of the activation delivery path.
// A behavioural activation buffer is filled with random bytes. A Matmul gather of
// 3 rows and a 3x3/stride-2 Conv gather over a 9-pixel-wide, 5-channel map are run
// while the consumer takes beats at random moments; every beat is compared with
// the byte the addressing rule selects, the last flag must close each vector, and
// the token register must never exceed two.
module tb_hx_feeder;
  localparam int BANKS = 30, ROWS = 15, AB_AW = 11, VB = BANKS * ROWS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, is_conv, busy, ab_re, act_valid, act_ready, act_last;
  logic [9:0] count, in_width; logic [AB_AW-1:0] base, ab_addr;
  logic [3:0] kernel, stride; logic [4:0] chans; logic [127:0] ab_data;
  logic [BANKS-1:0][7:0] act_data; logic [1:0] token;

  hx_feeder dut (.*);

  logic [127:0] ab [1 << AB_AW];
  always_ff @(posedge clk) if (ab_re) ab_data <= ab[ab_addr];

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && token > 2) failures++;

  // expected byte p of vector v
  function automatic logic [7:0] exp_byte(input int v, input int p);
    if (!is_conv) begin
      int w = int'(base) + v * 32 + p / 16;
      return (p < 29 * 16) ? ab[w][8*(p%16) +: 8] : 8'd0;
    end else begin
      int k = int'(kernel), s = int'(stride), c = int'(chans), j = p / c;
      int ow = (int'(in_width) - k) / s + 1, oy = v / ow, ox = v % ow;
      if (j >= k * k) return 8'd0;
      return ab[int'(base) + (oy*s + j/k) * int'(in_width) + ox*s + j%k][8*(p%c) +: 8];
    end
  endfunction

  task automatic run(input bit conv, input int n);
    int v = 0, i = 0;
    @(negedge clk);
    is_conv = conv; count = 10'(n); start = 1;
    @(negedge clk); start = 0;
    while (v < n) begin
      act_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (act_valid && act_ready) begin
        for (int b = 0; b < BANKS; b++) begin
          checks++;
          if (act_data[b] != exp_byte(v, b*ROWS + i)) begin
            failures++;
            if (failures < 10) $display("vec %0d beat %0d bank %0d got %h exp %h", v, i, b, act_data[b], exp_byte(v, b*ROWS+i));
          end
        end
        checks++;
        if (act_last != (i == ROWS-1)) failures++;
        if (i == ROWS-1) begin i = 0; v++; end else i++;
      end
      @(negedge clk);
    end
    act_ready = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    start = 0; is_conv = 0; count = 0; base = 11'd40; kernel = 3; stride = 2; in_width = 9; chans = 5;
    act_ready = 0;
    for (int w = 0; w < (1 << AB_AW); w++) ab[w] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;
    run(0, 3);
    run(1, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
