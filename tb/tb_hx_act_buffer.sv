// tb_hx_act_buffer: self-checking test of the double-buffered activation buffer.
// Fills both halves, then reads half 0 word by word while half 1 is rewritten in
// the same cycles; every read must return the value last written to that word,
// with one cycle of latency.
module tb_hx_act_buffer;
  localparam int HALF_DEPTH = 1024, AW = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, re, rd_active, rd_half; logic [AW-1:0] waddr, raddr; logic [127:0] wdata, rdata;
  hx_act_buffer dut (.*);
  logic [127:0] model [2*HALF_DEPTH];
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; re = 0; rd_active = 0; rd_half = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2*HALF_DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = {$urandom, $urandom, $urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read half 0 while rewriting half 1
    for (int i = 0; i < HALF_DEPTH; i++) begin
      @(negedge clk);
      rd_active = 1; rd_half = 0; re = 1; raddr = AW'(i);
      we = 1; waddr = AW'(HALF_DEPTH + i); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[HALF_DEPTH + i] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != model[i]) begin failures++; if (failures < 5) $display("half0 word %0d wrong", i); end
    end
    @(negedge clk); we = 0; rd_half = 1;
    for (int i = 0; i < HALF_DEPTH; i += 3) begin
      @(negedge clk); re = 1; raddr = AW'(HALF_DEPTH + i);
      @(posedge clk); #1;
      checks++;
      if (rdata != model[HALF_DEPTH + i]) begin failures++; if (failures < 5) $display("half1 word %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
