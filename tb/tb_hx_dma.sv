// tb_hx_dma: self-checking test of the DMA engine. A behavioural source memory with
// one-cycle read latency and a destination memory are attached; transfers of
// several lengths (including 1 and the 10-bit maximum 1023) must copy every word
// to the right address, take count+1 cycles from start to the last write, and
// raise done once.
module tb_hx_dma;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, rd_en, wr_en;
  logic [31:0] src, dst, rd_addr, wr_addr; logic [9:0] count;
  logic [127:0] rd_data, wr_data;
  hx_dma dut (.*);

  logic [127:0] srcmem [4096];
  logic [127:0] dstmem [4096];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= srcmem[rd_addr[11:0]];
    if (wr_en) dstmem[wr_addr[11:0]] <= wr_data;
  end

  int checks = 0, failures = 0, writes = 0, dones = 0;
  always @(posedge clk) begin
    if (wr_en) writes++;
    if (done) dones++;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input int s, input int d, input int n);
    int t0, tl;
    writes = 0; dones = 0;
    for (int i = 0; i < 4096; i++) dstmem[i] = '0;
    @(negedge clk); src = s; dst = d; count = 10'(n); start = 1;
    @(posedge clk); t0 = $time/10; @(negedge clk); start = 0;
    tl = t0;
    while (busy) begin @(posedge clk); if (wr_en) tl = $time/10; @(negedge clk); end
    repeat (2) @(posedge clk);
    checks++;
    if (writes != n || dones != 1) begin failures++; $display("writes %0d dones %0d", writes, dones); end
    checks++;
    if (tl - t0 != n + 1) begin failures++; $display("last write after %0d cycles, n=%0d", tl - t0, n); end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (dstmem[d + i] != srcmem[s + i]) begin failures++; if (failures < 10) $display("word %0d wrong", i); end
    end
    checks++;
    if (dstmem[d + n] != 0 || (d > 0 && dstmem[d - 1] != 0)) begin failures++; $display("write outside range"); end
  endtask

  initial begin
    start = 0; src = 0; dst = 0; count = 0;
    for (int i = 0; i < 4096; i++) srcmem[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;
    xfer(5, 100, 1);
    xfer(17, 2000, 29);
    xfer(0, 3000, 1023);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
