// tb_maxpool_engine: self-checking test of the max-pooling engine. Random signed
// windows of 16 values per lane, with idle cycles in between, are pooled; each
// result is compared with the maximum found by the testbench, and out_valid must
// come exactly one cycle after the 16th value.
module tb_maxpool_engine;
  localparam int LANES = 24, W = 8, WIN = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [LANES-1:0][W-1:0] in_data, max_out;
  maxpool_engine dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] mx [LANES];
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int win = 0; win < 20; win++) begin
      for (int l = 0; l < LANES; l++) mx[l] = -128;
      for (int i = 0; i < WIN; i++) begin
        @(negedge clk);
        in_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          in_data[l] = W'($urandom);
          if ($signed(in_data[l]) > mx[l]) mx[l] = in_data[l];
        end
        if ($urandom % 4 == 0 && i != WIN - 1) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid in window %0d", win); end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if ($signed(max_out[l]) != mx[l]) begin failures++; $display("lane %0d got %0d exp %0d", l, max_out[l], mx[l]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
