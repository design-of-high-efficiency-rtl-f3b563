// tb_gcn_reduction: self-checking test of the GCN reduction engine. Random partial
// outputs of M cores (with and without a previous value to accumulate, with and
// without ReLU) are summed here and compared with the engine's output one cycle later.
module tb_gcn_reduction;
  localparam int M = 6, C = 66, ACC_W = 16, OUT_W = ACC_W + $clog2(M) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, acc, relu, out_valid;
  logic [M-1:0][C-1:0][ACC_W-1:0] in_po;
  logic [C-1:0][OUT_W-1:0] in_prev, out_data;
  gcn_reduction #(.M(M), .C(C), .ACC_W(ACC_W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [C];
    in_valid = 0; acc = 0; relu = 0; in_po = '0; in_prev = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      in_valid = 1; acc = 1'($urandom); relu = 1'($urandom);
      for (int c = 0; c < C; c++) begin
        e[c] = 0;
        in_prev[c] = OUT_W'($signed(15'($urandom)));
        if (acc) e[c] = $signed(in_prev[c]);
        for (int k = 0; k < M; k++) begin in_po[k][c] = ACC_W'($urandom); e[c] += $signed(in_po[k][c]); end
        if (relu && e[c] < 0) e[c] = 0;
      end
      @(negedge clk);
      in_valid = 0;
      checks++; if (!out_valid) failures++;
      for (int c = 0; c < C; c++) begin
        checks++;
        if ($signed(out_data[c]) != e[c]) begin failures++; if (failures < 5) $display("c%0d got %0d exp %0d", c, $signed(out_data[c]), e[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
