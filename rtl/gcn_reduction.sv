// gcn_reduction: reduction engine of the FPGA GCN accelerator.
//
// In vertical aggregation every core produces a partial output for the same
// destination nodes; this engine adds the M partial-output vectors of one node
// into a single vector, adds it to the output already held for that node when acc
// is set (partial outputs of earlier tiles), and applies ReLU when relu is set (the
// activation at the end of a layer). One node vector per cycle, one cycle of
// latency: in_valid/in_* are registered into out_valid/out_data.
// From the document: summing the cores' partial outputs into one output, and the
// ReLU after aggregation. This design's choices: the accumulate input, result width
// ACC_W + clog2(M) + 1 bits, and the registered single-cycle pipeline.
module gcn_reduction #(
  parameter int M     = 6,
  parameter int C     = 66,
  parameter int ACC_W = 16,
  parameter int OUT_W = ACC_W + $clog2(M) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [M-1:0][C-1:0][ACC_W-1:0] in_po,
  input  logic                          acc,
  input  logic [C-1:0][OUT_W-1:0]       in_prev,
  input  logic                          relu,
  output logic                          out_valid,
  output logic [C-1:0][OUT_W-1:0]       out_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < C; c++) begin
          logic signed [OUT_W-1:0] s;
          s = acc ? $signed(in_prev[c]) : '0;
          for (int k = 0; k < M; k++) s = s + OUT_W'($signed(in_po[k][c]));
          out_data[c] <= (relu && s < 0) ? '0 : s;
        end
    end
  end
endmodule
