// maxpool_engine: parallel max-pooling engine (MP) of the vision-transformer cores.
//
// LANES independent lanes, one per output channel column coming out of a systolic
// array. Each lane receives the WIN values of one pooling window, one per in_valid
// cycle, and keeps a running maximum; after the WIN-th value the maxima of all
// lanes are presented on max_out with out_valid for one cycle, and the next window
// starts. WIN = 16 is the 4x4 max-pool that follows the patch-embedding
// convolution. Values are signed. The lane count, the serial window order and the
// one-value-per-cycle rate are this design's choices; the 4x4 window is the model's.
//
// Timing: out_valid rises on the cycle after the window's last value is accepted.
module maxpool_engine #(
  parameter int LANES = 24,
  parameter int W     = 8,
  parameter int WIN   = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [LANES-1:0][W-1:0] in_data,
  output logic                          out_valid,
  output logic signed [LANES-1:0][W-1:0] max_out
);

  logic [$clog2(WIN)-1:0]         cnt;
  logic signed [LANES-1:0][W-1:0] cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; cur <= '0; out_valid <= 1'b0; max_out <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int l = 0; l < LANES; l++) begin
          logic signed [W-1:0] m;
          m = (cnt == 0 || $signed(in_data[l]) > $signed(cur[l])) ? in_data[l] : cur[l];
          cur[l] <= m;
          if (cnt == $clog2(WIN)'(WIN - 1)) max_out[l] <= m;
        end
        if (cnt == $clog2(WIN)'(WIN - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
