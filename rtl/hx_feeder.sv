// hx_feeder: data delivery from the activation buffer to the LIMC Booth encoder:
// scatter-gather (SG), data rearrange, data select and the shift register.
//
// For each input vector of the LIMC (one row of matrix A for Matmul, one output
// pixel's receptive field for Conv) the scatter-gather unit generates activation
// buffer word addresses; the returned words are placed byte-wise into a 450-byte
// line register (the data rearrange step), which the data select step cuts into
// ROWS iteration beats of BANKS bytes (beat i holds byte b*ROWS+i for bank b). The
// beats go into a two-entry shift register whose token register counts the filled
// entries: a beat is written only while the token is below two, and the LIMC reads
// one when it is ready, so the LIMC's compute time is decoupled from the delivery.
//
// Matmul: vector r = activation buffer words base + r*32 + j, j = 0..28, 16 bytes
// each. Conv: the input map is stored one word per pixel (channel c in byte c, up
// to 16 channels), pixel (y, x) at base + y*in_width + x; output pixel (oy, ox)
// gathers the k*k pixels (oy*s+ky, ox*s+kx), kernel position j = ky*k+kx filling
// bytes j*chans .. j*chans+chans-1 of the vector (weights must be mapped the same
// way). Output pixels are produced row-major; count is the number of vectors.
// The token-controlled two-entry shift register follows the published design; the
// address patterns, the single line register and its layout are this design's
// choices (the published data rearrange keeps convolution rows in line buffers).
module hx_feeder #(
  parameter int BANKS = 30,
  parameter int ROWS  = 15,
  parameter int AB_AW = 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     is_conv,
  input  logic [9:0]               count,
  input  logic [AB_AW-1:0]         base,
  input  logic [3:0]               kernel,
  input  logic [3:0]               stride,
  input  logic [9:0]               in_width,
  input  logic [4:0]               chans,
  output logic                     busy,
  // activation buffer read port (1-cycle latency)
  output logic                     ab_re,
  output logic [AB_AW-1:0]         ab_addr,
  input  logic [127:0]             ab_data,
  // to the LIMC core
  output logic                     act_valid,
  input  logic                     act_ready,
  output logic                     act_last,
  output logic [BANKS-1:0][7:0]    act_data,
  output logic [1:0]               token
);

  localparam int VB = BANKS * ROWS;

  typedef enum logic [1:0] {S_IDLE, S_GATHER, S_WAIT, S_EMIT} state_e;
  state_e state;

  logic [9:0]        vec_cnt;          // vectors done
  logic [7:0]        seg, nseg;        // segment index / number of segments
  logic [3:0]        kx, ky;           // kernel position of the segment being read
  logic [9:0]        ox, oy, ow;       // output pixel, output width
  logic              rd_v;             // read in flight
  logic [9:0]        rd_off;           // byte offset of the read in flight
  logic [4:0]        rd_len;           // bytes of the read in flight
  logic [VB-1:0][7:0] line;
  logic [$clog2(ROWS)-1:0] beat;

  // shift register (two entries) with its token register
  logic [1:0][BANKS-1:0][7:0] sr_data;
  logic [1:0]                 sr_last;
  logic                       push, pop;

  assign ow   = (in_width - 10'(kernel)) / 10'(stride) + 10'd1;
  assign busy = (state != S_IDLE) || (token != 0);

  // current segment address
  always_comb begin
    if (is_conv)
      ab_addr = AB_AW'(base + (oy * 10'(stride) + 10'(ky)) * in_width + ox * 10'(stride) + 10'(kx));
    else
      ab_addr = AB_AW'(base + {vec_cnt, 5'd0} + 15'(seg));
  end
  assign ab_re = (state == S_GATHER);

  assign push = (state == S_EMIT) && (token != 2'd2);
  assign pop  = act_valid && act_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; vec_cnt <= '0; seg <= '0; nseg <= '0; kx <= '0; ky <= '0;
      ox <= '0; oy <= '0; rd_v <= 1'b0; rd_off <= '0; rd_len <= '0; line <= '0; beat <= '0;
    end else begin
      rd_v <= 1'b0;
      // placement of returned word into the line register
      if (rd_v) begin
        for (int p = 0; p < VB; p++)
          if (p >= int'(rd_off) && p < int'(rd_off) + int'(rd_len))
            line[p] <= ab_data[8*(p - int'(rd_off)) +: 8];
      end
      case (state)
        S_IDLE: if (start) begin
          vec_cnt <= '0; ox <= '0; oy <= '0;
          state   <= (count == 0) ? S_IDLE : S_GATHER;
          seg <= '0; kx <= '0; ky <= '0; line <= '0;
          nseg <= is_conv ? 8'(kernel * kernel) : 8'((VB + 15) / 16);
        end
        S_GATHER: begin
          rd_v   <= 1'b1;
          rd_off <= is_conv ? 10'(seg * chans) : 10'({seg, 4'd0});
          rd_len <= is_conv ? chans : 5'd16;
          if (kx == kernel - 1) begin kx <= '0; ky <= ky + 1'b1; end
          else kx <= kx + 1'b1;
          if (seg == nseg - 1) state <= S_WAIT;
          seg <= seg + 1'b1;
        end
        S_WAIT: begin
          state <= S_EMIT;
          beat  <= '0;
        end
        S_EMIT: if (push) begin
          if (beat == $clog2(ROWS)'(ROWS - 1)) begin
            vec_cnt <= vec_cnt + 1'b1;
            if (ox == ow - 1) begin ox <= '0; oy <= oy + 1'b1; end
            else ox <= ox + 1'b1;
            seg <= '0; kx <= '0; ky <= '0; line <= '0;
            state <= (vec_cnt + 1'b1 == count) ? S_IDLE : S_GATHER;
          end
          beat <= beat + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // data select: beat i takes byte b*ROWS+i for bank b
  logic [BANKS-1:0][7:0] beat_data;
  always_comb begin
    for (int b = 0; b < BANKS; b++) beat_data[b] = line[b*ROWS + int'(beat)];
  end

  // two-entry shift register; entry 0 is the head
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      token <= '0; sr_data <= '0; sr_last <= '0;
    end else begin
      case ({push, pop})
        2'b10: begin
          sr_data[token[0]] <= beat_data;
          sr_last[token[0]] <= (beat == $clog2(ROWS)'(ROWS - 1));
          token <= token + 1'b1;
        end
        2'b01: begin
          sr_data[0] <= sr_data[1]; sr_last[0] <= sr_last[1];
          token <= token - 1'b1;
        end
        2'b11: begin
          if (token == 2'd1) begin
            sr_data[0] <= beat_data;
            sr_last[0] <= (beat == $clog2(ROWS)'(ROWS - 1));
          end else begin
            sr_data[0] <= sr_data[1]; sr_last[0] <= sr_last[1];
            sr_data[1] <= beat_data;
            sr_last[1] <= (beat == $clog2(ROWS)'(ROWS - 1));
          end
        end
        default: ;
      endcase
    end
  end

  assign act_valid = (token != 0);
  assign act_data  = sr_data[0];
  assign act_last  = sr_last[0];

  a_token_range: assert property (@(posedge clk) disable iff (!rst_n) token <= 2'd2);

endmodule
