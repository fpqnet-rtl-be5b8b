// mean_pool: 2x2, stride-2 mean pooling of binary feature maps (layers S2 and S4).
//
// The inputs are the 0/1 outputs of the step activation, so the mean of a 2x2
// block is 0, 1/4, 1/2, 3/4 or 1. The layer outputs four times the mean, i.e. the
// plain count of ones (0..4, 3 bits), which needs only adders and no divider.
// Structure as in the convolution layer: one line FIFO (IMG_W deep, all channels
// side by side) gives the line above, and a 2x2 register window shifts on every
// valid pixel. A result is emitted for pixels on odd rows and odd columns, so an
// IMG_W x IMG_W map becomes IMG_W/2 x IMG_W/2.
//
// Stream timing: vsync/hsync are passed on delayed by 2 clocks; de is kept for the
// odd/odd positions. Latency is 2 clocks from the input pixel completing a block.
module mean_pool
  import fpqnet_pkg::*;
#(
  parameter int CH    = 6,
  parameter int IMG_W = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  video_ctrl_t                vin,
  input  logic [CH-1:0]              din,
  output video_ctrl_t                vout,
  output logic [CH-1:0][POOL_W-1:0]  dout
);
  localparam int PCW = $clog2(IMG_W + 1);

  logic [PCW-1:0] row, col;
  frame_pos #(.RW(PCW), .CW(PCW)) u_pos (.clk, .rst_n, .vin, .row, .col);

  logic [CH-1:0] above;
  line_fifo #(.DEPTH(IMG_W), .W(CH)) u_fifo (
    .clk, .rst_n, .en(vin.de), .din(din), .dout(above));

  // w_cur/w_up: [0] newest column, [1] previous column
  logic [CH-1:0] w_cur [2];
  logic [CH-1:0] w_up  [2];
  always_ff @(posedge clk) begin
    if (vin.de) begin
      w_cur[0] <= din;   w_cur[1] <= w_cur[0];
      w_up[0]  <= above; w_up[1]  <= w_up[0];
    end
  end

  video_ctrl_t v1;
  logic        ok1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0; ok1 <= 1'b0;
    end else begin
      v1  <= vin;
      ok1 <= vin.de && row[0] && col[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout <= '0; dout <= '0;
    end else begin
      vout.vsync <= v1.vsync;
      vout.hsync <= v1.hsync;
      vout.de    <= ok1;
      for (int c = 0; c < CH; c++)
        dout[c] <= POOL_W'(w_cur[0][c]) + POOL_W'(w_cur[1][c])
                 + POOL_W'(w_up[0][c])  + POOL_W'(w_up[1][c]);
    end
  end
endmodule
