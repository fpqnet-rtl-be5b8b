// frame_pos: row and column of the current pixel in a vsync/hsync/de stream.
//
// vsync rising starts a frame (row and column cleared). hsync rising starts a
// line: the column is cleared and, if the line that just ended carried any valid
// pixel, the row advances. Lines with no valid pixel, which appear in the output
// of a layer that drops border or odd positions, are thus not counted. Each de
// pixel takes the current (row, col) and then advances the column. The outputs are
// the registered counters, valid for the pixel on the same cycle as its de.
module frame_pos
  import fpqnet_pkg::*;
#(
  parameter int RW = 5,
  parameter int CW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  video_ctrl_t   vin,
  output logic [RW-1:0] row,
  output logic [CW-1:0] col
);
  logic vs_q, hs_q, had_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_q <= 1'b0; hs_q <= 1'b0; had_data <= 1'b0;
      row  <= '0;   col  <= '0;
    end else begin
      vs_q <= vin.vsync;
      hs_q <= vin.hsync;
      if (vin.vsync && !vs_q) begin
        row <= '0; col <= '0; had_data <= 1'b0;
      end else if (vin.hsync && !hs_q) begin
        col <= '0;
        had_data <= 1'b0;
        if (had_data) row <= row + 1'b1;
      end else if (vin.de) begin
        col <= col + 1'b1;
        had_data <= 1'b1;
      end
    end
  end
endmodule
