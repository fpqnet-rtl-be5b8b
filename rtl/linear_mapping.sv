// linear_mapping: turns the CH parallel MAP x MAP pooled maps of S4 into one
// serial 1 x (CH*MAP*MAP) vector for the fully connected layers (first step of C5).
//
// Each channel has a small RAM of MAP*MAP entries. A valid S4 pixel at (row, col)
// is written into every channel's RAM at address row*MAP + col, all channels in the
// same cycle. When the last pixel of the map has been written, the block sends a
// one-cycle vs pulse (the start of a vector, the only synchronisation the fully
// connected layers use) and then reads the vector out, one element per clock:
// element n = channel n / (MAP*MAP), address n % (MAP*MAP), i.e. channel after
// channel, each map flattened row by row. Read-out takes CH*MAP*MAP clocks and must
// end before the next frame's S4 output starts, which the frame blanking
// guarantees.
module linear_mapping
  import fpqnet_pkg::*;
#(
  parameter int CH  = 16,
  parameter int MAP = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  video_ctrl_t                vin,
  input  logic [CH-1:0][POOL_W-1:0]  din,
  output logic                       ovs,
  output logic                       ovalid,
  output logic [POOL_W-1:0]          odata
);
  localparam int AREA = MAP * MAP;
  localparam int LEN  = CH * AREA;
  localparam int PCW  = $clog2(MAP + 1);
  localparam int AW   = $clog2(AREA);
  localparam int CW   = (CH > 1) ? $clog2(CH) : 1;

  logic [PCW-1:0] row, col;
  frame_pos #(.RW(PCW), .CW(PCW)) u_pos (.clk, .rst_n, .vin, .row, .col);

  logic [POOL_W-1:0] ram [CH][AREA];
  always_ff @(posedge clk) begin
    if (vin.de)
      for (int c = 0; c < CH; c++) ram[c][row * MAP + col] <= din[c];
  end

  // read-out sequencer: vs pulse one clock after the last write, elements after it
  logic          reading;
  logic [CW-1:0] rd_ch;
  logic [AW-1:0] rd_ad;
  wire  last_in = vin.de && int'(row) == MAP-1 && int'(col) == MAP-1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading <= 1'b0; rd_ch <= '0; rd_ad <= '0; ovs <= 1'b0;
    end else begin
      ovs <= last_in;
      if (ovs) begin
        reading <= 1'b1; rd_ch <= '0; rd_ad <= '0;
      end else if (reading) begin
        rd_ad <= rd_ad + 1'b1;
        if (rd_ad == AW'(AREA-1)) begin
          rd_ad <= '0;
          rd_ch <= rd_ch + 1'b1;
          if (rd_ch == CW'(CH-1)) reading <= 1'b0;
        end
      end
    end
  end

  assign ovalid = reading;
  assign odata  = ram[rd_ch][rd_ad];
endmodule
