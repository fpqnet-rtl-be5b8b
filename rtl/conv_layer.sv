// conv_layer: streaming K x K convolution of all input channels for all output
// channels at once, with bias and step activation (layers C1 and C3 of LeNet-5).
//
// Each input channel has a line buffer of K-1 cascaded line FIFOs (IMG_W deep):
// the incoming pixel feeds row 0 of a K x K register window and FIFO 1, the output
// of FIFO r feeds window row r and FIFO r+1. On every valid pixel all windows shift
// by one column, so once K-1 lines and K-1 pixels of a line have arrived, the window
// holds a full neighbourhood. Every output channel then multiplies its
// IN_CH x K x K weights with the windows, sums the products in an adder tree, adds
// its bias and keeps only the sign: 1 if the sum is above zero, else 0 (the step
// function that replaces the sigmoid). With 1-bit inputs (C1) each "multiplier" is a
// selector that passes the weight or zero; wider inputs (C3, values 0..4) use
// multipliers.
//
// Stream timing: the output stream carries the input's vsync/hsync delayed by the
// two pipeline stages (window load, then sum + activation register); de is kept
// only for pixels at row >= K-1 and column >= K-1, so a 28x28 frame gives 24x24
// outputs with no frame buffer. Latency is 2 clocks from an input pixel to the
// output pixel whose window it completes.
//
// Parameters are written through pw (sections WSEL/BSEL), row = output channel,
// col = (ic*K + ky)*K + kx, and held in registers. Window position (ky, kx) = (0, 0)
// is the top-left, oldest pixel of the neighbourhood.
module conv_layer
  import fpqnet_pkg::*;
#(
  parameter int         IN_CH  = 1,
  parameter int         OUT_CH = 6,
  parameter int         KS     = 5,
  parameter int         IMG_W  = 28,
  parameter int         IN_W   = 1,
  parameter param_sel_e WSEL   = P_C1W,
  parameter param_sel_e BSEL   = P_C1B
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  param_wr_t                   pw,
  input  video_ctrl_t                 vin,
  input  logic [IN_CH-1:0][IN_W-1:0]  din,
  output video_ctrl_t                 vout,
  output logic [OUT_CH-1:0]           dout
);
  localparam int NT = IN_CH * KS * KS;               // products per output
  localparam int TW = (IN_W == 1) ? PW : PW + IN_W;  // product width
  localparam int OW = TW + $clog2(NT) + 2;           // sum width
  localparam int PCW = $clog2(IMG_W + 1);

  // ---------------- parameters ----------------
  logic signed [PW-1:0] wgt  [OUT_CH][NT];
  logic signed [PW-1:0] bias [OUT_CH];

  always_ff @(posedge clk) begin
    if (pw.we && pw.sel == WSEL && int'(pw.row) < OUT_CH && int'(pw.col) < NT)
      wgt[pw.row][pw.col] <= pw.data;
    if (pw.we && pw.sel == BSEL && int'(pw.row) < OUT_CH)
      bias[pw.row] <= pw.data;
  end

  // ---------------- position of the incoming pixel ----------------
  logic [PCW-1:0] row, col;
  frame_pos #(.RW(PCW), .CW(PCW)) u_pos (.clk, .rst_n, .vin, .row, .col);

  // ---------------- line FIFOs and windows ----------------
  // win[c][r][j]: input channel c, window row r (0 = newest line), column j (0 = newest)
  logic [IN_W-1:0] win [IN_CH][KS][KS];

  for (genvar c = 0; c < IN_CH; c++) begin : g_ch
    logic [IN_W-1:0] tap [KS];
    assign tap[0] = din[c];
    for (genvar r = 1; r < KS; r++) begin : g_fifo
      line_fifo #(.DEPTH(IMG_W), .W(IN_W)) u_fifo (
        .clk, .rst_n, .en(vin.de), .din(tap[r-1]), .dout(tap[r]));
    end
    always_ff @(posedge clk) begin
      if (vin.de) begin
        for (int r = 0; r < KS; r++) begin
          win[c][r][0] <= tap[r];
          for (int j = 1; j < KS; j++) win[c][r][j] <= win[c][r][j-1];
        end
      end
    end
  end

  // ---------------- stage 1: control delayed alongside the window load ----------------
  video_ctrl_t v1;
  logic        ok1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= '0; ok1 <= 1'b0;
    end else begin
      v1  <= vin;
      ok1 <= vin.de && (int'(row) >= KS-1) && (int'(col) >= KS-1);
    end
  end

  // ---------------- stage 2: products, adder tree, bias, step ----------------
  // term t = (c*KS + ky)*KS + kx multiplies weight t with image offset (ky, kx) of
  // channel c, held in window row KS-1-ky, column KS-1-kx.
  logic [OUT_CH-1:0] act;
  for (genvar o = 0; o < OUT_CH; o++) begin : g_out
    logic [NT-1:0][TW-1:0] prod;
    logic signed [OW-1:0]  sum;
    always_comb begin
      for (int t = 0; t < NT; t++) begin
        logic [IN_W-1:0] px;
        px = win[t / (KS*KS)][KS-1 - (t % (KS*KS)) / KS][KS-1 - t % KS];
        if (IN_W == 1) prod[t] = px[0] ? TW'(wgt[o][t]) : '0;        // selector
        else           prod[t] = TW'($signed({1'b0, px}) * wgt[o][t]); // multiplier
      end
    end
    adder_tree #(.N(NT), .W(TW), .BW(PW), .OW(OW)) u_tree (
      .terms(prod), .bias(bias[o]), .sum(sum));
    assign act[o] = (sum > 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout <= '0; dout <= '0;
    end else begin
      vout.vsync <= v1.vsync;
      vout.hsync <= v1.hsync;
      vout.de    <= ok1;
      dout       <= act;
    end
  end
endmodule
