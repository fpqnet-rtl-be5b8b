// fpqnet_pkg: types and constants shared by the LeNet-5 kernels and the host-data path.
//
// Network shape (28x28 binary input, LeNet-5 with a reduced input):
//   C1 5x5 conv 1->6   : 28x28 -> 24x24, step activation (1 bit)
//   S2 2x2 mean pool   : 24x24 -> 12x12, value 0..4 (= 4 x mean)
//   C3 5x5 conv 6->16  : 12x12 -> 8x8,  step activation
//   S4 2x2 mean pool   : 8x8   -> 4x4,  value 0..4
//   linear mapping     : 16x4x4 -> 1x256
//   F5 256->120, F6 120->84 (step activation), F7 84->10 (raw), find max.
// Weights and biases are 8-bit two's complement. Biases are taken to be already
// scaled to the accumulator's units, so they are simply sign-extended and added.
//
// Feature maps travel between layers as video-style streams: a vsync pulse opens a
// frame, an hsync pulse opens each line, and de marks a valid pixel (video_ctrl_t).
// Parameters travel from the host-data converter to every kernel as param_wr_t writes.
package fpqnet_pkg;

  localparam int IMG_SIDE = 28;         // input image side
  localparam int K       = 5;           // convolution kernel side
  localparam int C1_OUT  = 6;
  localparam int C3_OUT  = 16;
  localparam int C1_W    = IMG_SIDE - K + 1;   // 24
  localparam int S2_W    = C1_W / 2;        // 12
  localparam int C3_W    = S2_W - K + 1;    // 8
  localparam int S4_W    = C3_W / 2;        // 4
  localparam int F5_IN   = C3_OUT * S4_W * S4_W;  // 256
  localparam int F5_OUT  = 120;
  localparam int F6_OUT  = 84;
  localparam int F7_OUT  = 10;
  localparam int PW      = 8;           // parameter width
  localparam int POOL_W  = 3;           // pooled value 0..4

  // Parameter sections, in the order the host sends them.
  typedef enum logic [3:0] {
    P_C1W = 4'd0, P_C1B = 4'd1, P_C3W = 4'd2, P_C3B = 4'd3,
    P_F5W = 4'd4, P_F5B = 4'd5, P_F6W = 4'd6, P_F6B = 4'd7,
    P_F7W = 4'd8, P_F7B = 4'd9
  } param_sel_e;


  // Each section is a matrix of rows x cols parameters, sent row by row.
  //   conv weights : row = output channel, col = (ic * K + ky) * K + kx
  //   fc weights   : row = output neuron,  col = input index
  //   biases       : row = output channel/neuron, col = 0
  function automatic int section_rows(input int s);
    case (s)
      0, 1: return C1_OUT;
      2, 3: return C3_OUT;
      4, 5: return F5_OUT;
      6, 7: return F6_OUT;
      8, 9: return F7_OUT;
      default: return 0;
    endcase
  endfunction

  function automatic int section_cols(input int s);
    case (s)
      0: return K * K;            // C1: one input channel
      2: return C1_OUT * K * K;   // C3: six input channels
      4: return F5_IN;
      6: return F5_OUT;
      8: return F6_OUT;
      default: return 1;          // biases
    endcase
  endfunction

  // One parameter write, broadcast to every layer of every kernel.
  typedef struct packed {
    logic                 we;
    param_sel_e           sel;
    logic [7:0]           row;
    logic [11:0]          col;
    logic signed [PW-1:0] data;
  } param_wr_t;

  // Video-style stream control, one per feature-map stream.
  typedef struct packed {
    logic vsync;
    logic hsync;
    logic de;
  } video_ctrl_t;

endpackage
