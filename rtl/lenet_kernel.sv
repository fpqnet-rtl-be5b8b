// lenet_kernel: one complete LeNet-5 inference pipeline for binary 28x28 images.
//
// Layers, each a separate block, connected back to back with no frame buffers:
//   C1 conv_layer (1 -> 6, 5x5, selectors)   -> S2 mean_pool (6 maps)
//   C3 conv_layer (6 -> 16, 5x5, multipliers) -> S4 mean_pool (16 maps)
//   linear_mapping (16x4x4 -> 256-element vector)
//   F5 fc_layer 256 -> 120, step   -> F6 fc_layer 120 -> 84, step
//   F7 fc_layer 84 -> 10, raw sums -> find_max -> class_idx
// The convolution and pooling layers pass feature maps as video streams (vsync,
// hsync, de) and work on a map while it is still arriving, so C1, S2, C3 and S4 run
// overlapped within one frame. The fully connected layers take a serial vector
// each, marked only by a vs pulse, and run one after the other.
//
// Timing: the class is ready a fixed number of clocks after the last pixel of a
// frame: 2+2+2+2 clocks for C1..S4, 1 for the vs of the linear mapping, then
// (256+3) + (120+3) + (84+3) + 11 for F5, F6, F7 and the comparator (see each
// block); 489 clocks in all for 28x28 frames. A new frame may follow as soon as the
// frame timing allows; F5..F7 finish long before the next frame's S4 output.
// All kernels load the same broadcast parameters (pw).
module lenet_kernel
  import fpqnet_pkg::*;
#(
  parameter int IMG_W = 28
) (
  input  logic         clk,
  input  logic         rst_n,
  input  param_wr_t    pw,
  input  video_ctrl_t  vin,
  input  logic         din,
  output logic         class_valid,
  output logic [3:0]   class_idx
);
  localparam int W1 = IMG_W - K + 1;   // C1 output side
  localparam int W2 = W1 / 2;          // S2
  localparam int W3 = W2 - K + 1;      // C3
  localparam int W4 = W3 / 2;          // S4
  localparam int F7_AW = PW + $clog2(F6_OUT) + 2;

  video_ctrl_t                   v_c1, v_s2, v_c3, v_s4;
  logic [C1_OUT-1:0]             d_c1;
  logic [C1_OUT-1:0][POOL_W-1:0] d_s2;
  logic [C3_OUT-1:0]             d_c3;
  logic [C3_OUT-1:0][POOL_W-1:0] d_s4;

  conv_layer #(.IN_CH(1), .OUT_CH(C1_OUT), .KS(K), .IMG_W(IMG_W), .IN_W(1),
               .WSEL(P_C1W), .BSEL(P_C1B)) u_c1 (
    .clk, .rst_n, .pw, .vin, .din(din), .vout(v_c1), .dout(d_c1));

  mean_pool #(.CH(C1_OUT), .IMG_W(W1)) u_s2 (
    .clk, .rst_n, .vin(v_c1), .din(d_c1), .vout(v_s2), .dout(d_s2));

  conv_layer #(.IN_CH(C1_OUT), .OUT_CH(C3_OUT), .KS(K), .IMG_W(W2), .IN_W(POOL_W),
               .WSEL(P_C3W), .BSEL(P_C3B)) u_c3 (
    .clk, .rst_n, .pw, .vin(v_s2), .din(d_s2), .vout(v_c3), .dout(d_c3));

  mean_pool #(.CH(C3_OUT), .IMG_W(W3)) u_s4 (
    .clk, .rst_n, .vin(v_c3), .din(d_c3), .vout(v_s4), .dout(d_s4));

  logic              lm_vs, lm_v;
  logic [POOL_W-1:0] lm_d;
  linear_mapping #(.CH(C3_OUT), .MAP(W4)) u_lm (
    .clk, .rst_n, .vin(v_s4), .din(d_s4), .ovs(lm_vs), .ovalid(lm_v), .odata(lm_d));

  logic f5_vs, f5_v, f5_d, f6_vs, f6_v, f6_d, f7_vs, f7_v;
  logic [F7_AW-1:0] f7_d;

  fc_layer #(.IN_LEN(C3_OUT*W4*W4), .OUT_LEN(F5_OUT), .IN_W(POOL_W), .ACT(1'b1),
             .WSEL(P_F5W), .BSEL(P_F5B)) u_f5 (
    .clk, .rst_n, .pw, .ivs(lm_vs), .ivalid(lm_v), .idata(lm_d),
    .ovs(f5_vs), .ovalid(f5_v), .odata(f5_d));

  fc_layer #(.IN_LEN(F5_OUT), .OUT_LEN(F6_OUT), .IN_W(1), .ACT(1'b1),
             .WSEL(P_F6W), .BSEL(P_F6B)) u_f6 (
    .clk, .rst_n, .pw, .ivs(f5_vs), .ivalid(f5_v), .idata(f5_d),
    .ovs(f6_vs), .ovalid(f6_v), .odata(f6_d));

  fc_layer #(.IN_LEN(F6_OUT), .OUT_LEN(F7_OUT), .IN_W(1), .ACT(1'b0),
             .WSEL(P_F7W), .BSEL(P_F7B)) u_f7 (
    .clk, .rst_n, .pw, .ivs(f6_vs), .ivalid(f6_v), .idata(f6_d),
    .ovs(f7_vs), .ovalid(f7_v), .odata(f7_d));

  logic signed [F7_AW-1:0] best_val;
  find_max #(.N(F7_OUT), .W(F7_AW)) u_max (
    .clk, .rst_n, .ivs(f7_vs), .ivalid(f7_v), .idata(f7_d),
    .class_valid, .class_idx, .class_val(best_val));
endmodule
