// fpqnet_top: the accelerator behind the host link: ten LeNet-5 kernels that share
// one parameter load and classify ten images at the same time.
//
// Data path: 512-bit host beats (s_*) -> axi_serializer (16-bit words) ->
// data_converter. With mode = 0 the words are parameters, broadcast to the
// parameter stores of all kernels; with mode = 1 each word holds one binary pixel
// for each of the ten kernels (bit k -> kernel k), put into video timing by
// hdmi_timing_gen and fed to all kernels in lock step. The ten class indices are
// packed by result_collector into one 40-bit word (kernel k in bits 4k+3..4k) with
// a valid/ready handshake towards the host. The host link itself (transaction and
// link layers, the bridge to AXI, the register interface that would set mode) is
// outside this module: its AXI data side is this module's s_* stream and res_*
// result port.
//
// Timing: a parameter load takes one clock per parameter (44,426 for this
// network); images stream at one pixel word per clock inside the video frame
// (1054 clocks per 28x28 frame with the default porches), and a result word
// appears 489 clocks after the last pixel of a frame.
module fpqnet_top
  import fpqnet_pkg::*;
#(
  parameter int N_KERNELS = 10,
  parameter int BUS_W     = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      mode,
  input  logic                      s_valid,
  output logic                      s_ready,
  input  logic [BUS_W-1:0]          s_data,
  output logic                      params_loaded,
  output logic                      res_valid,
  input  logic                      res_ready,
  output logic [N_KERNELS-1:0][3:0] res_data,
  output logic [15:0]               res_overflows,
  output logic                      pix_stall,
  output logic                      frame_start
);
  logic        w_valid, w_ready;
  logic [15:0] w_data;

  axi_serializer #(.IN_W(BUS_W), .OUT_W(16)) u_ser (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(w_valid), .out_ready(w_ready), .out_data(w_data));

  param_wr_t            pw;
  logic                 pix_valid, pix_ready;
  logic [N_KERNELS-1:0] pix_data;

  data_converter #(.N_KERNELS(N_KERNELS)) u_conv (
    .clk, .rst_n, .mode, .in_valid(w_valid), .in_ready(w_ready), .in_data(w_data),
    .pw, .params_loaded, .pix_valid, .pix_ready, .pix_data);

  video_ctrl_t          vid;
  logic [N_KERNELS-1:0] vid_d;

  hdmi_timing_gen #(.N(N_KERNELS), .H_ACT(IMG_SIDE), .V_ACT(IMG_SIDE)) u_tim (
    .clk, .rst_n, .run(mode), .pix_valid, .pix_ready, .pix_data,
    .vout(vid), .dout(vid_d), .stall(pix_stall), .frame_start);

  logic [N_KERNELS-1:0]      cls_valid;
  logic [N_KERNELS-1:0][3:0] cls_idx;

  for (genvar k = 0; k < N_KERNELS; k++) begin : g_kernel
    lenet_kernel #(.IMG_W(IMG_SIDE)) u_kernel (
      .clk, .rst_n, .pw, .vin(vid), .din(vid_d[k]),
      .class_valid(cls_valid[k]), .class_idx(cls_idx[k]));
  end

  result_collector #(.N_KERNELS(N_KERNELS)) u_res (
    .clk, .rst_n, .cls_valid, .cls_idx, .res_valid, .res_ready, .res_data,
    .overflows(res_overflows));
endmodule
