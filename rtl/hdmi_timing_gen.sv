// hdmi_timing_gen: puts the incoming image pixels into video timing.
//
// A horizontal counter runs through sync (H_SYNC clocks, hsync high), back porch
// (H_BP), active video (H_ACT) and front porch (H_FP); a vertical line counter runs
// through V_SYNC lines of vsync, V_BP, V_ACT active lines and V_FP. Every line
// starts with an hsync pulse. In each active position one pixel is taken from the
// pix_valid/pix_ready handshake and sent out with de high; the N bits of a pixel
// word go to N kernels at once. If the host has no pixel ready in an active
// position the counters hold (a stall) and de stays low, so every frame carries
// exactly H_ACT x V_ACT pixels in raster order however the host data arrives.
// The layers downstream count only de pixels and hsync edges, so such gaps are
// harmless. While run is low the counters are held at the start of a frame.
// Outputs are registered: a pixel accepted in cycle t appears on dout in t+1.
module hdmi_timing_gen
  import fpqnet_pkg::*;
#(
  parameter int N      = 10,
  parameter int H_SYNC = 2,
  parameter int H_BP   = 2,
  parameter int H_ACT  = 28,
  parameter int H_FP   = 2,
  parameter int V_SYNC = 1,
  parameter int V_BP   = 1,
  parameter int V_ACT  = 28,
  parameter int V_FP   = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          pix_valid,
  output logic          pix_ready,
  input  logic [N-1:0]  pix_data,
  output video_ctrl_t   vout,
  output logic [N-1:0]  dout,
  output logic          stall,
  output logic          frame_start
);
  localparam int H_TOT = H_SYNC + H_BP + H_ACT + H_FP;
  localparam int V_TOT = V_SYNC + V_BP + V_ACT + V_FP;
  localparam int HW = $clog2(H_TOT);
  localparam int VW = $clog2(V_TOT);

  logic [HW-1:0] h;
  logic [VW-1:0] v;

  wire h_act  = int'(h) >= H_SYNC + H_BP && int'(h) < H_SYNC + H_BP + H_ACT;
  wire v_act  = int'(v) >= V_SYNC + V_BP && int'(v) < V_SYNC + V_BP + V_ACT;
  wire active = run && h_act && v_act;

  assign pix_ready   = active;
  assign stall       = active && !pix_valid;
  assign frame_start = run && h == '0 && v == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0; v <= '0;
    end else if (!run) begin
      h <= '0; v <= '0;
    end else if (!stall) begin
      if (h == HW'(H_TOT-1)) begin
        h <= '0;
        v <= (v == VW'(V_TOT-1)) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout <= '0; dout <= '0;
    end else begin
      vout.vsync <= run && int'(v) < V_SYNC;
      vout.hsync <= run && int'(h) < H_SYNC;
      vout.de    <= active && pix_valid;
      dout       <= pix_data;
    end
  end
endmodule
