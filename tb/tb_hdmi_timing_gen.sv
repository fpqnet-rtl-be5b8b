// tb_hdmi_timing_gen: small 6x4 frames. Checks the line length and sync widths,
// that every frame carries exactly 24 pixels in order, that host gaps stall the
// counters (no pixel is lost or repeated) and that nothing runs while run is low.
module tb_hdmi_timing_gen;
  import fpqnet_pkg::*;
  localparam int N = 4, HS = 2, HB = 1, HA = 6, HF = 2, VS = 1, VB = 1, VA = 4, VF = 1;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic run, pix_valid, pix_ready, stall, frame_start; logic [N-1:0] pix_data, dout; video_ctrl_t vout;
  hdmi_timing_gen #(.N(N), .H_SYNC(HS), .H_BP(HB), .H_ACT(HA), .H_FP(HF),
                    .V_SYNC(VS), .V_BP(VB), .V_ACT(VA), .V_FP(VF)) dut (.*);
  int checks = 0, failures = 0, sent = 0, got = 0, nstall = 0, hs_len = 0, hs_period = 0, last_hs = -1, frames = 0, px_in_frame = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin
    if (stall) nstall++;
    if (vout.de) begin
      checks++; if (dout != N'(got)) begin failures++; $display("pixel %0d wrong", got); end
      got++; px_in_frame++;
    end
    if (vout.vsync && px_in_frame != 0) begin
      checks++; if (px_in_frame != HA*VA) begin failures++; $display("frame had %0d pixels", px_in_frame); end
      px_in_frame = 0; frames++;
    end
  end
  initial begin
    run = 0; pix_valid = 0; pix_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);
    checks++; if (vout != '0) begin failures++; $display("active while run low"); end
    @(negedge clk); run = 1;
    // measure one blank line: hsync width and line length
    for (int i = 0; i < 3 * (HS+HB+HA+HF); i++) begin
      @(posedge clk);
      if (vout.hsync) begin hs_len++; if (last_hs >= 0 && cyc - last_hs > 1) hs_period = int'(cyc - last_hs); last_hs = int'(cyc); end
    end
    checks++; if (hs_period != HS+HB+HA+HF - HS + 1) begin failures++; $display("line length wrong %0d", hs_period); end
    while (sent < 3 * HA * VA) begin
      @(negedge clk);
      pix_valid = ($urandom_range(0, 3) != 0); pix_data = N'(sent);
      if (pix_valid && pix_ready) sent++;
    end
    @(negedge clk); pix_valid = 0;
    repeat (100) @(posedge clk);
    checks++; if (got != sent) begin failures++; $display("sent %0d got %0d", sent, got); end
    checks++; if (nstall == 0) begin failures++; $display("no stall"); end
    checks++; if (frames < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
