// tb_conv_layer: C3-style convolution (2 input channels of 0..4 values, 3 outputs,
// 5x5 kernel, 10x10 maps) against a direct loop model. Checks every output value,
// the 6x6 output count per frame and the 2-clock latency of the last output.
module tb_conv_layer;
  import fpqnet_pkg::*;
  localparam int IC = 2, OC = 3, KS = 5, IW = 10, OWD = IW - KS + 1;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  param_wr_t pw; video_ctrl_t vin, vout;
  logic [IC-1:0][2:0] din; logic [OC-1:0] dout;
  conv_layer #(.IN_CH(IC), .OUT_CH(OC), .KS(KS), .IMG_W(IW), .IN_W(3),
               .WSEL(P_C3W), .BSEL(P_C3B)) dut (.*);
  int checks = 0, failures = 0, w [OC][IC*KS*KS], b [OC], img [IC][IW][IW], exp_q[$], nout = 0;
  longint cyc = 0, t_last = 0, t_out = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (vout.de) begin
    nout++; t_out = cyc;
    for (int o = 0; o < OC; o++) begin
      checks++;
      if (dout[o] !== 1'(exp_q.pop_front())) begin failures++; $display("out %0d ch %0d wrong", nout, o); end
    end
  end
  initial begin
    pw = '0; vin = '0; din = '0;
    foreach (w[o, t]) w[o][t] = $urandom_range(0, 255) - 128;
    foreach (b[o]) b[o] = $urandom_range(0, 255) - 128;
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (w[o, t]) begin pw <= '{1'b1, P_C3W, 8'(o), 12'(t), 8'(w[o][t])}; @(posedge clk); end
    foreach (b[o])    begin pw <= '{1'b1, P_C3B, 8'(o), 12'(0), 8'(b[o])};    @(posedge clk); end
    pw <= '0;
    for (int f = 0; f < 2; f++) begin
      foreach (img[c, y, x]) img[c][y][x] = $urandom_range(0, 4);
      for (int y = 0; y < OWD; y++) for (int x = 0; x < OWD; x++)
        for (int o = 0; o < OC; o++) begin
          int s;
          s = b[o];
          for (int c = 0; c < IC; c++) for (int ky = 0; ky < KS; ky++) for (int kx = 0; kx < KS; kx++)
            s += w[o][(c*KS+ky)*KS+kx] * img[c][y+ky][x+kx];
          exp_q.push_back(s > 0);
        end
      nout = 0;
      for (int v = 0; v < IW + 3; v++) for (int h = 0; h < IW + 4; h++) begin
        bit act;
        act = v >= 2 && v < IW + 2 && h >= 2 && h < IW + 2;
        vin.vsync <= (v == 0); vin.hsync <= (h == 0); vin.de <= act;
        for (int c = 0; c < IC; c++) din[c] <= act ? 3'(img[c][v-2][h-2]) : 3'd0;
        if (act && v == IW + 1 && h == IW + 1) t_last = cyc + 1;
        @(posedge clk);
      end
      vin <= '0;
      repeat (5) @(posedge clk);
      checks++; if (nout != OWD*OWD) begin failures++; $display("outputs %0d", nout); end
      checks++; if (t_out - t_last != 2) begin failures++; $display("latency %0d", t_out - t_last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
