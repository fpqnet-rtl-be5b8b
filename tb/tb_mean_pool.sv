// tb_mean_pool: 2x2 mean pooling of 3 binary 8x8 maps against a loop model:
// every pooled value (count of ones, 0..4), 16 outputs per frame, 2-clock latency.
module tb_mean_pool;
  import fpqnet_pkg::*;
  localparam int CH = 3, IW = 8;
  logic clk = 0, rst_n = 1;
  initial rst_n = 1'b0;   // a falling edge at time 0 fires the asynchronous resets
  always #2 clk = ~clk;
  video_ctrl_t vin, vout; logic [CH-1:0] din; logic [CH-1:0][2:0] dout;
  mean_pool #(.CH(CH), .IMG_W(IW)) dut (.*);
  int checks = 0, failures = 0, exp_q[$], nout = 0; bit img [CH][IW][IW];
  longint cyc = 0, t_last = 0, t_out = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (vout.de) begin
    nout++; t_out = cyc;
    for (int c = 0; c < CH; c++) begin
      checks++;
      if (int'(dout[c]) != exp_q.pop_front()) begin failures++; $display("out %0d ch %0d wrong", nout, c); end
    end
  end
  initial begin
    vin = '0; din = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      foreach (img[c, y, x]) img[c][y][x] = $urandom_range(0, 1);
      for (int y = 0; y < IW/2; y++) for (int x = 0; x < IW/2; x++) for (int c = 0; c < CH; c++)
        exp_q.push_back(int'(img[c][2*y][2*x]) + int'(img[c][2*y][2*x+1]) + int'(img[c][2*y+1][2*x]) + int'(img[c][2*y+1][2*x+1]));
      nout = 0;
      for (int v = 0; v < IW + 3; v++) for (int h = 0; h < IW + 4; h++) begin
        bit act;
        act = v >= 2 && v < IW + 2 && h >= 2 && h < IW + 2;
        vin.vsync <= (v == 0); vin.hsync <= (h == 0); vin.de <= act;
        for (int c = 0; c < CH; c++) din[c] <= act ? img[c][v-2][h-2] : 1'b0;
        if (act && v == IW + 1 && h == IW + 1) t_last = cyc + 1;
        @(posedge clk);
      end
      vin <= '0; repeat (5) @(posedge clk);
      checks++; if (nout != IW*IW/4) begin failures++; $display("outputs %0d", nout); end
      checks++; if (t_out - t_last != 2) begin failures++; $display("latency %0d", t_out - t_last); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
