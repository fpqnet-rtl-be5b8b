// tb_linear_mapping: 16 channels of 4x4 values in, checks that the 256-element
// vector comes out in order channel*16 + row*4 + col, after one vs pulse that
// follows the last input pixel by one clock, with no gaps.
module tb_linear_mapping;
  import fpqnet_pkg::*;
  localparam int CH = 16, M = 4;
  logic clk = 0, rst_n = 1;
  initial rst_n = 1'b0;   // a falling edge at time 0 fires the asynchronous resets
  always #2 clk = ~clk;
  video_ctrl_t vin; logic [CH-1:0][2:0] din; logic ovs, ovalid; logic [2:0] odata;
  linear_mapping #(.CH(CH), .MAP(M)) dut (.clk, .rst_n, .vin, .din, .ovs, .ovalid, .odata);
  int checks = 0, failures = 0, vals [CH][M][M], n = 0, nvs = 0;
  longint cyc = 0, t_last = 0, t_vs = 0, t_first = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin
    if (ovs) begin nvs++; t_vs = cyc; n = 0; end
    if (ovalid) begin
      checks++;
      if (n == 0) t_first = cyc;
      if (int'(odata) != vals[n/16][(n%16)/M][n%M]) begin failures++; $display("element %0d wrong", n); end
      n++;
    end
  end
  initial begin
    vin = '0; din = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      foreach (vals[c, y, x]) vals[c][y][x] = $urandom_range(0, 4);
      for (int v = 0; v < M + 3; v++) for (int h = 0; h < 2*M + 4; h++) begin
        bit act;
        act = v >= 2 && v < M + 2 && h >= 2 && h < 2*M + 2 && h % 2 == 1;  // every other clock
        vin.vsync <= (v == 0); vin.hsync <= (h == 0); vin.de <= act;
        for (int c = 0; c < CH; c++) din[c] <= act ? 3'(vals[c][v-2][(h-2)/2]) : 3'd0;
        if (act && v == M + 1 && h == 2*M + 1) t_last = cyc + 1;
        @(posedge clk);
      end
      vin <= '0;
      repeat (300) @(posedge clk);
      checks++; if (n != CH*M*M) begin failures++; $display("elements %0d", n); end
      checks++; if (t_vs - t_last != 1 || t_first - t_vs != 1) begin failures++; $display("vs timing"); end
    end
    checks++; if (nvs != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
