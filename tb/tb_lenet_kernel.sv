// tb_lenet_kernel: end-to-end test of one LeNet-5 kernel against the integer
// reference model. Random parameters are written through the parameter port, then
// several random binary images are sent back to back in video timing, some with
// gaps in de. Every predicted class is compared with the model, and the time from
// the last pixel of a frame to class_valid must be the fixed pipeline latency.
module tb_lenet_kernel;
  import fpqnet_pkg::*;
  import lenet_ref_pkg::*;

  localparam int H_SYNC = 2, H_BP = 2, H_ACT = 28, H_FP = 2;
  localparam int V_SYNC = 1, V_BP = 1, V_ACT = 28, V_FP = 1;
  localparam int N_IMG  = 6;
  // C1, S2, C3, S4: 2 clocks each; linear mapping vs + first element: 2;
  // each fc layer: IN_LEN + 3 to its first output; find_max: F7_OUT.
  localparam int LATENCY = 4*2 + 2 + (256+3) + (120+3) + (84+3) + 10;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  param_wr_t   pw;
  video_ctrl_t vin;
  logic        din;
  logic        class_valid;
  logic [3:0]  class_idx;

  lenet_kernel dut (.clk, .rst_n, .pw, .vin, .din, .class_valid, .class_idx);

  int checks = 0, failures = 0;
  int expected[$];
  longint cyc = 0, last_pix[$];
  int n_gaps = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_params();
    byte q[$];
    param_stream(q);
    for (int s = 0; s < 10; s++)
      for (int r = 0; r < section_rows(s); r++)
        for (int c = 0; c < section_cols(s); c++) begin
          pw.we <= 1'b1; pw.sel <= param_sel_e'(s); pw.row <= 8'(r); pw.col <= 12'(c);
          pw.data <= q.pop_front();
          @(posedge clk);
        end
    pw.we <= 1'b0;
  endtask

  task automatic send_frame(const ref img_t img, input bit gaps);
    for (int v = 0; v < V_SYNC + V_BP + V_ACT + V_FP; v++)
      for (int h = 0; h < H_SYNC + H_BP + H_ACT + H_FP; h++) begin
        bit act;
        act = v >= V_SYNC + V_BP && v < V_SYNC + V_BP + V_ACT &&
              h >= H_SYNC + H_BP && h < H_SYNC + H_BP + H_ACT;
        vin.vsync <= (v < V_SYNC); vin.hsync <= (h < H_SYNC);
        if (act && gaps && $urandom_range(0, 3) == 0) begin
          vin.de <= 1'b0; n_gaps++;
          @(posedge clk);
        end
        vin.de <= act;
        din    <= act ? img[v-V_SYNC-V_BP][h-H_SYNC-H_BP] : 1'b0;
        if (act && v == V_SYNC+V_BP+V_ACT-1 && h == H_SYNC+H_BP+H_ACT-1) last_pix.push_back(cyc + 1);  // the pixel is sampled at the coming edge
        @(posedge clk);
      end
    vin <= '0;
  endtask

  // compare results as they come
  always @(posedge clk) begin
    if (class_valid) begin
      int e; longint t0;
      checks++;
      if (expected.size() == 0) begin
        failures++; $display("unexpected result %0d", class_idx);
      end else begin
        e = expected.pop_front();
        t0 = last_pix.pop_front();
        if (int'(class_idx) != e) begin
          failures++; $display("class %0d, expected %0d", class_idx, e);
        end
        checks++;
        if (cyc - t0 != LATENCY) begin
          failures++; $display("latency %0d, expected %0d", cyc - t0, LATENCY);
        end
      end
    end
  end

  initial begin
    img_t img;
    int   f7 [10];
    int   classes_seen [10];
    pw = '0; vin = '0; din = 0;
    foreach (classes_seen[i]) classes_seen[i] = 0;
    randomize_params();
    repeat (4) @(posedge clk);
    rst_n = 1;
    load_params();
    repeat (5) @(posedge clk);
    for (int n = 0; n < N_IMG; n++) begin
      random_image(img, 20 + 10 * n);
      expected.push_back(infer(img, f7));
      send_frame(img, n % 2 == 1);
    end
    repeat (LATENCY + 50) @(posedge clk);
    checks++;
    if (expected.size() != 0) begin
      failures++; $display("%0d results missing", expected.size());
    end
    checks++;
    if (n_gaps == 0) begin
      failures++; $display("no de gaps were sent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
