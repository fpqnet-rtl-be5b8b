// tb_fpqnet_top: end-to-end test of the ten-kernel accelerator at its default size.
//
// The host side is modelled by packing 16-bit words into 512-bit beats: first all
// 44,426 parameters (one per word, low byte), then image words in which bit k is
// the pixel of kernel k. Ten different random images per group are classified at
// once; each result word is compared with the integer reference model for every
// kernel. The test also makes each mechanism happen and counts it: host back
// pressure on the serializer, pixel stalls in the video timing (the host leaves
// gaps between beats), result back pressure (res_ready low for a while), and a
// second group of images streamed right behind the first.
module tb_fpqnet_top;
  import fpqnet_pkg::*;
  import lenet_ref_pkg::*;

  localparam int NK = 10;
  localparam int N_GROUPS = 4;   // 4 x 784 pixel words fill exactly 98 beats

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic             mode;
  logic             s_valid, s_ready;
  logic [511:0]     s_data;
  logic             params_loaded, res_valid, res_ready;
  logic [NK-1:0][3:0] res_data;
  logic [15:0]      res_overflows;
  logic             pix_stall, frame_start;

  fpqnet_top dut (.*);

  int checks = 0, failures = 0;
  int n_backpressure = 0, n_stall = 0, n_res_wait = 0, n_results = 0;
  int exp_q[$];   // expected classes, NK per image group

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (s_valid && !s_ready) n_backpressure++;  // sampled before the edge's updates
    if (pix_stall) n_stall++;
    if (res_valid && !res_ready) n_res_wait++;
  end

  // Send a list of 16-bit words as 512-bit beats; every third beat numbered
  // gap_from .. gap_to-1 is followed by 40 idle clocks.
  // The host model drives and samples on the falling edge: a beat offered while
  // s_ready is high at the falling edge is taken at the next rising edge.
  task automatic send_words(ref logic [15:0] words[$], input int gap_from, input int gap_to);
    int nb = 0;
    while (words.size() > 0) begin
      logic [511:0] beat = '0;
      for (int i = 0; i < 32 && words.size() > 0; i++) beat[i*16 +: 16] = words.pop_front();
      @(negedge clk);
      s_valid = 1'b1; s_data = beat;
      while (!s_ready) @(negedge clk);
      @(posedge clk);
      nb++;
      if (nb >= gap_from && nb < gap_to && nb % 3 == 0) begin
        @(negedge clk); s_valid = 1'b0;
        repeat (40) @(negedge clk);
      end
    end
    @(negedge clk); s_valid = 1'b0;
  endtask

  // result checker: every other result is left waiting for 20 clocks
  initial begin
    res_ready = 1'b0;
    forever begin
      @(negedge clk);
      if (res_valid) begin
        int e [NK];
        if (n_results % 2 == 1) repeat (20) @(negedge clk);
        for (int k = 0; k < NK; k++) e[k] = exp_q.pop_front();
        for (int k = 0; k < NK; k++) begin
          checks++;
          if (int'(res_data[k]) != e[k]) begin
            failures++;
            $display("group %0d kernel %0d: class %0d, expected %0d", n_results, k, res_data[k], e[k]);
          end
        end
        n_results++;
        res_ready = 1'b1;
        @(negedge clk);
        res_ready = 1'b0;
      end
    end
  end

  initial begin
    logic [15:0] words[$];
    byte         pq[$];
    img_t        imgs [NK];
    int          f7 [10];
    mode = 1'b0; s_valid = 1'b0; s_data = '0;
    randomize_params();
    repeat (4) @(posedge clk);
    rst_n = 1;

    // parameters
    param_stream(pq);
    foreach (pq[i]) words.push_back(16'(8'(pq[i])));
    send_words(words, 0, 0);
    repeat (40) @(posedge clk);
    checks++;
    if (!params_loaded) begin failures++; $display("params_loaded not set"); end

    // image groups: ten different images per group, one bit per kernel in each word
    mode = 1'b1;
    for (int g = 0; g < N_GROUPS; g++) begin
      for (int k = 0; k < NK; k++) begin
        img_t one;
        random_image(one, 15 + 7 * k + 3 * g);
        imgs[k] = one;
        exp_q.push_back(infer(one, f7));
      end
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          logic [15:0] wd = '0;
          for (int k = 0; k < NK; k++) wd[k] = imgs[k][y][x];
          words.push_back(wd);
        end
    end
    // one continuous pixel stream; host gaps during the second group stall the video timing
    send_words(words, 30, 50);
    wait (n_results == N_GROUPS);
    repeat (20) @(posedge clk);

    checks++; if (n_backpressure == 0) begin failures++; $display("no serializer back pressure"); end
    checks++; if (n_stall == 0)        begin failures++; $display("no pixel stall"); end
    checks++; if (n_res_wait == 0)     begin failures++; $display("no result back pressure"); end
    checks++; if (res_overflows != 0)  begin failures++; $display("result overflow"); end
    $display("back pressure %0d, pixel stalls %0d, result waits %0d, results %0d",
             n_backpressure, n_stall, n_res_wait, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
