// tb_result_collector: 4 kernels. Results arriving together, and arriving at
// different clocks, must come out as one word each in order; the word must be held
// while res_ready is low; a result repeated before its group is complete counts
// as an overflow.
module tb_result_collector;
  localparam int NK = 4;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic [NK-1:0] cls_valid; logic [NK-1:0][3:0] cls_idx, res_data; logic res_valid, res_ready; logic [15:0] overflows;
  result_collector #(.N_KERNELS(NK)) dut (.*);
  int checks = 0, failures = 0;
  logic [NK-1:0][3:0] eq[$];
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    res_ready = 0;
    forever begin
      @(negedge clk);
      if (res_valid) begin
        logic [NK-1:0][3:0] held;
        held = res_data;
        repeat ($urandom_range(0, 6)) begin
          @(negedge clk);
          checks++; if (!res_valid || res_data != held) begin failures++; $display("word not held"); end
        end
        checks++;
        if (res_data != eq.pop_front()) begin failures++; $display("result word wrong"); end
        res_ready = 1; @(negedge clk); res_ready = 0;
      end
    end
  end
  initial begin
    cls_valid = '0; cls_idx = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < 20; g++) begin
      logic [NK-1:0][3:0] w;
      bit together;
      together = (g % 2 == 0);
      for (int k = 0; k < NK; k++) w[k] = 4'($urandom_range(0, 9));
      eq.push_back(w);
      for (int k = 0; k < NK; k++) begin
        @(negedge clk);
        cls_valid = together ? '1 : NK'(1) << k; cls_idx = w;
        if (together) break;
      end
      @(negedge clk); cls_valid = '0;
      repeat (12) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++; if (eq.size() != 0) begin failures++; $display("%0d words missing", eq.size()); end
    checks++; if (overflows != 0) failures++;
    // overflow: kernel 0 reports twice before the others
    @(negedge clk); cls_valid = 4'b0001; @(negedge clk); cls_valid = 4'b0001; @(negedge clk); cls_valid = '0;
    @(negedge clk);
    checks++; if (overflows != 1) begin failures++; $display("overflow count %0d", overflows); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
