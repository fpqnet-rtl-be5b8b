// tb_find_max: random signed vectors of 10 values, including ties, against a
// first-maximum search; class_valid must come one clock after the 10th value.
module tb_find_max;
  localparam int N = 10, W = 12;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic ivs, ivalid, class_valid; logic signed [W-1:0] idata, class_val; logic [3:0] class_idx;
  find_max #(.N(N), .W(W)) dut (.*);
  int checks = 0, failures = 0, v [N], eq[$];
  longint cyc = 0, t_last = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (class_valid) begin
    checks += 2;
    if (int'(class_idx) != eq.pop_front()) begin failures++; $display("index wrong"); end
    if (cyc - t_last != 1) begin failures++; $display("timing wrong"); end
  end
  initial begin
    ivs = 0; ivalid = 0; idata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 50; r++) begin
      int best;
      best = 0;
      foreach (v[i]) v[i] = (r % 3 == 0) ? $urandom_range(0, 3) - 2 : $urandom_range(0, 2000) - 1000;
      for (int i = 1; i < N; i++) if (v[i] > v[best]) best = i;
      eq.push_back(best);
      ivs <= 1; @(posedge clk); ivs <= 0;
      for (int i = 0; i < N; i++) begin
        ivalid <= 1; idata <= W'(v[i]); if (i == N-1) t_last = cyc + 1; @(posedge clk);
      end
      ivalid <= 0; repeat (3) @(posedge clk);
    end
    checks++; if (eq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
