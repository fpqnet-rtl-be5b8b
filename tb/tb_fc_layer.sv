// tb_fc_layer: a 40 -> 12 layer with 3-bit inputs and step activation, and a
// 20 -> 5 layer with 1-bit inputs and raw outputs, against dot products computed
// here. Also checks that the output vs comes IN_LEN + 2 clocks after the first
// input element (one element per clock) and that the outputs follow without gaps.
module tb_fc_layer;
  import fpqnet_pkg::*;
  localparam int A_IN = 40, A_OUT = 12, B_IN = 20, B_OUT = 5;
  localparam int B_AW = PW + $clog2(B_IN) + 2;
  logic clk = 0, rst_n = 1;
  initial rst_n = 1'b0;   // a falling edge at time 0 fires the asynchronous resets
  always #2 clk = ~clk;
  param_wr_t pw;
  logic ivs, ivalid, b_ivalid; logic [2:0] idata;
  logic a_vs, a_v, a_d, b_vs, b_v; logic [B_AW-1:0] b_d;
  fc_layer #(.IN_LEN(A_IN), .OUT_LEN(A_OUT), .IN_W(3), .ACT(1'b1), .WSEL(P_F5W), .BSEL(P_F5B)) dut_a (
    .clk, .rst_n, .pw, .ivs, .ivalid, .idata, .ovs(a_vs), .ovalid(a_v), .odata(a_d));
  fc_layer #(.IN_LEN(B_IN), .OUT_LEN(B_OUT), .IN_W(1), .ACT(1'b0), .WSEL(P_F6W), .BSEL(P_F6B)) dut_b (
    .clk, .rst_n, .pw, .ivs, .ivalid(b_ivalid), .idata(idata[0:0]), .ovs(b_vs), .ovalid(b_v), .odata(b_d));
  int checks = 0, failures = 0, wa [A_OUT][A_IN], ba [A_OUT], wb [B_OUT][B_IN], bb [B_OUT], x [A_IN];
  int qa[$], qb[$];
  longint cyc = 0, t_first = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin
    if (a_vs) begin checks++; if (cyc - t_first != A_IN + 2) begin failures++; $display("A latency %0d", cyc - t_first); end end
    if (b_vs) begin checks++; if (cyc - t_first != B_IN + 2) begin failures++; $display("B latency %0d", cyc - t_first); end end
    if (a_v) begin checks++; if (int'(a_d) != qa.pop_front()) begin failures++; $display("A output wrong"); end end
    if (b_v) begin checks++; if (int'($signed(b_d)) != qb.pop_front()) begin failures++; $display("B output wrong"); end end
  end
  initial begin
    pw = '0; ivs = 0; ivalid = 0; b_ivalid = 0; idata = '0;
    foreach (wa[o, i]) wa[o][i] = $urandom_range(0, 255) - 128;
    foreach (ba[o]) ba[o] = $urandom_range(0, 255) - 128;
    foreach (wb[o, i]) wb[o][i] = $urandom_range(0, 255) - 128;
    foreach (bb[o]) bb[o] = $urandom_range(0, 255) - 128;
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (wa[o, i]) begin pw <= '{1'b1, P_F5W, 8'(o), 12'(i), 8'(wa[o][i])}; @(posedge clk); end
    foreach (ba[o])    begin pw <= '{1'b1, P_F5B, 8'(o), 12'(0), 8'(ba[o])};    @(posedge clk); end
    foreach (wb[o, i]) begin pw <= '{1'b1, P_F6W, 8'(o), 12'(i), 8'(wb[o][i])}; @(posedge clk); end
    foreach (bb[o])    begin pw <= '{1'b1, P_F6B, 8'(o), 12'(0), 8'(bb[o])};    @(posedge clk); end
    pw <= '0;
    for (int r = 0; r < 3; r++) begin
      foreach (x[i]) x[i] = $urandom_range(0, 4);
      for (int o = 0; o < A_OUT; o++) begin int s; s = ba[o]; for (int i = 0; i < A_IN; i++) s += wa[o][i] * x[i]; qa.push_back(s > 0); end
      for (int o = 0; o < B_OUT; o++) begin int s; s = bb[o]; for (int i = 0; i < B_IN; i++) s += (x[i] % 2) * wb[o][i]; qb.push_back(s); end
      ivs <= 1; @(posedge clk); ivs <= 0;
      for (int i = 0; i < A_IN; i++) begin
        ivalid <= 1; b_ivalid <= (i < B_IN); idata <= 3'(x[i]);
        if (i == 0) t_first = cyc + 1;
        @(posedge clk);
      end
      ivalid <= 0; b_ivalid <= 0;
      repeat (60) @(posedge clk);
    end
    checks++; if (qa.size() != 0 || qb.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
