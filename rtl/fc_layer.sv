// fc_layer: fully connected layer (F5, F6, F7), one multiplier per output neuron.
//
// The input vector arrives serially: a one-clock ivs pulse clears all OUT_LEN
// accumulators, then IN_LEN elements follow on ivalid. For element i every neuron o
// reads weight (o, i) from its own RAM, multiplies it with the element and adds the
// product to its accumulator, so all neurons work in parallel and the layer takes
// IN_LEN clocks for a vector. With 1-bit inputs (F6, F7 after a step activation)
// the multiplier is a selector. When the last element is in, the bias is added and,
// with ACT = 1, the step activation keeps 1 for a positive sum and 0 otherwise;
// with ACT = 0 the signed sum is kept (the last layer, feeding find_max).
// The results are then sent on serially as the next layer's input: an ovs pulse,
// then OUT_LEN values on ovalid, neuron 0 first.
//
// Timing: a weight RAM read takes one clock and the accumulate one more, so ovs
// comes IN_LEN + 2 clocks after the first input element when the input has no
// gaps, and the last output value OUT_LEN clocks later. A new vector may start
// once the previous outputs have been sent.
//
// Parameters: weights in section WSEL (row = neuron, col = input index), biases in
// BSEL (row = neuron).
module fc_layer
  import fpqnet_pkg::*;
#(
  parameter int         IN_LEN  = 256,
  parameter int         OUT_LEN = 120,
  parameter int         IN_W    = 3,
  parameter bit         ACT     = 1'b1,
  parameter param_sel_e WSEL    = P_F5W,
  parameter param_sel_e BSEL    = P_F5B,
  localparam int        TW      = (IN_W == 1) ? PW : PW + IN_W,
  localparam int        ACC_W   = TW + $clog2(IN_LEN) + 2,
  localparam int        OUT_W   = ACT ? 1 : ACC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  param_wr_t        pw,
  input  logic             ivs,
  input  logic             ivalid,
  input  logic [IN_W-1:0]  idata,
  output logic             ovs,
  output logic             ovalid,
  output logic [OUT_W-1:0] odata
);
  localparam int AW = $clog2(IN_LEN);
  localparam int OCW = $clog2(OUT_LEN + 1);

  // ---------------- input element counter and stage-1 registers ----------------
  logic [AW-1:0]   icnt;
  logic            v1, last1, last2;
  logic [IN_W-1:0] x1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt <= '0; v1 <= 1'b0; last1 <= 1'b0; last2 <= 1'b0; x1 <= '0;
    end else begin
      v1    <= ivalid && !ivs;
      last1 <= ivalid && !ivs && icnt == AW'(IN_LEN-1);
      last2 <= last1;
      x1    <= idata;
      if (ivs)         icnt <= '0;
      else if (ivalid) icnt <= icnt + 1'b1;
    end
  end

  // ---------------- biases ----------------
  logic signed [PW-1:0] bias [OUT_LEN];
  always_ff @(posedge clk) begin
    if (pw.we && pw.sel == BSEL && int'(pw.row) < OUT_LEN) bias[pw.row] <= pw.data;
  end

  // ---------------- per-neuron weight RAM, multiplier, accumulator ----------------
  // wmem[o] is neuron o's weight RAM (one write port for loading, one synchronous
  // read port addressed by the input element counter).
  logic signed [PW-1:0]    wmem [OUT_LEN][IN_LEN];
  logic signed [PW-1:0]    w    [OUT_LEN];
  logic signed [ACC_W-1:0] acc  [OUT_LEN];
  logic [OUT_LEN-1:0][OUT_W-1:0] res;

  always_ff @(posedge clk) begin
    if (pw.we && pw.sel == WSEL && int'(pw.row) < OUT_LEN && int'(pw.col) < IN_LEN)
      wmem[pw.row][pw.col[AW-1:0]] <= pw.data;
    for (int o = 0; o < OUT_LEN; o++) w[o] <= wmem[o][icnt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < OUT_LEN; o++) acc[o] <= '0;
    end else if (ivs) begin
      for (int o = 0; o < OUT_LEN; o++) acc[o] <= '0;
    end else if (v1) begin
      for (int o = 0; o < OUT_LEN; o++) begin
        if (IN_W == 1) acc[o] <= acc[o] + (x1[0] ? ACC_W'(w[o]) : '0);        // selector
        else           acc[o] <= acc[o] + ACC_W'($signed({1'b0, x1}) * w[o]); // multiplier
      end
    end
  end

  always_comb begin
    for (int o = 0; o < OUT_LEN; o++) begin
      logic signed [ACC_W-1:0] total;
      total = acc[o] + ACC_W'(bias[o]);
      if (ACT) res[o] = OUT_W'(total > 0);
      else     res[o] = OUT_W'(total);
    end
  end

  // ---------------- serial output ----------------
  logic [OUT_LEN-1:0][OUT_W-1:0] sh;
  logic [OCW-1:0]                ocnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovs <= 1'b0; ocnt <= '0; sh <= '0;
    end else begin
      ovs <= last2;
      if (last2) begin
        sh   <= res;
        ocnt <= OCW'(OUT_LEN);
      end else if (ovs) begin
        // hold: the first value goes out on the clock after the vs pulse
      end else if (ocnt != '0) begin
        sh   <= sh >> OUT_W;
        ocnt <= ocnt - 1'b1;
      end
    end
  end

  assign ovalid = (ocnt != '0) && !ovs;
  assign odata  = sh[0];
endmodule
