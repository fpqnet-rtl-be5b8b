// find_max: output layer. Picks the largest of the N values of the last fully
// connected layer and reports its position as the predicted class.
//
// Inference needs no softmax: the largest input also has the largest softmax
// value. The values arrive serially after a vs pulse; one comparator keeps the
// best value so far and its index (a later value must be strictly larger, so ties
// go to the lower index). One clock after the N-th value, class_valid pulses with
// class_idx.
module find_max #(
  parameter int N  = 10,
  parameter int W  = 16,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ivs,
  input  logic                ivalid,
  input  logic signed [W-1:0] idata,
  output logic                class_valid,
  output logic [IW-1:0]       class_idx,
  output logic signed [W-1:0] class_val
);
  logic [IW-1:0]       cnt, best_idx;
  logic signed [W-1:0] best;

  logic take;
  assign take = (cnt == '0) || (idata > best);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; best_idx <= '0; best <= '0;
      class_valid <= 1'b0; class_idx <= '0; class_val <= '0;
    end else begin
      class_valid <= 1'b0;
      if (ivs) begin
        cnt <= '0;
      end else if (ivalid) begin
        if (take) begin
          best <= idata; best_idx <= cnt;
        end
        cnt <= cnt + 1'b1;
        if (cnt == IW'(N-1)) begin
          class_valid <= 1'b1;
          class_idx   <= take ? cnt : best_idx;
          class_val   <= take ? idata : best;
        end
      end
    end
  end
endmodule
