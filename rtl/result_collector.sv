// result_collector: gathers the class index of every kernel into one result word
// for the host.
//
// Each kernel's result is latched when its class_valid pulses and marked as
// present. When all N_KERNELS results of an image group are present and the output
// register is free, they move to res_data (kernel k in bits 4k+3..4k) and res_valid
// is raised until the host takes the word with res_ready. The kernels run in lock
// step, so normally all results arrive in the same clock. A result that arrives
// for a kernel whose previous result is still waiting is counted in overflows.
module result_collector #(
  parameter int N_KERNELS = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_KERNELS-1:0]     cls_valid,
  input  logic [N_KERNELS-1:0][3:0] cls_idx,
  output logic                     res_valid,
  input  logic                     res_ready,
  output logic [N_KERNELS-1:0][3:0] res_data,
  output logic [15:0]              overflows
);
  logic [N_KERNELS-1:0]      got;
  logic [N_KERNELS-1:0][3:0] held;

  wire all_got = &got;
  wire move    = all_got && (!res_valid || res_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got <= '0; held <= '0; res_valid <= 1'b0; res_data <= '0; overflows <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (move) begin
        res_data  <= held;
        res_valid <= 1'b1;
      end
      for (int k = 0; k < N_KERNELS; k++) begin
        if (cls_valid[k]) begin
          held[k] <= cls_idx[k];
          got[k]  <= 1'b1;
          if (got[k] && !move) overflows <= overflows + 1'b1;
        end else if (move) begin
          got[k] <= 1'b0;
        end
      end
    end
  end
endmodule
