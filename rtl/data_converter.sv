// data_converter: routes the 16-bit host words either to the parameter stores of
// the kernels or, as pixels, to the kernels' image inputs.
//
// Parameter mode (mode = 0): every word carries one 8-bit parameter in its low
// byte. The host sends all parameters in a fixed order: C1 weights, C1 biases, C3
// weights, C3 biases, then weights and biases of F5, F6 and F7, each weight matrix
// row by row (one output channel or neuron per row). The controller keeps a
// (section, row, col) position, so each word becomes a write pw = {section, row,
// col, data} that is broadcast to all kernels, one clock after the word is taken.
// After the last F7 bias, params_loaded is set and the position returns to the
// start. Further parameter words are then dropped (they are the zero padding of
// the last 512-bit beat) until image mode has been entered once, which re-arms the
// controller for a complete reload. In this mode the input is always ready.
// Image mode (mode = 1): bit k of a word is the binary pixel of kernel k (bits
// N_KERNELS..15 are unused). The word is handed through combinationally to the
// video timing generator, whose ready is passed back.
module data_converter
  import fpqnet_pkg::*;
#(
  parameter int N_KERNELS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mode,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [15:0]          in_data,
  output param_wr_t            pw,
  output logic                 params_loaded,
  output logic                 pix_valid,
  input  logic                 pix_ready,
  output logic [N_KERNELS-1:0] pix_data
);
  logic [3:0]  sec;
  logic [7:0]  row;
  logic [11:0] col;

  wire last_col = int'(col) == section_cols(int'(sec)) - 1;
  wire last_row = int'(row) == section_rows(int'(sec)) - 1;
  wire last_sec = int'(sec) == int'(P_F7B);
  logic armed;
  wire take_par = !mode && in_valid && armed;

  assign in_ready  = mode ? pix_ready : 1'b1;
  assign pix_valid = mode && in_valid;
  assign pix_data  = in_data[N_KERNELS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec <= '0; row <= '0; col <= '0; pw <= '0; params_loaded <= 1'b0; armed <= 1'b1;
    end else begin
      pw.we <= take_par;
      if (mode) armed <= 1'b1;
      if (take_par) begin
        pw.sel  <= param_sel_e'(sec);
        pw.row  <= row;
        pw.col  <= col;
        pw.data <= in_data[PW-1:0];
        if (!last_col) begin
          col <= col + 1'b1;
        end else begin
          col <= '0;
          if (!last_row) begin
            row <= row + 1'b1;
          end else begin
            row <= '0;
            if (last_sec) begin
              sec <= '0;
              params_loaded <= 1'b1;
              armed <= 1'b0;
            end else begin
              sec <= sec + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
