// line_fifo: one image line of delay for a pixel stream (the FIFO of a line buffer).
//
// A circular buffer of DEPTH entries. Each cycle with en high, the entry at the
// pointer is presented on dout (the pixel written DEPTH valid pixels earlier,
// i.e. the same column one line above when DEPTH is the line width) and is
// overwritten with din; the pointer then advances. dout is combinational from the
// pointer. Cascading these FIFOs end to end gives the row taps of a K x K window.
// Contents are not reset: a window is only used once enough lines have passed.
module line_fifo #(
  parameter int DEPTH = 28,
  parameter int W     = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        ptr <= '0;
    else if (en && ptr == AW'(DEPTH-1)) ptr <= '0;
    else if (en)                       ptr <= ptr + 1'b1;
  end
endmodule
