// axi_serializer: narrows the 512-bit host data beats to 16-bit words.
//
// A beat is accepted when the holding register is empty or its last word is being
// taken; its IN_W/OUT_W words are then sent lowest word first, one per clock
// while out_ready is high. Both sides use a valid/ready handshake: a transfer
// happens in a clock where valid and ready are both high. A new beat can be
// accepted in the same clock as the last word of the previous one leaves, so a
// continuous input keeps the output busy every clock.
module axi_serializer #(
  parameter int IN_W  = 512,
  parameter int OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_data
);
  localparam int NW = IN_W / OUT_W;
  localparam int CW = $clog2(NW);

  logic [IN_W-1:0] beat;
  logic [CW-1:0]   idx;
  logic            full;

  wire take_last = full && out_ready && idx == CW'(NW-1);
  assign in_ready  = !full || take_last;
  assign out_valid = full;
  assign out_data  = beat[idx*OUT_W +: OUT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0; idx <= '0; beat <= '0;
    end else begin
      if (in_valid && in_ready) begin
        beat <= in_data; full <= 1'b1; idx <= '0;
      end else if (take_last) begin
        full <= 1'b0; idx <= '0;
      end else if (full && out_ready) begin
        idx <= idx + 1'b1;
      end
    end
  end

  // a beat must not change while it is offered
  property p_hold;
    @(posedge clk) disable iff (!rst_n) in_valid && !in_ready |=> in_valid && $stable(in_data);
  endproperty
  a_hold: assert property (p_hold);
endmodule
