// tb_axi_serializer: 128-bit beats into 16-bit words with random valid and ready
// on both sides; every word must come out once, in order (lowest word first), and
// a continuous input with a ready output must give one word per clock.
module tb_axi_serializer;
  localparam int IW = 128, OW = 16, NW = IW / OW;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready; logic [IW-1:0] in_data; logic [OW-1:0] out_data;
  axi_serializer #(.IN_W(IW), .OUT_W(OW)) dut (.*);
  int checks = 0, failures = 0, nin = 0, nout = 0, busy = 0;
  bit random_ready = 1;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // output side: sample at the falling edge, the transfer is at the next rising edge;
  // both sides look at the handshake 1 time unit later, after out_ready has changed
  initial begin
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin   // this word is taken at the next rising edge
        checks++;
        if (out_data != OW'(nout)) begin failures++; $display("word %0d wrong", nout); end
        nout++;
      end
    end
  end
  always @(posedge clk) if (!random_ready && out_valid) busy++;
  task automatic send(input int beats, input bit gaps);
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < NW; i++) in_data[i*OW +: OW] = OW'(nin * NW + i);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk); nin++;
      if (gaps && $urandom_range(0, 1)) begin @(negedge clk); in_valid = 0; repeat ($urandom_range(0, 12)) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    send(30, 1);
    repeat (100) @(posedge clk);
    checks++; if (nout != 30 * NW) begin failures++; $display("words %0d", nout); end
    // throughput: 20 beats back to back with the output always ready
    random_ready = 0; busy = 0;
    send(20, 0);
    repeat (20) @(posedge clk);
    checks++; if (busy != 20 * NW) begin failures++; $display("busy clocks %0d", busy); end
    checks++; if (nout != 50 * NW) begin failures++; $display("words %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
