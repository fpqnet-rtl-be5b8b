// tb_data_converter: sends a full parameter stream (every section of the network)
// and checks that each word becomes a write with the right section, row, column and
// value, that params_loaded rises only after the last one, that padding words after
// the end are dropped, and that in image mode bit k of a word reaches kernel k with
// the ready of the image side passed back.
module tb_data_converter;
  import fpqnet_pkg::*;
  localparam int NK = 10;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  logic mode, in_valid, in_ready, params_loaded, pix_valid, pix_ready;
  logic [15:0] in_data; param_wr_t pw; logic [NK-1:0] pix_data;
  data_converter #(.N_KERNELS(NK)) dut (.*);
  int checks = 0, failures = 0, nwr = 0, total = 0;
  param_wr_t exp_q[$];
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (pw.we) begin
    param_wr_t e;
    e = exp_q.pop_front();
    checks++; nwr++;
    if (pw != e) begin failures++; $display("write %0d: %p expected %p", nwr, pw, e); end
  end
  initial begin
    mode = 0; in_valid = 0; in_data = '0; pix_ready = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 10; s++)
      for (int r = 0; r < section_rows(s); r++)
        for (int c = 0; c < section_cols(s); c++) begin
          param_wr_t e;
          e = '{1'b1, param_sel_e'(s), 8'(r), 12'(c), 8'($urandom)};
          exp_q.push_back(e); total++;
          @(negedge clk);
          checks++; if (params_loaded) begin failures++; $display("loaded too early"); end
          in_valid = 1; in_data = {8'hA5, e.data};
        end
    // padding words after the last parameter
    repeat (5) @(negedge clk);
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++; if (!params_loaded || nwr != total || total != 44426) begin failures++; $display("loaded %b writes %0d of %0d", params_loaded, nwr, total); end
    // image mode
    mode = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 1); in_data = 16'($urandom); pix_ready = $urandom_range(0, 1);
      #0;
      checks++;
      if (pix_valid != in_valid || pix_data != in_data[NK-1:0] || in_ready != pix_ready) begin
        failures++; $display("image word routing wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
