// tb_bnd_src: after `rd_start` the source must send one pulse of value + M
// quanta beginning on the next quantum.
module tb_bnd_src;
  localparam int unsigned M = 2;
  logic clk = 1'b0, rst_n = 1'b0, rd_start = 1'b0, out;
  logic [9:0] value = '0;
  int checks = 0, failures = 0;

  bnd_src #(.DIST_W(10), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, first, v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 30; n++) begin
      v = (n == 0) ? 0 : (n == 1) ? 1023 : $urandom_range(1023, 0);
      value = 10'(v);
      rd_start = 1'b1;
      @(negedge clk);
      rd_start = 1'b0;
      w = 0; first = -1;
      for (int t = 0; t < 1040; t++) begin
        #1 if (out) begin w++; if (first < 0) first = t; end
        @(negedge clk);
      end
      checks += 2;
      if (w != v + int'(M)) begin failures++; $display("FAIL v=%0d width %0d", v, w); end
      if (first != 0) begin failures++; $display("FAIL v=%0d starts at %0d", v, first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
