// tb_tune_delay: a pulse of x quanta must leave x + trim quanta wide, with
// the same start.
module tb_tune_delay;
  logic clk = 1'b0, rst_n = 1'b0, in = 1'b0, out;
  logic [1:0] trim = '0;
  int checks = 0, failures = 0;

  tune_delay #(.TRIM_W(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, first;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t0 = 0; t0 < 4; t0++)
      for (int x = 1; x < 12; x++) begin
        trim = 2'(t0);
        w = 0; first = -1;
        for (int t = 0; t < 20; t++) begin
          in = (t < x);
          #1 if (out) begin w++; if (first < 0) first = t; end
          @(negedge clk);
        end
        checks += 2;
        if (w != x + t0) begin failures++; $display("FAIL x=%0d trim=%0d width %0d", x, t0, w); end
        if (first != 0) begin failures++; $display("FAIL start moved"); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
