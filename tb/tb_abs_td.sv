// tb_abs_td: for all pairs (a, b) the number of quanta in which the output is
// high during one ABS phase must equal |a-b| + M.
module tb_abs_td;
  localparam int unsigned M = 2;
  logic clk = 1'b0, rst_n = 1'b0, phase = 1'b0, out;
  logic [3:0] a = '0, b = '0;
  int checks = 0, failures = 0;

  abs_td #(.DATA_W(4), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j += 3) begin
        a = 4'(i); b = 4'(j);
        @(negedge clk);
        w = 0;
        for (int t = 0; t < 20; t++) begin
          phase = 1'b1;
          #1 if (out) w++;
          @(negedge clk);
        end
        phase = 1'b0;
        repeat (18) @(negedge clk);
        exp = ((i > j) ? i - j : j - i) + int'(M);
        checks++;
        if (w != exp) begin failures++; $display("FAIL a=%0d b=%0d width %0d", i, j, w); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
