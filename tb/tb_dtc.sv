// tb_dtc: for every code, fires the reference edge and checks that the
// pulse is exactly `code` quanta wide and that the delayed edge rises `code`
// quanta after the reference.
module tb_dtc;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, dly, pulse;
  logic [3:0] code = '0;
  int checks = 0, failures = 0;

  dtc #(.CODE_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, t_dly;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      @(negedge clk);
      start = 1'b1;
      w = 0; t_dly = -1;
      for (int t = 0; t < 20; t++) begin
        #1;
        if (pulse) w++;
        if (dly && t_dly < 0) t_dly = t;
        @(negedge clk);
      end
      start = 1'b0;
      checks += 2;
      if (w != c)     begin failures++; $display("FAIL code %0d width %0d", c, w); end
      if (t_dly != c) begin failures++; $display("FAIL code %0d delay %0d", c, t_dly); end
      repeat (18) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
