// tb_min_td: three start-aligned pulses of random widths; the output must
// be high for exactly the smallest width.
module tb_min_td;
  logic [2:0] in;
  logic out;
  int checks = 0, failures = 0;

  min_td #(.NIN(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x[3], w, m;
    for (int n = 0; n < 200; n++) begin
      foreach (x[k]) x[k] = $urandom_range(40, 0);
      m = x[0]; if (x[1] < m) m = x[1]; if (x[2] < m) m = x[2];
      w = 0;
      for (int t = 0; t < 45; t++) begin
        for (int k = 0; k < 3; k++) in[k] = (t < x[k]);
        #1 if (out) w++;
      end
      checks++;
      if (w != m) begin failures++; $display("FAIL %0d %0d %0d -> %0d", x[0], x[1], x[2], w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
