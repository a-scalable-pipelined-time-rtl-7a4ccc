// tb_min_pulse_gen: a pulse of x quanta (0..20) starting with the phase must
// leave as one contiguous pulse of x + M quanta starting with the phase.
module tb_min_pulse_gen;
  localparam int unsigned M = 2;
  logic clk = 1'b0, rst_n = 1'b0, phase = 1'b0, in = 1'b0, out;
  int checks = 0, failures = 0;

  min_pulse_gen #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, first, last;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int x = 0; x <= 20; x++) begin
      w = 0; first = -1; last = -1;
      for (int t = 0; t < 40; t++) begin
        phase = 1'b1;
        in = (t < x);
        #1;
        if (out) begin w++; if (first < 0) first = t; last = t; end
        @(negedge clk);
      end
      phase = 1'b0; in = 1'b0;
      checks += 2;
      if (w != x + int'(M)) begin failures++; $display("FAIL x=%0d width %0d", x, w); end
      if (first != 0 || last != w - 1) begin failures++; $display("FAIL x=%0d not contiguous", x); end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
