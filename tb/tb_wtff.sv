// tb_wtff: accumulates two offset pulses (x + M, then y + M quanta, each in
// its own write phase) into the 10 bit WTFF and checks the digital content
// and the readout: one contiguous pulse of (x + y) mod 1024 quanta starting
// on the first quantum of the readout phase. Values above 63 exercise the
// LSB carry into the MSB TFF and the rotation readout.
module tb_wtff;
  localparam int unsigned M = 2;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr_start = 1'b0, wr = 1'b0;
  logic rd_start = 1'b0, rd_phase = 1'b0, out;
  logic [9:0] value;
  int checks = 0, failures = 0;

  wtff #(.LSB_W(6), .MSB_W(4), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  task automatic write_phase(input int x);
    wr_start = 1'b1; @(negedge clk); wr_start = 1'b0;
    for (int t = 0; t < x + int'(M); t++) begin wr = 1'b1; @(negedge clk); end
    wr = 1'b0; repeat (3) @(negedge clk);
  endtask

  initial begin
    int x, y, w, first, last, exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int n = 0; n < 24; n++) begin
      x = (n == 0) ? 0 : (n == 1) ? 63 : $urandom_range(600, 0);
      y = (n == 0) ? 0 : (n == 1) ? 1  : $urandom_range(500, 0);
      exp = (x + y) % 1024;
      write_phase(x);
      write_phase(y);
      chk("value", int'(value), exp);
      rd_start = 1'b1; @(negedge clk); rd_start = 1'b0;
      w = 0; first = -1; last = -1;
      for (int t = 0; t < 1100; t++) begin
        rd_phase = 1'b1;
        #1 if (out) begin w++; if (first < 0) first = t; last = t; end
        @(negedge clk);
      end
      rd_phase = 1'b0;
      chk("readout width", w, exp);
      if (exp > 0) chk("readout contiguous", int'(first == 0 && last == w - 1), 1);
      chk("emptied", int'(value), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
