// tb_tdc: pipelined mode, a pulse of w quanta in the readout phase must give
// the code max(w - M, 0) saturated to 10 bit; bypass mode, an edge arriving
// t quanta into the race window must give the code t.
module tb_tdc;
  import dtw_pkg::*;
  localparam int unsigned M = 2;
  logic clk = 1'b0, rst_n = 1'b0, in = 1'b0;
  ctl_t ctl = '0;
  logic [9:0] code;
  int checks = 0, failures = 0;

  tdc #(.CODE_W(10), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  initial begin
    int w, exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      w = (n == 0) ? 0 : (n == 1) ? 1 : (n == 2) ? 1030 : $urandom_range(1025, 0);
      ctl = '0; ctl.rd_start = 1'b1; @(negedge clk);
      ctl = '0;
      for (int t = 0; t < 1040; t++) begin
        ctl.rd_phase = 1'b1; in = (t < w); @(negedge clk);
      end
      ctl = '0; in = 1'b0; @(negedge clk);
      exp = (w > int'(M)) ? w - int'(M) : 0;
      if (exp > 1023) exp = 1023;
      chk("pulse width code", int'(code), exp);
    end
    for (int n = 0; n < 20; n++) begin
      w = $urandom_range(600, 0);
      ctl = '0; ctl.race = 1'b1; ctl.race_start = 1'b1; @(negedge clk);
      ctl.race_start = 1'b0;
      for (int t = 0; t < 700; t++) begin
        ctl.race_go = 1'b1; in = (t >= w); @(negedge clk);
      end
      ctl.race_go = 1'b0; in = 1'b0; @(negedge clk);
      chk("arrival code", int'(code), w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
