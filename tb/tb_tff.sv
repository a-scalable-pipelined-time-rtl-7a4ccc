// tb_tff: writes several random pulses into the 6 bit TFF, counts the carry
// strobes (one per wrap of the ring) and checks the readout width (sum mod
// 64); then checks that a rotation request lengthens the readout by one full
// turn without a gap, and that `clr` empties the ring.
module tb_tff;
  localparam int unsigned W = 6;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, wr = 1'b0, rd_start = 1'b0, adv = 1'b1, rot = 1'b0;
  logic out, carry;
  logic [W-1:0] stored;
  logic [W:0] remain;
  int checks = 0, failures = 0;

  tff #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  task automatic readout(output int w, output bit gap);
    int first, last;
    rd_start = 1'b1; @(negedge clk); rd_start = 1'b0;
    w = 0; first = -1; last = -1;
    for (int t = 0; t < 200; t++) begin
      #1 if (out) begin w++; if (first < 0) first = t; last = t; end
      @(negedge clk);
    end
    gap = (w > 0) && (first != 0 || last != w - 1);
  endtask

  int ncarry = 0;
  always @(posedge clk) if (carry) ncarry++;

  initial begin
    int sum, w, x;
    bit gap;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      sum = 0; ncarry = 0;
      for (int p = 0; p < 4; p++) begin
        x = $urandom_range(50, 0);
        sum += x;
        for (int t = 0; t < x; t++) begin wr = 1'b1; @(negedge clk); end
        wr = 1'b0; repeat (3) @(negedge clk);
      end
      chk("stored", int'(stored), sum % 64);
      chk("carries", ncarry, sum / 64);
      readout(w, gap);
      chk("readout width", w, sum % 64);
      chk("readout contiguous", int'(gap), 0);
    end
    // rotation: store 5, request one rotation while the last quantum leaves
    for (int t = 0; t < 5; t++) begin wr = 1'b1; @(negedge clk); end
    wr = 1'b0; @(negedge clk);
    rd_start = 1'b1; @(negedge clk); rd_start = 1'b0;
    begin
      int ww = 0;
      for (int t = 0; t < 150; t++) begin
        rot = (remain == 1) && (t < 10);
        #1 if (out) ww++;
        @(negedge clk);
      end
      rot = 1'b0;
      chk("rotation width", ww, 5 + 64);
    end
    // clear
    for (int t = 0; t < 9; t++) begin wr = 1'b1; @(negedge clk); end
    wr = 1'b0; clr = 1'b1; @(negedge clk); clr = 1'b0;
    readout(w, gap);
    chk("cleared", w, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
