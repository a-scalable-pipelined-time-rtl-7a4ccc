// tb_dtw_rf: fills both series with random samples through the write port
// and checks every section slice; writes boundary-row words and checks the
// section slice and the random read port against a software copy; checks
// that reset clears the boundary row.
module tb_dtw_rf;
  import dtw_pkg::*;
  localparam int unsigned N = 4, MT = 4, LEN = N * MT, AW = $clog2(LEN), TW = $clog2(MT);
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_sel = 1'b0;
  logic [AW-1:0] wr_addr = '0, brow_waddr = '0, brow_raddr = '0;
  logic [3:0] wr_data = '0;
  logic brow_we = 1'b0;
  logic [9:0] brow_wdata = '0, brow_rdata;
  logic [TW-1:0] ta = '0, tb = '0;
  logic [N-1:0][3:0] a_tile, b_tile;
  logic [N-1:0][9:0] brow_tile;
  int checks = 0, failures = 0;

  dtw_rf #(.N(N), .MAX_TILES(MT)) dut (.*);
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

  int A[LEN], B[LEN], BR[LEN];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk("brow reset", int'(brow_rdata), 0);
    for (int k = 0; k < int'(LEN); k++) begin
      A[k] = $urandom_range(15, 0); B[k] = $urandom_range(15, 0);
      wr_en = 1'b1; wr_sel = 1'b0; wr_addr = AW'(k); wr_data = 4'(A[k]); @(negedge clk);
      wr_sel = 1'b1; wr_data = 4'(B[k]); @(negedge clk);
    end
    wr_en = 1'b0;
    for (int k = 0; k < int'(LEN); k++) begin
      BR[k] = $urandom_range(1023, 0);
      brow_we = 1'b1; brow_waddr = AW'(k); brow_wdata = 10'(BR[k]);
      @(negedge clk);
    end
    brow_we = 1'b0;
    for (int p = 0; p < int'(MT); p++)
      for (int q = 0; q < int'(MT); q++) begin
        ta = TW'(p); tb = TW'(q); #1;
        for (int k = 0; k < int'(N); k++) begin
          chk("a slice", int'(a_tile[k]), A[p*N+k]);
          chk("b slice", int'(b_tile[k]), B[q*N+k]);
          chk("brow slice", int'(brow_tile[k]), BR[q*N+k]);
        end
        @(negedge clk);
      end
    for (int k = 0; k < int'(LEN); k++) begin
      brow_raddr = AW'(k); #1;
      chk("brow read", int'(brow_rdata), BR[k]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
