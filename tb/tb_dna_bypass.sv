// tb_dna_bypass: the DNA-sequence workload in the non-pipelined (bypass)
// mode, with every engine parameter at its default. 100 random pairs of
// base sequences (A, C, G, T coded 0..3) with lengths of 8 to 20 bases are
// scanned in and compared by racing an edge through the matrix. Checks:
// each distance equals a software DTW of the same codes, the distance read
// back through the scan chain agrees, and every operation takes the same
// number of quanta (the bypass time does not depend on the data).
module tb_dna_bypass;
  import dtw_pkg::*;

  localparam int unsigned N  = 20;
  localparam int unsigned MT = 16;
  localparam int unsigned AW = $clog2(N * MT);
  localparam int unsigned SCW = 2 + AW + DIST_W;
  localparam int unsigned STEP_Q = PH_RD_DEF + PH_AB_DEF + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_in = 1'b0, scan_en = 1'b0, scan_upd = 1'b0, scan_out;
  logic start = 1'b0, mode_race = 1'b0;
  logic [AW:0] len_a = '0, len_b = '0;
  logic [N-1:0][N-1:0][TRIM_W-1:0] trim = '0;
  logic busy, done;
  logic [DIST_W-1:0] distance;

  dtw_engine dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- scan access
  task automatic scan_word(input logic [1:0] op, input int addr, input int data,
                           output logic [SCW-1:0] shifted_out);
    logic [SCW-1:0] w;
    w = {op, AW'(addr), DIST_W'(data)};
    for (int k = SCW - 1; k >= 0; k--) begin
      shifted_out[k] = scan_out;
      scan_in = w[k];
      scan_en = 1'b1;
      @(negedge clk);
    end
    scan_en = 1'b0;
    scan_upd = 1'b1;
    @(negedge clk);
    scan_upd = 1'b0;
  endtask

  task automatic scan_read(input logic [1:0] op, input int addr, output int val);
    logic [SCW-1:0] so;
    scan_word(op, addr, 0, so);
    scan_word(2'd0, 0, 0, so);      // shifting a harmless word pushes the capture out
    val = int'(so[DIST_W-1:0]);
  endtask

  // plain DTW over the real series, as a software reference
  int A[N*MT], B[N*MT];
  function automatic int sw_dtw(input int la, input int lb);
    int E[N*MT][N*MT];
    for (int i = 0; i < la; i++)
      for (int j = 0; j < lb; j++) begin
        int m;
        if (i == 0 && j == 0) m = 0;
        else begin
          m = 1 << 30;
          if (i > 0 && E[i-1][j] < m) m = E[i-1][j];
          if (j > 0 && E[i][j-1] < m) m = E[i][j-1];
          if (i > 0 && j > 0 && E[i-1][j-1] < m) m = E[i-1][j-1];
        end
        E[i][j] = m + ((A[i] > B[j]) ? A[i] - B[j] : B[j] - A[i]);
      end
    return E[la-1][lb-1];
  endfunction

  // scan both series in, run one operation, return distance and latency
  task automatic run(input int la, input int lb, input bit race, output int d, output int t);
    logic [SCW-1:0] so;
    for (int i = 0; i < la; i++) scan_word(2'd0, i, A[i], so);
    for (int j = 0; j < lb; j++) scan_word(2'd1, j, B[j], so);
    len_a = (AW+1)'(la); len_b = (AW+1)'(lb); mode_race = race;
    start = 1'b1; @(negedge clk); start = 1'b0;
    t = 0;
    while (!done) begin @(negedge clk); t++; end
    d = int'(distance);
  endtask

  initial begin
    int la, lb, d, t, t_first, exp, v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t_first = -1;
    for (int p = 0; p < 100; p++) begin
      la = $urandom_range(20, 8); lb = $urandom_range(20, 8);
      for (int i = 0; i < la; i++) A[i] = $urandom_range(3, 0);
      for (int j = 0; j < lb; j++) B[j] = $urandom_range(3, 0);
      // some pairs are close relatives: B is A with a few bases changed
      if (p % 4 == 0) begin
        lb = la;
        for (int j = 0; j < lb; j++) B[j] = ($urandom_range(9, 0) == 0) ? $urandom_range(3, 0) : A[j];
      end
      exp = sw_dtw(la, lb);
      run(la, lb, 1'b1, d, t);
      check($sformatf("pair %0d distance", p), d, exp);
      if (t_first < 0) t_first = t;
      check("bypass time", t, t_first);
      if (p % 10 == 0) begin
        scan_read(2'd2, 0, v);
        check("scan distance", v, exp);
      end
    end
    $display("100 pairs, %0d quanta per pair", t_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
