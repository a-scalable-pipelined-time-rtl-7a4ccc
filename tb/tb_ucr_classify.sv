// tb_ucr_classify: the time-series classification workload in unfolded
// mode, with every engine parameter at its default. Two class templates (a
// smooth bump and a double step, 4 bit samples) give one reference series
// each; query series are time-warped, slightly noisy copies of either
// template with their own lengths (28 to 40 samples, so the last section is
// padded). Every query is compared with both references on the engine
// (2 x 2 sections each) and labelled with the nearer one, a 1-nearest-
// neighbour classifier. Checks: each distance equals a software DTW, the
// latency of each operation matches 1 + ((T-1)(N+1) + 2N+1)(PH_RD+PH_AB+3)
// quanta, and the engine's label equals the software label and the true
// class.
module tb_ucr_classify;
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

  // class templates over a normalised position p in 0..99; values 4..11
  function automatic int tmpl(input int cls, input int p);
    if (cls == 0) return 4 + ((p < 50) ? p : 99 - p) * 7 / 49;        // bump
    else          return (p < 33) ? 4 : ((p < 66) ? 11 : 6);          // double step
  endfunction

  // a warped, noisy instance of class `cls` with `len` samples
  function automatic void make(input int cls, input int len, input int warp, input bit noisy,
                               output int s[N*MT]);
    for (int i = 0; i < len; i++) begin
      int p, v;
      p = i * 100 / len;
      p = p + warp * p * (99 - p) / 2500;          // smooth time warp
      if (p > 99) p = 99;
      if (p < 0) p = 0;
      v = tmpl(cls, p) + (noisy ? $urandom_range(2, 0) - 1 : 0);
      s[i] = (v < 0) ? 0 : ((v > 15) ? 15 : v);
    end
  endfunction

  initial begin
    int R[2][N*MT], Q[N*MT];
    int rlen[2], qlen, qcls, d, t, exp, best_hw, best_sw, dmin_hw, dmin_sw, n_ok;
    int T;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rlen[0] = 37; rlen[1] = 31;
    make(0, rlen[0], 0, 0, R[0]);
    make(1, rlen[1], 0, 0, R[1]);
    n_ok = 0;
    for (int q = 0; q < 4; q++) begin
      qcls = q % 2;
      qlen = 28 + 4 * q;
      make(qcls, qlen, (q < 2) ? 8 : -8, 1, Q);
      dmin_hw = 1 << 30; dmin_sw = 1 << 30; best_hw = -1; best_sw = -1;
      for (int r = 0; r < 2; r++) begin
        for (int i = 0; i < qlen; i++) A[i] = Q[i];
        for (int j = 0; j < rlen[r]; j++) B[j] = R[r][j];
        exp = sw_dtw(qlen, rlen[r]);
        run(qlen, rlen[r], 1'b0, d, t);
        check($sformatf("distance query %0d ref %0d", q, r), d, exp);
        T = ((qlen + int'(N) - 1) / int'(N)) * ((rlen[r] + int'(N) - 1) / int'(N));
        check("latency", t, 1 + ((T - 1) * (int'(N) + 1) + 2 * int'(N) + 1) * int'(STEP_Q));
        $display("query %0d (class %0d, %0d samples) vs reference %0d (%0d samples): %0d", q, qcls, qlen, r, rlen[r], d);
        if (d < dmin_hw) begin dmin_hw = d; best_hw = r; end
        if (exp < dmin_sw) begin dmin_sw = exp; best_sw = r; end
      end
      check("label equals software label", best_hw, best_sw);
      check("label equals true class", best_hw, qcls);
      if (best_hw == qcls) n_ok++;
    end
    $display("classified %0d of 4 queries correctly", n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
