// tb_dtw_matrix: runs one section pass (2N+1 pipeline cycles) through a
// 3 x 3 matrix with random samples, random boundary values on the top row,
// left column and corner, and random trims. The widths of the pulses leaving
// the right column and bottom row in cycles k+N+1 must equal the reference
// values plus the offset M; the reference lets a cell with trim t present
// D + t to its neighbours. A bypass-mode race is checked as well.
module tb_dtw_matrix;
  import dtw_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned M = MINP;
  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t ctl = '0;
  logic [N-1:0][3:0] a_row = '0, b_col = '0;
  logic [N-1:0][N-1:0][1:0] trim = '0;
  logic [N-1:0] top_b = '0, left_b = '0, right_out, bottom_out;
  logic corner = 1'b0;
  logic [N-1:0] a_pad = '0, b_pad = '0;   // padding is checked end to end
  logic [N-1:0][N-1:0][9:0] d_val;
  int checks = 0, failures = 0;

  dtw_matrix #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  int A[N], B[N], T[N], L[N], C, tr[N][N], E[N][N];
  int wr[N], wb[N];

  task automatic cycle();
    ctl = '0; ctl.step = 1'b1; ctl.rd_start = 1'b1; @(negedge clk);
    ctl = '0;
    foreach (wr[k]) begin wr[k] = 0; wb[k] = 0; end
    for (int t = 0; t < int'(PH_RD_DEF); t++) begin
      ctl.rd_phase = 1'b1;
      for (int k = 0; k < int'(N); k++) begin
        top_b[k] = (t < T[k] + int'(M));
        left_b[k] = (t < L[k] + int'(M));
      end
      corner = (t < C + int'(M));
      #1;
      for (int k = 0; k < int'(N); k++) begin
        if (right_out[k]) wr[k]++;
        if (bottom_out[k]) wb[k]++;
      end
      @(negedge clk);
    end
    top_b = '0; left_b = '0; corner = 1'b0;
    ctl = '0; ctl.ab_start = 1'b1; @(negedge clk);
    ctl = '0;
    for (int t = 0; t < int'(PH_AB_DEF); t++) begin ctl.ab_phase = 1'b1; @(negedge clk); end
    ctl = '0; @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6; n++) begin
      foreach (A[k]) begin A[k] = $urandom_range(15, 0); B[k] = $urandom_range(15, 0); end
      foreach (T[k]) begin T[k] = $urandom_range(300, 0); L[k] = $urandom_range(300, 0); end
      C = $urandom_range(300, 0);
      foreach (tr[i, j]) tr[i][j] = (n < 2) ? 0 : $urandom_range(3, 0);
      for (int k = 0; k < int'(N); k++) begin a_row[k] = 4'(A[k]); b_col[k] = 4'(B[k]); end
      foreach (tr[i, j]) trim[i][j] = 2'(tr[i][j]);
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          int up, lf, dg, m;
          up = (i == 0) ? T[j] : E[i-1][j];
          lf = (j == 0) ? L[i] : E[i][j-1];
          dg = (i == 0 && j == 0) ? C : (i == 0) ? T[j-1] : (j == 0) ? L[i-1] : E[i-1][j-1];
          m = up; if (lf < m) m = lf; if (dg < m) m = dg;
          E[i][j] = m + ((A[i] > B[j]) ? A[i] - B[j] : B[j] - A[i]) + tr[i][j];
        end
      ctl = '0; ctl.clr = 1'b1; @(negedge clk); ctl = '0;
      for (int s = 0; s <= 2 * int'(N); s++) begin
        cycle();
        if (s >= int'(N) + 1) begin
          int k;
          k = s - int'(N) - 1;
          chk($sformatf("right row %0d", k), wr[k], E[k][N-1] + int'(M));
          chk($sformatf("bottom col %0d", k), wb[k], E[N-1][k] + int'(M));
        end
      end
    end
    // bypass race from the corner
    begin
      int arr, t_out;
      foreach (A[k]) begin A[k] = $urandom_range(15, 0); B[k] = $urandom_range(15, 0); end
      for (int k = 0; k < int'(N); k++) begin a_row[k] = 4'(A[k]); b_col[k] = 4'(B[k]); end
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          int m;
          if (i == 0 && j == 0) m = 0;
          else begin
            m = 1 << 20;
            if (i > 0 && E[i-1][j] < m) m = E[i-1][j];
            if (j > 0 && E[i][j-1] < m) m = E[i][j-1];
            if (i > 0 && j > 0 && E[i-1][j-1] < m) m = E[i-1][j-1];
          end
          E[i][j] = m + ((A[i] > B[j]) ? A[i] - B[j] : B[j] - A[i]);
        end
      ctl = '0; ctl.race = 1'b1;
      repeat (N) begin ctl.step = 1'b1; @(negedge clk); end
      ctl.step = 1'b0;
      t_out = -1;
      for (int t = 0; t < 200; t++) begin
        ctl.race_go = 1'b1; corner = 1'b1;
        #1 if (right_out[N-1] && t_out < 0) t_out = t;
        @(negedge clk);
      end
      ctl = '0; corner = 1'b0;
      chk("race arrival", t_out, E[N-1][N-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
