// tb_dtw_engine_full: end-to-end test of the DTW engine with every parameter
// at its default (20 x 20 matrix, 16 sections per series).
// Series are scanned into the register file, the engine is started, and the
// distance (read directly and through the scan chain) is compared with a
// software DTW that also models the per-cell tunable delays: a cell with
// trim t presents D+t to its neighbours and to the TDCs. Runs single-section
// and unfolded (multi-section) pipelined operations, the bypass race mode,
// non-zero trims and values large enough to use the MSB time flip-flops, and
// counts each of these mechanisms. Lengths that are not a multiple of N
// exercise the padding of the last section; the reference then fills the
// padded matrix the same way (padded cells at zero cost, following their
// upper input past the end of A, their left input past the end of B, the
// minimum of all three past both) and reads its far corner. The latency of T overlapped sections is
// checked against 1 + ((T-1)(N+1) + 2N+1)(PH_RD+PH_AB+3) quanta.
module tb_dtw_engine_full;
  import dtw_pkg::*;

  localparam int unsigned N  = 20;
  localparam int unsigned MT = 16;
  localparam int unsigned TW = $clog2(MT);
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
  int n_pipe = 0, n_unfold = 0, n_race = 0, n_trim = 0, n_carry = 0, n_scanrd = 0, n_pad = 0;

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

  // ---- reference
  int A[N*MT], B[N*MT];
  int tr[N][N];

  function automatic int ref_dtw(input int la, input int lb, input bit race);
    int E[N*MT][N*MT];   // value as seen by neighbours (D + trim of its cell)
    int pa, pb;
    // bypass mode races over the real matrix only; pipelined mode fills the
    // matrix padded to whole sections
    pa = race ? la : (la + int'(N) - 1) / int'(N) * int'(N);
    pb = race ? lb : (lb + int'(N) - 1) / int'(N) * int'(N);
    for (int i = 0; i < pa; i++)
      for (int j = 0; j < pb; j++) begin
        int m, d, ab;
        if (i >= la && j < lb) m = E[i-1][j];
        else if (j >= lb && i < la) m = E[i][j-1];
        else if (i == 0 && j == 0) m = 0;
        else begin
          m = 1 << 30;
          if (i > 0 && E[i-1][j] < m) m = E[i-1][j];
          if (j > 0 && E[i][j-1] < m) m = E[i][j-1];
          if (i > 0 && j > 0 && E[i-1][j-1] < m) m = E[i-1][j-1];
        end
        if (i >= la || j >= lb) ab = 0;
        else ab = (A[i] > B[j]) ? A[i] - B[j] : B[j] - A[i];
        d = (m + ab) % 1024;
        E[i][j] = d + tr[i % N][j % N];
      end
    return (E[pa-1][pb-1] > int'(DIST_INF)) ? int'(DIST_INF) : E[pa-1][pb-1];
  endfunction

  task automatic run(input int la, input int lb, input bit race, input int amax, input bit use_trim, input bit skew = 0);
    logic [SCW-1:0] so;
    int ta, tb, exp, got, t0, lat;
    ta = (la + int'(N) - 1) / int'(N); tb = (lb + int'(N) - 1) / int'(N);
    for (int i = 0; i < la; i++) A[i] = skew ? $urandom_range(15, 12) : $urandom_range(amax, 0);
    for (int j = 0; j < lb; j++) B[j] = skew ? $urandom_range(3, 0) : $urandom_range(amax, 0);
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        tr[i][j] = use_trim ? $urandom_range(3, 0) : 0;
        trim[i][j] = TRIM_W'(tr[i][j]);
      end
    for (int i = 0; i < la; i++) scan_word(2'd0, i, A[i], so);
    for (int j = 0; j < lb; j++) scan_word(2'd1, j, B[j], so);
    // the racing edges bypass the tunable delays: reference without trims
    if (race) foreach (tr[i, j]) tr[i][j] = 0;
    exp = ref_dtw(la, lb, race);
    len_a = (AW+1)'(la); len_b = (AW+1)'(lb); mode_race = race;
    start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = 0;
    while (!done) begin @(negedge clk); t0++; end
    got = int'(distance);
    check($sformatf("dist %0dx%0d race=%0d trim=%0d", la, lb, race, use_trim), got, exp);
    if (!race) begin
      lat = 1 + ((ta * tb - 1) * (N + 1) + 2 * N + 1) * STEP_Q;
      check("latency", t0, lat);
    end
    scan_read(2'd2, 0, got);
    check("scan distance", got, exp);
    n_scanrd++;
    if (race) n_race++; else n_pipe++;
    if (!race && ta * tb > 1) n_unfold++;
    if (use_trim) n_trim++;
    if (la % int'(N) != 0 || lb % int'(N) != 0) n_pad++;
    if (!race && exp >= 64) n_carry++;
  endtask

  initial begin
    int v;
    logic [SCW-1:0] so;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1 * N, 1 * N, 0, 15, 1);
    run(1 * N, 1 * N, 1, 15, 0);
    run(2 * N, 2 * N, 0, 15, 0, 1);
    run(33, 27, 0, 15, 1);
    run(13, 17, 1, 15, 0);
    run(1 * N, 2 * N, 0, 3, 0);
    // read back one bottom-boundary word: last row of the last section of the
    // 1x2 run, column 2N-1, is the distance itself
    scan_read(2'd3, 2 * N - 1, v);
    check("scan boundary word", v, int'(distance));
    check("mechanism pipelined", int'(n_pipe > 0), 1);
    check("mechanism unfolded", int'(n_unfold > 0), 1);
    check("mechanism race", int'(n_race > 0), 1);
    check("mechanism trim", int'(n_trim > 0), 1);
    check("mechanism msb carry", int'(n_carry > 0), 1);
    check("mechanism padding", int'(n_pad > 0), 1);
    $display("mechanisms: pipelined=%0d unfolded=%0d race=%0d trim=%0d msb_carry=%0d scan_read=%0d padding=%0d",
             n_pipe, n_unfold, n_race, n_trim, n_carry, n_scanrd, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
