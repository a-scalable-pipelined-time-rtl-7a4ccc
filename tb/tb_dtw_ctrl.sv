// tb_dtw_ctrl: runs the sequencer with short phases against a testbench
// model of the register file and the TDCs (their codes change every
// pipeline cycle). Checks, for unfolded runs of several sections: the number
// and length of every phase; the boundary values offered to the newest
// section (infinite at the outer edges, the previous cycle's right-edge codes
// re-sent on the left, register-file words on top, the corner from the
// boundary row); the order, addresses and data of the bottom-row write-back;
// the distance; and the latency of overlapped sections,
// 1 + ((T-1)(N+1) + 2N+1)(PH_RD+PH_AB+3). For bypass mode it checks the load
// steps, the race window and the captured distance.
module tb_dtw_ctrl;
  import dtw_pkg::*;
  localparam int unsigned N = 3, MT = 4, PH_RD = 6, PH_AB = 3, RWIN = 20;
  localparam int unsigned AW = $clog2(N * MT), TW = $clog2(MT);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, mode_race = 1'b0;
  logic [TW:0] ntile_a = '0, ntile_b = '0;
  ctl_t ctl;
  logic [TW-1:0] ta, tb;
  logic [N-1:0][9:0] brow_tile, top_val, left_val, right_code, bottom_code;
  logic [9:0] corner_val, brow_rdata, brow_wdata, distance;
  logic [AW-1:0] brow_raddr, brow_waddr;
  logic brow_we, busy, done;
  int checks = 0, failures = 0;

  dtw_ctrl #(.N(N), .MAX_TILES(MT), .PH_RD(PH_RD), .PH_AB(PH_AB), .RACE_WIN(RWIN)) dut (.*);
  always #5 clk = ~clk;

  int nstep;   // pipeline cycles seen in the current operation
  function automatic logic [9:0] fr(input int a); return 10'(a * 37 + 5); endfunction
  always_comb begin
    brow_rdata = fr(int'(brow_raddr));
    for (int k = 0; k < int'(N); k++) begin
      brow_tile[k]   = fr(int'(tb) * int'(N) + k);
      right_code[k]  = 10'(nstep * 7 + k);
      bottom_code[k] = 10'(300 + nstep * 3 + k);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  // expected write-back sequence: per section in row-major order, N words
  int exp_waddr[$];
  int n_clr, n_rd, n_ab, n_step, n_wb, bad_len, run_rd, run_ab, n_go, bad_bnd, bad_wb;
  logic [N-1:0][9:0] last_right;
  always @(posedge clk) begin
    if (ctl.clr) n_clr++;
    if (ctl.rd_start) n_rd++;
    if (ctl.ab_start) n_ab++;
    if (ctl.step) n_step++;
    if (ctl.race_go) n_go++;
    if (ctl.rd_phase) run_rd++; else begin if (run_rd != 0 && run_rd != int'(PH_RD)) bad_len++; run_rd = 0; end
    if (ctl.ab_phase) run_ab++; else begin if (run_ab != 0 && run_ab != int'(PH_AB)) bad_len++; run_ab = 0; end
    if (ctl.rd_start && !ctl.race) begin
      int expc;
      for (int k = 0; k < int'(N); k++) begin
        if (top_val[k] != ((ta == 0) ? DIST_INF : brow_tile[k])) bad_bnd++;
        if (left_val[k] != ((tb == 0) ? DIST_INF : last_right[k])) bad_bnd++;
      end
      expc = (ta == 0 && tb == 0) ? 0 : (ta == 0 || tb == 0) ? 1023 : int'(fr(int'(tb) * int'(N) - 1));
      if (int'(corner_val) != expc) bad_bnd++;
    end
    if (ctl.ab_start) last_right <= right_code;
    if (brow_we) begin
      int e;
      e = (exp_waddr.size() > 0) ? exp_waddr.pop_front() : -1;
      if (int'(brow_waddr) != e) bad_wb++;
      if (brow_wdata != bottom_code[int'(brow_waddr) % int'(N)]) bad_wb++;
      n_wb++;
    end
    if (ctl.ab_phase && !$past(ctl.ab_phase)) nstep++;
  end

  task automatic run(input int pa, input int pb, input bit race);
    int t = 0, tiles = pa * pb, steps;
    steps = (tiles - 1) * int'(N + 1) + 2 * int'(N) + 1;
    n_clr = 0; n_rd = 0; n_ab = 0; n_step = 0; n_wb = 0; bad_len = 0; n_go = 0; bad_bnd = 0; bad_wb = 0;
    nstep = 0;
    exp_waddr.delete();
    for (int p = 0; p < pa; p++)
      for (int q = 0; q < pb; q++)
        for (int k = 0; k < int'(N); k++) exp_waddr.push_back(q * int'(N) + k);
    ntile_a = (TW+1)'(pa); ntile_b = (TW+1)'(pb); mode_race = race;
    start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); t++; end
    chk("reset phases", n_clr, 1);
    chk("phase lengths", bad_len, 0);
    if (!race) begin
      chk("readout phases", n_rd, steps);
      chk("abs phases", n_ab, steps);
      chk("steps", n_step, steps);
      chk("boundary words written", n_wb, tiles * N);
      chk("boundary write-back", bad_wb, 0);
      chk("boundary values offered", bad_bnd, 0);
      chk("distance", int'(distance), ((steps - 1) * 7 + int'(N) - 1) % 1024);
      chk("latency", t, 1 + steps * (PH_RD + PH_AB + 3));
    end else begin
      chk("race load steps", n_step, N);
      chk("race window", n_go, RWIN);
      chk("no readout in race mode", n_rd, 0);
      chk("race distance", int'(distance), N - 1);
    end
    chk("idle after done", int'(busy), 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1, 1, 0);
    run(2, 3, 0);
    run(4, 2, 0);
    run(1, 1, 1);
    run(3, 3, 0);
    run(1, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
