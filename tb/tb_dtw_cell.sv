// tb_dtw_cell: drives one unit cell through three pipeline cycles with
// pulses generated by the testbench: cycle 1 copies the diagonal value d,
// cycle 2 presents the upper and left values u, l and the samples a, b,
// cycle 3 reads the result. The output pulse must be
// min(u, l, d) + |a-b| + M + trim quanta wide, and the main WTFF must hold
// min(u, l, d) + |a-b| after cycle 2. In bypass mode the output edge must
// follow the earliest input edge by |a-b| quanta. With pad flags set the
// cost is 0; a cell padded in its row only must follow its upper input, one
// padded in its column only its left input, one padded in both the minimum
// of all three, in both modes.
module tb_dtw_cell;
  import dtw_pkg::*;
  localparam int unsigned M = MINP;
  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t ctl = '0;
  logic [3:0] a_in = '0, b_in = '0, a_out, b_out;
  logic [1:0] trim = '0;
  logic up_in = 1'b0, left_in = 1'b0, diag_in = 1'b0, d_out;
  logic a_pad_in = 1'b0, b_pad_in = 1'b0, a_pad_out, b_pad_out;
  logic [9:0] d_val;
  int checks = 0, failures = 0;

  dtw_cell #(.M(M)) dut (.*);
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

  // one pipeline cycle; pulses of the given values (+M) on the inputs,
  // returns the width of d_out during the readout phase
  task automatic cycle(input int u, input int l, input int d, output int w);
    ctl = '0; ctl.step = 1'b1; ctl.rd_start = 1'b1; @(negedge clk);
    ctl = '0;
    w = 0;
    for (int t = 0; t < int'(PH_RD_DEF); t++) begin
      ctl.rd_phase = 1'b1;
      up_in = (t < u + int'(M)); left_in = (t < l + int'(M)); diag_in = (t < d + int'(M));
      #1 if (d_out) w++;
      @(negedge clk);
    end
    up_in = 1'b0; left_in = 1'b0; diag_in = 1'b0;
    ctl = '0; ctl.ab_start = 1'b1; @(negedge clk);
    ctl = '0;
    for (int t = 0; t < int'(PH_AB_DEF); t++) begin ctl.ab_phase = 1'b1; @(negedge clk); end
    ctl = '0; @(negedge clk);
  endtask

  initial begin
    int u, l, d, a, b, tr, w, m, ab, t_in, t_out, pa, pb, n_out = 0, n_race_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ctl = '0; ctl.clr = 1'b1; @(negedge clk); ctl = '0;
    for (int n = 0; n < 30; n++) begin
      u = $urandom_range(900, 0); l = $urandom_range(900, 0); d = $urandom_range(900, 0);
      if (n % 3 == 0) d = $urandom_range(50, 0);
      a = $urandom_range(15, 0); b = $urandom_range(15, 0); tr = $urandom_range(3, 0);
      trim = 2'(tr);
      cycle(0, 0, d, w);                 // copy d
      pa = (n % 4 == 1 || n % 4 == 3) ? 1 : 0;
      pb = (n % 4 == 2 || n % 4 == 3) ? 1 : 0;
      a_in = 4'(a); b_in = 4'(b); a_pad_in = pa[0]; b_pad_in = pb[0];
      cycle(u, l, 0, w);                 // compute
      m = u; if (l < m) m = l; if (d < m) m = d;
      if (pa != 0 && pb == 0) m = u;
      if (pa == 0 && pb != 0) m = l;
      ab = (pa != 0 || pb != 0) ? 0 : ((a > b) ? a - b : b - a);
      if (pa != pb) n_out++;
      chk("stored D", int'(d_val), m + ab);
      chk("samples piped", int'({a_out, b_out}), (a << 4) | b);
      chk("pad flags piped", int'({a_pad_out, b_pad_out}), pa * 2 + pb);
      cycle(0, 0, 0, w);                 // read
      chk("output width", w, m + ab + int'(M) + tr);
    end
    // bypass mode
    for (int n = 0; n < 15; n++) begin
      a = $urandom_range(15, 0); b = $urandom_range(15, 0);
      pa = (n % 5 == 4 || n % 5 == 2) ? 1 : 0;
      ab = (pa != 0) ? 0 : ((a > b) ? a - b : b - a);
      a_in = 4'(a); b_in = 4'(b); a_pad_in = pa[0]; b_pad_in = 1'b0;
      ctl = '0; ctl.race = 1'b1; ctl.step = 1'b1; @(negedge clk);
      ctl.step = 1'b0;
      t_in = $urandom_range(10, 2); t_out = -1;
      for (int t = 0; t < 40; t++) begin
        ctl.race_go = 1'b1;
        case (n % 3)
          0: up_in = (t >= t_in);
          1: left_in = (t >= t_in);
          default: diag_in = (t >= t_in);
        endcase
        #1 if (d_out && t_out < 0) t_out = t;
        @(negedge clk);
      end
      up_in = 1'b0; left_in = 1'b0; diag_in = 1'b0; ctl = '0;
      repeat (20) @(negedge clk);
      if (pa != 0 && n % 3 != 0) begin
        chk("row-padded cell ignores left and diagonal", t_out, -1);
        n_race_out++;
      end else
        chk("race delay", t_out - t_in, ab);
    end
    chk("outside cells seen", int'(n_out > 0 && n_race_out > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
