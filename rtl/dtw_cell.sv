// dtw_cell: one DTW unit cell. It computes
//     D(i,j) = |A_i - B_j| + min(D(i-1,j), D(i,j-1), D(i-1,j-1))
// with every D carried as a pulse width.
//
// Pipelined mode, one pipeline cycle per wavefront step:
//   readout phase  the main WTFFs of all cells send their values; this cell's
//                  MIN gate ANDs the pulses of its upper and left neighbours
//                  with that of its own copy WTFF, and the result is written
//                  into the main WTFF. At the same time the pulse of the
//                  diagonal neighbour is written into the copy WTFF, because
//                  D(i-1,j-1) is one pipeline step older than the other two
//                  ancestors and must wait one step here.
//   ABS phase      the ABS module's pulse |A-B| is accumulated on top.
// The main WTFF output passes a minimum-pulse generator (offset M) and the
// 2 bit tunable delay before leaving as `d_out`; the copy output gets the
// offset only. A and B are held in registers that load from the neighbour
// on `ctl.step`, so samples travel one cell per pipeline cycle, A to the
// right and B downwards.
//
// Bypass (non-pipelined) mode, `ctl.race`: the WTFFs are skipped. The
// earliest rising edge among the three inputs (an OR) is delayed by |A-B|
// quanta in a tapped delay chain and sent on `d_out`, so the edge that
// reaches the far corner arrives after exactly the DTW distance.
// Padding: series whose length is not a multiple of N are padded up to the
// next section boundary. Each sample carries a pad flag that travels with
// it, and a padded cell adds no cost (the ABS module sees equal samples).
// A cell padded in its row only (past the end of A) takes only its upper
// input, one padded in its column only takes only its left input, and one
// padded in both takes all three as usual. So the last real D(la-1,lb-1)
// is carried down, right and diagonally to the section's far corner, in
// both modes.
// The cell contents (2 WTFF, ABS, MIN, tunable delay, copy of the diagonal)
// follow the document; phase order and the bypass delay chain are this
// design's own, and so is the padding scheme.
module dtw_cell
  import dtw_pkg::*;
#(
  parameter int unsigned M = MINP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctl_t              ctl,
  input  logic [DATA_W-1:0] a_in,
  input  logic [DATA_W-1:0] b_in,
  output logic [DATA_W-1:0] a_out,
  output logic [DATA_W-1:0] b_out,
  input  logic              a_pad_in,  // pad flags travel with the samples
  input  logic              b_pad_in,
  output logic              a_pad_out,
  output logic              b_pad_out,
  input  logic [TRIM_W-1:0] trim,
  input  logic              up_in,
  input  logic              left_in,
  input  logic              diag_in,
  output logic              d_out,
  output logic [DIST_W-1:0] d_val     // digital view of the main WTFF
);
  // ---- sample registers (data piping)
  logic [DATA_W-1:0] a_q, b_q;
  logic              a_pad_q, b_pad_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      a_pad_q <= 1'b0;
      b_pad_q <= 1'b0;
    end else if (ctl.step) begin
      a_q     <= a_in;
      b_q     <= b_in;
      a_pad_q <= a_pad_in;
      b_pad_q <= b_pad_in;
    end
  end
  assign a_out     = a_q;
  assign b_out     = b_q;
  assign a_pad_out = a_pad_q;
  assign b_pad_out = b_pad_q;

  // which ancestors count: all three, or the one inside the real matrix
  logic use_up, use_left, use_diag;
  assign use_up   = !b_pad_q || a_pad_q;
  assign use_left = !a_pad_q || b_pad_q;
  assign use_diag = a_pad_q == b_pad_q;
  logic [DATA_W-1:0] b_eff;       // a padded cell compares A with itself
  assign b_eff = (a_pad_q || b_pad_q) ? a_q : b_q;

  // ---- ABS and MIN
  logic abs_p, min_p, copy_raw, copy_p;

  abs_td #(.DATA_W(DATA_W), .M(M)) u_abs (
    .clk, .rst_n, .phase(ctl.ab_phase), .a(a_q), .b(b_eff), .out(abs_p)
  );

  min_td #(.NIN(3)) u_min (
    .in({up_in || !use_up, left_in || !use_left, copy_p || !use_diag}), .out(min_p)
  );

  // ---- main WTFF: MIN result, then ABS result
  logic main_wr, main_raw, main_mp;
  logic [DIST_W-1:0] copy_val;

  assign main_wr = (ctl.rd_phase && min_p) || (ctl.ab_phase && abs_p);

  wtff #(.LSB_W(LSB_W), .MSB_W(MSB_W), .M(M)) u_main (
    .clk, .rst_n, .clr(ctl.clr), .wr_start(ctl.rd_start || ctl.ab_start), .wr(main_wr),
    .rd_start(ctl.rd_start), .rd_phase(ctl.rd_phase), .out(main_raw), .value(d_val)
  );

  min_pulse_gen #(.M(M)) u_mpg_main (.clk, .rst_n, .phase(ctl.rd_phase), .in(main_raw), .out(main_mp));

  logic main_tuned;
  tune_delay #(.TRIM_W(TRIM_W)) u_tune (.clk, .rst_n, .trim, .in(main_mp), .out(main_tuned));

  // ---- copy WTFF: holds D(i-1,j-1) for one pipeline step
  wtff #(.LSB_W(LSB_W), .MSB_W(MSB_W), .M(M)) u_copy (
    .clk, .rst_n, .clr(ctl.clr), .wr_start(ctl.rd_start), .wr(ctl.rd_phase && diag_in),
    .rd_start(ctl.rd_start), .rd_phase(ctl.rd_phase), .out(copy_raw), .value(copy_val)
  );

  min_pulse_gen #(.M(M)) u_mpg_copy (.clk, .rst_n, .phase(ctl.rd_phase), .in(copy_raw), .out(copy_p));

  // ---- bypass mode: race of edges
  logic [DATA_W-1:0] absd;
  logic race_in, race_edge, race_pulse;
  assign absd    = (a_q > b_eff) ? a_q - b_eff : b_eff - a_q;
  assign race_in = ctl.race && ((up_in && use_up) || (left_in && use_left) || (diag_in && use_diag));

  dtc #(.CODE_W(DATA_W)) u_race_dly (
    .clk, .rst_n, .start(race_in), .code(absd), .dly(race_edge), .pulse(race_pulse)
  );

  assign d_out = ctl.race ? race_edge : main_tuned;

  logic unused;
  assign unused = race_pulse ^ (^copy_val);
endmodule
