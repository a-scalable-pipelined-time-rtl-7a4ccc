// dtw_ctrl: clock-management unit and sequencer of the DTW engine.
//
// Pipelined (unfolded) mode: the two series are cut into sections of N
// samples; section (ta,tb) is an N x N block of the full DTW matrix. A
// section needs 2N+1 pipeline cycles (local cycles 0..2N): cell (i,j) is
// written in local cycle i+j+1 and its value leaves in cycle i+j+2. Sections
// are started in row-major order every N+1 pipeline cycles, so two sections
// share the matrix on different anti-diagonals. One reset quantum (`clr`,
// the TFFs' rstb phase) precedes an operation. Each pipeline cycle is
//     1 quantum   step + rd_start   data registers advance, TFFs load outputs
//     PH_RD       rd_phase          pulses out, MIN written, diagonal copied
//     1 quantum   ab_start          TDC codes valid and captured
//     PH_AB       ab_phase          |A-B| accumulated
//     1 quantum   gap               last carry settles in the WTFFs
// With r = (pipeline cycle) mod (N+1), the newest section is in local cycle
// r and the one before it in local cycle r+N+1. Row k of the newest section
// needs its sample of A, its left boundary and (r = k+1) the top boundary of
// column k; all are taken from the newest section, so the register file is
// read for that section only. The previous section's right-column value of
// row r and bottom-row value of column r are decoded by the TDCs in this
// cycle: the right one is re-sent on the left boundary of row r of the
// newest section in the very next cycle, the bottom one is written to the
// boundary row of the register file for the section below. Boundaries
// outside the matrix are "infinite" (all ones) and the corner before the
// first sample is 0; the corner of an inner section is the boundary-row word
// of the column before it, read before the section to its left overwrites
// it. An operation of T sections takes (T-1)(N+1) + 2N+1 pipeline cycles.
//
// Bypass (race) mode: one section only. N `step` quanta load the samples,
// then `race_go` opens a window of RACE_WIN quanta during which the corner
// edge races through the matrix; the right TDC of the last row measures its
// arrival time, which is the distance.
//
// The phase structure, lengths and section order are this design's own; the
// document describes the pipeline, the unfolding with TDC re-send and the
// bypass mode but not the sequencing. `done` is a one-quantum strobe;
// `distance` holds until the next operation ends. `start` is taken only when
// idle.
module dtw_ctrl
  import dtw_pkg::*;
#(
  parameter int unsigned N         = 20,
  parameter int unsigned MAX_TILES = 16,
  parameter int unsigned PH_RD     = PH_RD_DEF,
  parameter int unsigned PH_AB     = PH_AB_DEF,
  parameter int unsigned RACE_WIN  = 1 << DIST_W,
  localparam int unsigned LEN      = N * MAX_TILES,
  localparam int unsigned AW       = $clog2(LEN),
  localparam int unsigned TW       = $clog2(MAX_TILES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     mode_race,
  input  logic [TW:0]              ntile_a,    // 1..MAX_TILES
  input  logic [TW:0]              ntile_b,
  output ctl_t                     ctl,
  // newest section, for the register-file slice reads
  output logic [TW-1:0]            ta,
  output logic [TW-1:0]            tb,
  // boundary values of the newest section (digital, to the pulse sources)
  input  logic [N-1:0][DIST_W-1:0] brow_tile,
  output logic [N-1:0][DIST_W-1:0] top_val,
  output logic [N-1:0][DIST_W-1:0] left_val,
  output logic [DIST_W-1:0]        corner_val,
  output logic [AW-1:0]            brow_raddr,
  input  logic [DIST_W-1:0]        brow_rdata,
  // TDC codes and boundary-row write-back
  input  logic [N-1:0][DIST_W-1:0] right_code,
  input  logic [N-1:0][DIST_W-1:0] bottom_code,
  output logic                     brow_we,
  output logic [AW-1:0]            brow_waddr,
  output logic [DIST_W-1:0]        brow_wdata,
  // status
  output logic                     busy,
  output logic                     done,
  output logic [DIST_W-1:0]        distance
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_STEP, S_RD, S_AB0, S_AB, S_GAP,
    S_RLOAD, S_R0, S_RACE, S_RDONE
  } state_e;

  // a section slot: its tile coordinates and whether it exists
  typedef struct packed {
    logic          valid;
    logic          last;
    logic [TW-1:0] pa;
    logic [TW-1:0] pb;
  } slot_t;

  localparam int unsigned CW = $clog2(PH_RD + PH_AB + RACE_WIN + N + 2);
  localparam int unsigned RW = $clog2(N + 1);
  localparam int unsigned KW = $clog2(N);

  state_e                   st_q;
  logic [CW-1:0]            cnt_q;
  logic [RW-1:0]            r_q;        // local cycle of the newest section
  slot_t                    cur_q;      // newest section
  slot_t                    prev_q;     // the one started before it
  logic                     race_q;
  logic [N-1:0][DIST_W-1:0] lreg_q;     // right codes, re-sent as left boundary
  logic [DIST_W-1:0]        distance_q;
  logic                     done_q;

  // the section that follows `s` in row-major order
  function automatic slot_t next_slot(input slot_t s, input logic [TW:0] na, input logic [TW:0] nb);
    slot_t n;
    n = s;
    if (!s.valid || s.last) begin
      n.valid = 1'b0;
    end else if ({1'b0, s.pb} + 1'b1 < nb) begin
      n.pb = s.pb + 1'b1;
    end else begin
      n.pb = '0;
      n.pa = s.pa + 1'b1;
    end
    n.last = n.valid && ({1'b0, n.pa} + 1'b1 >= na) && ({1'b0, n.pb} + 1'b1 >= nb);
    return n;
  endfunction

  logic wb_en, fin;
  assign wb_en = (st_q == S_AB0) && prev_q.valid && (r_q < RW'(N));
  assign fin   = prev_q.valid && prev_q.last && (r_q == RW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      cnt_q      <= '0;
      r_q        <= '0;
      cur_q      <= '0;
      prev_q     <= '0;
      race_q     <= 1'b0;
      lreg_q     <= '0;
      distance_q <= '0;
      done_q     <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          cur_q.valid <= 1'b1;
          cur_q.pa    <= '0;
          cur_q.pb    <= '0;
          cur_q.last  <= (ntile_a <= (TW+1)'(1)) && (ntile_b <= (TW+1)'(1));
          prev_q      <= '0;
          r_q         <= '0;
          race_q      <= mode_race;
          st_q        <= S_CLR;
        end
        S_CLR: begin
          cnt_q <= '0;
          st_q  <= race_q ? S_RLOAD : S_STEP;
        end
        S_STEP: begin
          cnt_q <= '0;
          st_q  <= S_RD;
        end
        S_RD: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(PH_RD - 1)) st_q <= S_AB0;
        end
        S_AB0: begin
          cnt_q  <= '0;
          lreg_q <= right_code;
          if (fin) distance_q <= right_code[N-1];
          st_q   <= S_AB;
        end
        S_AB: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(PH_AB - 1)) st_q <= S_GAP;
        end
        S_GAP: begin
          if (fin) begin
            done_q <= 1'b1;
            st_q   <= S_IDLE;
          end else begin
            if (r_q == RW'(N)) begin
              r_q    <= '0;
              prev_q <= cur_q;
              cur_q  <= next_slot(cur_q, ntile_a, ntile_b);
            end else begin
              r_q <= r_q + 1'b1;
            end
            st_q <= S_STEP;
          end
        end
        S_RLOAD: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(N - 1)) st_q <= S_R0;
        end
        S_R0: begin
          cnt_q <= '0;
          st_q  <= S_RACE;
        end
        S_RACE: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(RACE_WIN - 1)) st_q <= S_RDONE;
        end
        S_RDONE: begin
          distance_q <= right_code[N-1];
          done_q     <= 1'b1;
          st_q       <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // ---- phase controls
  always_comb begin
    ctl            = '0;
    ctl.clr        = (st_q == S_CLR);
    ctl.step       = (st_q == S_STEP) || (st_q == S_RLOAD);
    ctl.rd_start   = (st_q == S_STEP);
    ctl.rd_phase   = (st_q == S_RD);
    ctl.ab_start   = (st_q == S_AB0);
    ctl.ab_phase   = (st_q == S_AB);
    ctl.race       = (st_q == S_RLOAD) || (st_q == S_R0) || (st_q == S_RACE) || (st_q == S_RDONE);
    ctl.race_start = (st_q == S_R0);
    ctl.race_go    = (st_q == S_RACE);
  end

  // Phases never overlap.
  a_phases_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctl.clr, ctl.rd_start, ctl.rd_phase, ctl.ab_start, ctl.ab_phase, ctl.race_start, ctl.race_go}))
    else $error("dtw_ctrl: overlapping phases");

  // ---- boundary values of the newest section
  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      top_val[k]  = (cur_q.pa == '0) ? DIST_INF : brow_tile[k];
      left_val[k] = (cur_q.pb == '0) ? DIST_INF : lreg_q[k];
    end
    if (cur_q.pa == '0 && cur_q.pb == '0)      corner_val = '0;
    else if (cur_q.pa == '0 || cur_q.pb == '0) corner_val = DIST_INF;
    else                                       corner_val = brow_rdata;
  end
  // corner: last word of the boundary row left of the newest section
  assign brow_raddr = AW'(int'(cur_q.pb) * int'(N) - 1);

  // ---- bottom-row write-back of the previous section
  logic [KW-1:0] wb_k;
  assign wb_k       = KW'(r_q);
  assign brow_we    = wb_en;
  assign brow_waddr = AW'(int'(prev_q.pb) * int'(N) + int'(wb_k));
  assign brow_wdata = bottom_code[wb_k];

  assign ta       = cur_q.pa;
  assign tb       = cur_q.pb;
  assign busy     = (st_q != S_IDLE);
  assign done     = done_q;
  assign distance = distance_q;
endmodule
