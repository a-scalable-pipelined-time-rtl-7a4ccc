// dtw_pkg: widths, constants and the phase-control bundle shared by the
// time-domain DTW engine.
//
// Every time-domain signal in this design is a level sampled on one clock,
// the time-quantum clock: one period stands for one LSB of pulse width
// (40 ps on the original chip). A value x is carried as a pulse that is high
// for x quanta, starting on the first quantum of a phase. Data samples are
// 4 bit, each time flip-flop holds 6 bit and a wide time flip-flop joins two
// of them into a 10 bit value, as on the chip. The offset added by the
// minimum-pulse generator (MINP) and the phase lengths are this design's
// own choices.
package dtw_pkg;

  localparam int unsigned DATA_W = 4;                 // DTC input width
  localparam int unsigned LSB_W  = 6;                 // one TFF
  localparam int unsigned MSB_W  = 4;                 // upper part of a WTFF
  localparam int unsigned DIST_W = LSB_W + MSB_W;     // 10 bit distance
  localparam int unsigned TRIM_W = 2;                 // tunable delay setting
  localparam int unsigned MINP   = 2;                 // removable pulse offset, quanta

  localparam logic [DIST_W-1:0] DIST_INF = '1;        // "infinite" boundary

  // Readout/MIN phase length: a full 10 bit pulse plus offset, trim and margin.
  localparam int unsigned PH_RD_DEF = (1 << DIST_W) - 1 + MINP + ((1 << TRIM_W) - 1) + 5;
  // ABS phase length: a full DTC pulse plus offset and margin.
  localparam int unsigned PH_AB_DEF = (1 << DATA_W) - 1 + MINP + 2;

  // Control bundle broadcast by the clock-management unit to every cell.
  typedef struct packed {
    logic clr;       // reset phase (rstb): empty every TFF ring
    logic step;      // pipeline clock: advance the data registers
    logic rd_start;  // quantum before the readout phase: TFFs load their output
    logic rd_phase;  // readout / MIN / copy phase
    logic ab_start;  // quantum before the ABS phase
    logic ab_phase;  // ABS write phase
    logic race;      // non-pipelined (bypass) mode selected
    logic race_start;// quantum before the race window
    logic race_go;   // race window; also the corner edge in bypass mode
  } ctl_t;

endpackage
