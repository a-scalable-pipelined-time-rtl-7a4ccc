// dtw_engine: time-domain dynamic-time-warping engine, top level.
//
// A 20 x 20 matrix of unit cells computes D(i,j) = |A_i - B_j| +
// min(D(i-1,j), D(i,j-1), D(i-1,j-1)) with every value held as a pulse width
// in time flip-flops, one anti-diagonal wavefront per pipeline cycle. Longer
// series are unfolded into 20-sample sections that follow each other through
// the matrix N+1 pipeline cycles apart: the right edge of a section is
// decoded by TDCs and re-sent as pulses into the next section one cycle
// later; the bottom edge is kept in the register file for the section
// below. Series of any length up to N*MAX_TILES are padded up to whole
// sections: samples past the end carry a pad flag and the value 0, and the
// padded cells carry the last real D at no cost to the far corner. A
// bypass mode lets edges race through the matrix without the TFFs for short
// sequences (DNA-style alignment).
//
// All time-domain signals are levels sampled on `clk`, one period per LSB
// of pulse width. Usage: scan the series into the register file (scan_chain
// op 0/1), set the series lengths `len_a`/`len_b` (1..N*MAX_TILES, at most
// N in bypass mode) and `mode_race`, pulse `start`, wait for `done`; the distance is on
// `distance` and can be scanned out (op 2). `trim` sets each cell's 2 bit
// tunable delay; 0 gives the ideal result. Latency of a pipelined operation
// of T = ceil(len_a/N)*ceil(len_b/N) sections: 1 + ((T-1)(N+1) + 2N+1)(PH_RD + PH_AB + 3) quanta from
// `start` to `done`.
module dtw_engine
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
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            scan_in,
  input  logic                            scan_en,
  input  logic                            scan_upd,
  output logic                            scan_out,
  input  logic                            start,
  input  logic                            mode_race,
  input  logic [AW:0]                     len_a,
  input  logic [AW:0]                     len_b,
  input  logic [N-1:0][N-1:0][TRIM_W-1:0] trim,
  output logic                            busy,
  output logic                            done,
  output logic [DIST_W-1:0]               distance
);
  ctl_t ctl;

  // number of sections per series, rounded up
  logic [TW:0] ntile_a, ntile_b;
  assign ntile_a = (TW+1)'((len_a + (AW+1)'(N - 1)) / (AW+1)'(N));
  assign ntile_b = (TW+1)'((len_b + (AW+1)'(N - 1)) / (AW+1)'(N));

  logic              sc_wr_en, sc_wr_sel;
  logic [AW-1:0]     sc_wr_addr, sc_rd_addr;
  logic [DATA_W-1:0] sc_wr_data;

  logic [TW-1:0]            ta, tb;
  logic [N-1:0][DATA_W-1:0] a_tile, b_tile;
  logic [N-1:0][DIST_W-1:0] brow_tile, top_val, left_val, right_code, bottom_code;
  logic [DIST_W-1:0]        corner_val, brow_rdata, brow_wdata;
  logic [AW-1:0]            ctrl_raddr, brow_raddr, brow_waddr;
  logic                     brow_we;

  scan_chain #(.ADDR_W(AW)) u_scan (
    .clk, .rst_n, .scan_in, .scan_en, .scan_upd, .scan_out,
    .wr_en(sc_wr_en), .wr_sel(sc_wr_sel), .wr_addr(sc_wr_addr), .wr_data(sc_wr_data),
    .rd_addr(sc_rd_addr), .rd_data(brow_rdata), .distance
  );

  // the boundary-row read port serves the sequencer while it runs and the
  // scan chain when idle
  assign brow_raddr = busy ? ctrl_raddr : sc_rd_addr;

  dtw_rf #(.N(N), .MAX_TILES(MAX_TILES)) u_rf (
    .clk, .rst_n,
    .wr_en(sc_wr_en && !busy), .wr_sel(sc_wr_sel), .wr_addr(sc_wr_addr), .wr_data(sc_wr_data),
    .brow_we, .brow_waddr, .brow_wdata,
    .ta, .tb, .a_tile, .b_tile, .brow_tile, .brow_raddr, .brow_rdata
  );

  dtw_ctrl #(.N(N), .MAX_TILES(MAX_TILES), .PH_RD(PH_RD), .PH_AB(PH_AB), .RACE_WIN(RACE_WIN)) u_ctrl (
    .clk, .rst_n, .start, .mode_race, .ntile_a, .ntile_b, .ctl, .ta, .tb,
    .brow_tile, .top_val, .left_val, .corner_val,
    .brow_raddr(ctrl_raddr), .brow_rdata, .right_code, .bottom_code,
    .brow_we, .brow_waddr, .brow_wdata,
    .busy, .done, .distance
  );

  // ---- boundary pulse sources (re-sent values)
  logic [N-1:0] top_p, left_p;
  logic         corner_p;

  for (genvar k = 0; k < N; k++) begin : g_src
    bnd_src #(.DIST_W(DIST_W), .M(MINP)) u_top  (.clk, .rst_n, .rd_start(ctl.rd_start), .value(top_val[k]),  .out(top_p[k]));
    bnd_src #(.DIST_W(DIST_W), .M(MINP)) u_left (.clk, .rst_n, .rd_start(ctl.rd_start), .value(left_val[k]), .out(left_p[k]));
  end
  bnd_src #(.DIST_W(DIST_W), .M(MINP)) u_corner (.clk, .rst_n, .rd_start(ctl.rd_start), .value(corner_val), .out(corner_p));

  // ---- padding past the end of each series
  logic [N-1:0]             a_pad, b_pad;
  logic [N-1:0][DATA_W-1:0] a_in, b_in;
  for (genvar k = 0; k < N; k++) begin : g_pad
    assign a_pad[k] = ((AW+1)'(ta) * (AW+1)'(N) + (AW+1)'(k)) >= len_a;
    assign b_pad[k] = ((AW+1)'(tb) * (AW+1)'(N) + (AW+1)'(k)) >= len_b;
    assign a_in[k]  = a_pad[k] ? '0 : a_tile[k];
    assign b_in[k]  = b_pad[k] ? '0 : b_tile[k];
  end

  // ---- matrix; in bypass mode the corner edge is the race window and the
  // other boundaries never rise
  logic [N-1:0] right_out, bottom_out, top_in, left_in;
  logic         corner_in;
  logic [N-1:0][N-1:0][DIST_W-1:0] d_val;

  assign top_in    = ctl.race ? '0 : top_p;
  assign left_in   = ctl.race ? '0 : left_p;
  assign corner_in = ctl.race ? ctl.race_go : corner_p;

  dtw_matrix #(.N(N), .M(MINP)) u_matrix (
    .clk, .rst_n, .ctl, .a_row(a_in), .b_col(b_in), .a_pad, .b_pad, .trim,
    .top_b(top_in), .left_b(left_in), .corner(corner_in),
    .right_out, .bottom_out, .d_val
  );

  // ---- boundary TDCs
  for (genvar k = 0; k < N; k++) begin : g_tdc
    tdc #(.CODE_W(DIST_W), .M(MINP)) u_tdc_r (.clk, .rst_n, .ctl, .in(right_out[k]),  .code(right_code[k]));
    tdc #(.CODE_W(DIST_W), .M(MINP)) u_tdc_b (.clk, .rst_n, .ctl, .in(bottom_out[k]), .code(bottom_code[k]));
  end

  // d_val is kept for observation in simulation only
  logic unused;
  assign unused = ^d_val;
endmodule
