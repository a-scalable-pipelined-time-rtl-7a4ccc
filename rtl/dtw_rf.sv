// dtw_rf: on-chip register file of the DTW engine. It keeps
//   - series A and series B, 4 bit samples, MAX_TILES*N entries each,
//     written one sample at a time (from the scan chain);
//   - the bottom-boundary row: the last row of D of the most recent section
//     in every column, written by the bottom TDCs, one word per pipeline
//     cycle, and read back as the top boundary of the section below.
// (The right boundary needs no storage: it is re-sent one pipeline cycle
// after it is decoded.) For the section in tile row `ta` and tile column
// `tb` it presents, all in parallel, the N samples of A and of B and the N
// boundary-row words above the section. `brow_raddr` is a spare random read of the boundary
// row (corner value, scan read-back). Reads are combinational, writes are
// synchronous. Reset clears the boundary memories; the series memories hold
// whatever was scanned in. The document names the register file only; its
// organisation is this design's own.
module dtw_rf
  import dtw_pkg::*;
#(
  parameter int unsigned N         = 20,
  parameter int unsigned MAX_TILES = 16,
  localparam int unsigned LEN      = N * MAX_TILES,
  localparam int unsigned AW       = $clog2(LEN),
  localparam int unsigned TW       = $clog2(MAX_TILES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // series write port
  input  logic                     wr_en,
  input  logic                     wr_sel,     // 0: A, 1: B
  input  logic [AW-1:0]            wr_addr,
  input  logic [DATA_W-1:0]        wr_data,
  // boundary-row write port
  input  logic                     brow_we,
  input  logic [AW-1:0]            brow_waddr,
  input  logic [DIST_W-1:0]        brow_wdata,
  // section read
  input  logic [TW-1:0]            ta,
  input  logic [TW-1:0]            tb,
  output logic [N-1:0][DATA_W-1:0] a_tile,
  output logic [N-1:0][DATA_W-1:0] b_tile,
  output logic [N-1:0][DIST_W-1:0] brow_tile,
  input  logic [AW-1:0]            brow_raddr,
  output logic [DIST_W-1:0]        brow_rdata
);
  logic [DATA_W-1:0] amem [LEN];
  logic [DATA_W-1:0] bmem [LEN];
  logic [DIST_W-1:0] brow [LEN];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_sel) amem[wr_addr] <= wr_data;
    if (wr_en &&  wr_sel) bmem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LEN); k++) brow[k] <= '0;
    end else begin
      if (brow_we) brow[brow_waddr] <= brow_wdata;
    end
  end

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      a_tile[k]    = amem[AW'(int'(ta) * int'(N) + k)];
      b_tile[k]    = bmem[AW'(int'(tb) * int'(N) + k)];
      brow_tile[k] = brow[AW'(int'(tb) * int'(N) + k)];
    end
  end

  assign brow_rdata = brow[brow_raddr];
endmodule
