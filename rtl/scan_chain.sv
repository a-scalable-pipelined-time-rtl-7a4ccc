// scan_chain: serial access to the engine's inputs and outputs. A word of
// 2 + ADDR_W + DIST_W bits, {op, addr, data}, is shifted in at `scan_in`
// (most significant bit first) while `scan_en` is high; the bit leaving the
// other end appears on `scan_out`. A quantum with `scan_upd` high applies the
// word:
//   op 0  write data[3:0] to A[addr]
//   op 1  write data[3:0] to B[addr]
//   op 2  capture the DTW distance into the data field
//   op 3  capture boundary-row word `addr` into the data field
// after which the captured word can be shifted out. The document says only
// that inputs and outputs can be scanned in and out; the word format is this
// design's own.
module scan_chain
  import dtw_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  localparam int unsigned SCW   = 2 + ADDR_W + DIST_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scan_in,
  input  logic              scan_en,
  input  logic              scan_upd,
  output logic              scan_out,
  // register-file side
  output logic              wr_en,
  output logic              wr_sel,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [DIST_W-1:0] rd_data,
  input  logic [DIST_W-1:0] distance
);
  typedef enum logic [1:0] {OP_WR_A, OP_WR_B, OP_CAP_DIST, OP_CAP_BROW} op_e;

  logic [SCW-1:0] sr_q;
  op_e            op;
  logic [ADDR_W-1:0] addr;
  logic [DIST_W-1:0] data;

  assign op   = op_e'(sr_q[SCW-1 -: 2]);
  assign addr = sr_q[DIST_W +: ADDR_W];
  assign data = sr_q[DIST_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else if (scan_en) sr_q <= {sr_q[SCW-2:0], scan_in};
    else if (scan_upd && op == OP_CAP_DIST) sr_q[DIST_W-1:0] <= distance;
    else if (scan_upd && op == OP_CAP_BROW) sr_q[DIST_W-1:0] <= rd_data;
  end

  assign scan_out = sr_q[SCW-1];
  assign wr_en    = scan_upd && !scan_en && (op == OP_WR_A || op == OP_WR_B);
  assign wr_sel   = (op == OP_WR_B);
  assign wr_addr  = addr;
  assign wr_data  = data[DATA_W-1:0];
  assign rd_addr  = addr;
endmodule
