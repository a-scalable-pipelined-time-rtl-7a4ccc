// bnd_src: boundary pulse source. It turns a 10 bit digital value (a
// boundary result decoded by a TDC and kept in the register file) back into
// a time-domain pulse of value + M quanta at the start of each readout
// phase, so one section of the matrix can continue from the results of the
// previous one. The document states that boundary values are re-sent; the
// down-counter used here is this design's own circuit. `rd_start` loads the
// count; `out` is high from the next quantum on.
module bnd_src #(
  parameter int unsigned DIST_W = 10,
  parameter int unsigned M      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_start,
  input  logic [DIST_W-1:0] value,
  output logic              out
);
  logic [DIST_W:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt_q <= '0;
    else if (rd_start)   cnt_q <= {1'b0, value} + (DIST_W+1)'(M);
    else if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
  end

  assign out = (cnt_q != '0);
endmodule
