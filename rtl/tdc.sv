// tdc: time-to-digital converter at the right and bottom edges of the
// matrix (Vernier delay chains on the chip, modelled here as a counter of
// quanta). Pipelined mode: cleared by `ctl.rd_start`, it counts the quanta in
// which `in` is high during `ctl.rd_phase` and reports the width minus the
// offset M, saturated to CODE_W bits. Bypass (race) mode: cleared by
// `ctl.race_start`, it counts the quanta of the race window before the edge
// on `in` arrives, i.e. the edge's arrival time. `code` is valid from the
// quantum after the phase ends until the next clear. The chip's TDC resolves
// half an LSB; this model resolves one.
module tdc
  import dtw_pkg::*;
#(
  parameter int unsigned CODE_W = 10,
  parameter int unsigned M      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctl_t              ctl,
  input  logic              in,
  output logic [CODE_W-1:0] code
);
  logic [CODE_W+1:0] cnt_q;
  logic              cnt_en;

  assign cnt_en = ctl.race ? (ctl.race_go && !in) : (ctl.rd_phase && in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           cnt_q <= '0;
    else if (ctl.rd_start || ctl.race_start) cnt_q <= '0;
    else if (cnt_en && cnt_q != '1)       cnt_q <= cnt_q + 1'b1;
  end

  always_comb begin
    logic [CODE_W+1:0] w;
    w = ctl.race ? cnt_q : ((cnt_q > (CODE_W+2)'(M)) ? cnt_q - (CODE_W+2)'(M) : '0);
    code = (w > (CODE_W+2)'((1 << CODE_W) - 1)) ? '1 : w[CODE_W-1:0];
  end
endmodule
