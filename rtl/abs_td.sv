// abs_td: time-domain absolute difference. Two DTCs are fired by the same
// phase edge, giving pulses A and B quanta wide; their XOR is high from
// min(A,B) to max(A,B), |A-B| quanta in all. A minimum-pulse generator adds
// the removable offset, so `out` carries |A-B| + M quanta within the phase.
// The document gives the module (a 4 bit DTC inside simple gates); the XOR
// as the combining gate is this design's reading. Timing: `phase` must stay
// high for at least 2^DATA_W + M quanta.
module abs_td #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned M      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              phase,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic              out
);
  logic pa, pb, da, db;

  dtc #(.CODE_W(DATA_W)) u_dtc_a (.clk, .rst_n, .start(phase), .code(a), .dly(da), .pulse(pa));
  dtc #(.CODE_W(DATA_W)) u_dtc_b (.clk, .rst_n, .start(phase), .code(b), .dly(db), .pulse(pb));

  logic diff;
  assign diff = pa ^ pb;

  min_pulse_gen #(.M(M)) u_mpg (.clk, .rst_n, .phase, .in(diff), .out);

  // The delayed edges are not needed here.
  logic unused;
  assign unused = da ^ db;
endmodule
