// min_td: time-domain minimum. Pulses that all start on the same quantum
// are high together only until the shortest one ends, so the AND of them is
// a pulse as wide as the smallest input. In the unit cell the three inputs
// are the pulses of D(i-1,j), D(i,j-1) and D(i-1,j-1). Purely combinational.
module min_td #(
  parameter int unsigned NIN = 3
) (
  input  logic [NIN-1:0] in,
  output logic           out
);
  assign out = &in;
endmodule
