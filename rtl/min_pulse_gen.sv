// min_pulse_gen: minimum-pulse generator. It widens a pulse by a fixed,
// removable offset of M quanta so that a value of zero still leaves a pulse
// wide enough to travel. The output is the first M quanta of the phase
// window OR'ed with the input delayed by M quanta; for an input that starts
// at the phase start the result is one contiguous pulse of width x + M. The
// offset is removed again where the pulse is stored (wtff) or decoded (tdc).
// The document names the circuit and its purpose; the construction and M are
// this design's own. Latency: M quanta on the input path.
module min_pulse_gen #(
  parameter int unsigned M = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic phase,   // high during the phase the pulse belongs to
  input  logic in,
  output logic out
);
  logic [M:1] in_d, ph_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_d <= '0;
      ph_d <= '0;
    end else begin
      in_d[1] <= in;
      ph_d[1] <= phase;
      for (int k = 2; k <= int'(M); k++) begin
        in_d[k] <= in_d[k-1];
        ph_d[k] <= ph_d[k-1];
      end
    end
  end

  assign out = (phase & ~ph_d[M]) | in_d[M];
endmodule
