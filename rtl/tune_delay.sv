// tune_delay: the 2 bit tunable delay cell of each unit cell. It delays the
// falling edge of the cell's output pulse by `trim` quanta (0..3), so the
// pulse leaves `trim` quanta wider; a calibration can use it to cancel
// a cell that is fast or slow. The document gives the 2 bit setting and the
// purpose; one quantum per step is this design's choice.
module tune_delay #(
  parameter int unsigned TRIM_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TRIM_W-1:0] trim,
  input  logic              in,
  output logic              out
);
  localparam int unsigned D = (1 << TRIM_W) - 1;

  logic [D:0] tap;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tap[D:1] <= '0;
    else        tap[D:1] <= tap[D-1:0];
  end
  assign tap[0] = in;

  always_comb begin
    out = in;
    for (int k = 1; k <= int'(D); k++)
      if (k <= int'(trim)) out = out | tap[k];
  end
endmodule
