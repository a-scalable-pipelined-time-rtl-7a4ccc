// dtc: digital-to-time converter (4 bit on the chip) built, as there, from a
// delay chain and a multiplexer. The reference edge `start` runs down a chain
// of (2^CODE_W - 1) stages of one quantum each; `code` selects the tap, so
// `dly` is `start` delayed by `code` quanta and `pulse` = start & ~dly is a
// pulse `code` quanta wide beginning with the reference edge. Tap 0 is the
// undelayed input (combinational). `start` must stay high for the whole
// phase. One stage per quantum is this design's choice.
module dtc #(
  parameter int unsigned CODE_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CODE_W-1:0] code,
  output logic              dly,
  output logic              pulse
);
  localparam int unsigned TAPS = (1 << CODE_W) - 1;

  logic [TAPS:0] tap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tap[TAPS:1] <= '0;
    else        tap[TAPS:1] <= tap[TAPS-1:0];
  end
  assign tap[0] = start;

  assign dly   = tap[code];
  assign pulse = start & ~dly;
endmodule
