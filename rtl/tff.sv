// tff: multibit time flip-flop, a quantized model of the ring of tristate
// inverters used on the chip (33 stages, 6 bit). Write: every quantum in
// which `wr` is high moves the stored "0" one position on, so the stored
// value is the total width of all pulses written since the last readout;
// when the ring is full it wraps and `carry` is high for one quantum (the
// cycle after the write that wrapped). Readout: `rd_start` moves the stored
// value into the output and empties the ring, which can then take new writes
// at once; from the next quantum `out` is high while output quanta remain,
// one per quantum when `adv` is high. `rot` adds one full turn of the ring
// (2^W quanta) to the output without a gap, which is how a wider value is
// read out in several rotations. `clr` is the reset phase (rstb).
// Leakage is not modelled.
module tff #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr,
  input  logic         rd_start,
  input  logic         adv,
  input  logic         rot,
  output logic         out,
  output logic         carry,
  output logic [W-1:0] stored,   // digital view of the ring content
  output logic [W:0]   remain    // output quanta still to be sent
);
  logic [W-1:0] store_q;
  logic [W:0]   ocnt_q;
  logic         carry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      store_q <= '0;
      ocnt_q  <= '0;
      carry_q <= 1'b0;
    end else if (clr) begin
      store_q <= '0;
      ocnt_q  <= '0;
      carry_q <= 1'b0;
    end else begin
      carry_q <= wr && (store_q == '1);
      if (rd_start) begin
        store_q <= W'(wr);
        ocnt_q  <= {1'b0, store_q};
      end else begin
        store_q <= store_q + W'(wr);
        ocnt_q  <= ocnt_q + (rot ? (W+1)'(1 << W) : '0)
                          - (((ocnt_q != '0) || rot) && adv ? (W+1)'(1) : '0);
      end
    end
  end

  assign out    = (ocnt_q != '0) || rot;
  assign carry  = carry_q;
  assign stored = store_q;
  assign remain = ocnt_q;
endmodule
