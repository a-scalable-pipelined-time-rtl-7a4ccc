// wtff: wide time flip-flop holding a 10 bit time-domain value in two TFFs,
// a 6 bit LSB unit and a 4 bit MSB unit, as on the chip. When the LSB ring
// fills, its carry fires a one-quantum pulse generator whose pulse is written
// into the MSB TFF, so the pair counts to 2^10 - 1.
//
// Write side: `wr_start` marks the quantum before a write phase; the first M
// quanta written in each phase are the minimum-pulse offset and are dropped,
// so accumulating a pulse of x + M quanta stores x. Several phases may be
// accumulated into one value (MIN result, then ABS result).
// Read side: `rd_start` moves the value into both TFF outputs and empties
// them; while `rd_phase` is high `out` is one pulse of MSB*64 + LSB quanta
// starting on the first quantum of the phase: the LSB ring sends its
// remainder and then rotates once more for each stored MSB unit.
// The split into two TFFs and the carry pulse follow the document; the
// offset removal and the rotation readout are this design's reading of it.
// A carry from the last write quantum reaches the MSB unit two quanta later,
// so at least one idle quantum must separate a write phase from `rd_start`.
module wtff #(
  parameter int unsigned LSB_W = 6,
  parameter int unsigned MSB_W = 4,
  parameter int unsigned M     = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    wr_start,
  input  logic                    wr,
  input  logic                    rd_start,
  input  logic                    rd_phase,
  output logic                    out,
  output logic [LSB_W+MSB_W-1:0]  value      // digital view of the stored value
);
  localparam int unsigned SW = $clog2(M + 1);

  // ---- offset removal on the write side
  logic [SW-1:0] skip_q;
  logic          wr_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  skip_q <= '0;
    else if (clr || wr_start)    skip_q <= '0;
    else if (wr && skip_q != SW'(M)) skip_q <= skip_q + 1'b1;
  end
  assign wr_eff = wr && (skip_q == SW'(M));

  // ---- carry pulse generator: one-quantum pulse per LSB carry
  logic lsb_carry, msb_carry, carry_pulse_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   carry_pulse_q <= 1'b0;
    else if (clr) carry_pulse_q <= 1'b0;
    else          carry_pulse_q <= lsb_carry;
  end

  // ---- the two TFFs
  logic [LSB_W-1:0] lsb_val;
  logic [MSB_W-1:0] msb_val;
  logic [LSB_W:0]   lsb_rem;
  logic [MSB_W:0]   msb_rem;
  logic             lsb_out, msb_out, rot;

  // Ask the LSB ring for one more turn when it is about to run empty and
  // MSB units are left.
  assign rot = rd_phase && (lsb_rem <= (LSB_W+1)'(1)) && (msb_rem != '0);

  tff #(.W(LSB_W)) u_lsb (
    .clk, .rst_n, .clr, .wr(wr_eff), .rd_start, .adv(1'b1), .rot,
    .out(lsb_out), .carry(lsb_carry), .stored(lsb_val), .remain(lsb_rem)
  );

  tff #(.W(MSB_W)) u_msb (
    .clk, .rst_n, .clr, .wr(carry_pulse_q), .rd_start, .adv(rot), .rot(1'b0),
    .out(msb_out), .carry(msb_carry), .stored(msb_val), .remain(msb_rem)
  );

  assign out   = rd_phase && lsb_out;

  // Phase rules: a readout must not start while a write or a carry is still
  // on its way, or that part of the value would be lost.
  a_no_write_at_readout: assert property (@(posedge clk) disable iff (!rst_n)
    rd_start |-> !wr && !lsb_carry && !carry_pulse_q)
    else $error("wtff: readout started during a write");
  assign value = {msb_val, lsb_val};

  // The MSB unit's own output and carry are not used: its content leaves
  // through the LSB ring's rotations, and a full 10 bit value wraps.
  logic unused;
  assign unused = msb_out ^ msb_carry;
endmodule
