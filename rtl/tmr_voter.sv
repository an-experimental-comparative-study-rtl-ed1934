// tmr_voter: bitwise two-out-of-three majority voter (the "V" of both TMR
// architectures).  Each output bit is the value at least two of the three
// inputs agree on, so any error confined to one input is masked.  The voter
// gives no indication that it masked anything, which is why a TMR stage
// cannot report corrected errors.
//
// Timing: combinational.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
