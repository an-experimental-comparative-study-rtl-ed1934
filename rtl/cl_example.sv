// cl_example: one copy of the combinational logic (CL) block that every
// fault-tolerant stage protects, with fault-injection inputs.
//
// The architectures are generic: they wrap whatever combinational logic sits
// between an input and an output register.  The circuits they were evaluated
// on are external benchmark circuits that are not reproduced here, so this
// design uses a small stand-in function of its own:
//     f(x) = (x * 5 + 3) XOR rotate(x, W/2)            (all modulo 2**W)
// It is purely combinational, uses every input bit and has no
// simple pass-through path, which is all the surrounding stages rely on.
//
// Fault injection (tie all three masks to zero in normal use): the result
// is  ((f(x) ^ flt_flip) & ~flt_sa0) | flt_sa1 .  flt_flip pulses model a
// single-event transient reaching the CL output, flt_sa0 / flt_sa1 held
// high model stuck-at-0 / stuck-at-1 faults.  Faults are injected at the CL
// output, a simplification of gate-level injection inside the CL.
//
// Timing: combinational, no clock.
module cl_example #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] flt_flip,
  input  logic [W-1:0] flt_sa0,
  input  logic [W-1:0] flt_sa1,
  output logic [W-1:0] y
);

  localparam int unsigned HALF = W / 2;

  logic [W-1:0] rot;
  logic [W-1:0] f;

  always_comb begin
    rot = (x >> HALF) | (x << (W - HALF));
    f   = (x * W'(5) + W'(3)) ^ rot;
    y   = ((f ^ flt_flip) & ~flt_sa0) | flt_sa1;
  end

endmodule
