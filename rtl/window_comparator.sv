// window_comparator: error detector of the hybrid stage.
//
// Compares the results of the two running CL copies and raises error when
// they differ while the comparison window is open (dc high).  In the
// architecture the window is the high phase of a delayed clock and, in the
// improved version, spans the setup-hold window of the output register, so
// anything the register could capture is compared.  In this cycle-level
// design dc is an enable from the control logic that is high in the cycles
// whose result the output register is about to capture, and the comparison
// is taken at the same rising edge the output register samples on: the two
// copies are compared exactly at the capture point.
//
// Only the static (level) part of the comparator is built.  The dynamic
// transition detector that the architecture combines with it to catch
// transitions inside the window, and the delayed clock itself, are sub-cycle
// analog timing and are not modelled.
//
// Timing: combinational; error is sampled by the control logic.
module window_comparator #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         dc,
  output logic         error
);

  always_comb error = dc && (a != b);

endmodule
