// cl_demux: reconfiguration demultiplexer in front of the three CL copies.
//
// The input register value is steered to the two copies named by the current
// configuration; the standby copy receives all zeros, so its logic does not
// switch and it draws no dynamic power while it waits as a spare.  Driving
// zeros (rather than, for example, holding the last value) is this design's
// choice.
//
// Timing: combinational.
module cl_demux
  import ft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  cfg_t              cfg,
  input  logic [W-1:0]      x,
  output logic [2:0][W-1:0] x_copy
);

  always_comb begin
    x_copy = '0;
    x_copy[copy_a(cfg)] = x;
    x_copy[copy_b(cfg)] = x;
  end

endmodule
