// cl_mux: reconfiguration multiplexer behind the three CL copies.
//
// Selects the results of the two running copies of the current
// configuration: y_a (first running copy) feeds the output register, y_b
// (second running copy) is used only for checking.  In the improved hybrid
// stage both outputs go straight to the comparator.  The standby copy's
// result is not used.
//
// Timing: combinational.
module cl_mux
  import ft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  cfg_t              cfg,
  input  logic [2:0][W-1:0] y_copy,
  output logic [W-1:0]      y_a,
  output logic [W-1:0]      y_b
);

  always_comb begin
    y_a = y_copy[copy_a(cfg)];
    y_b = y_copy[copy_b(cfg)];
  end

endmodule
