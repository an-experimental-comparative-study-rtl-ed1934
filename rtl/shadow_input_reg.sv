// shadow_input_reg: input register of the hybrid stage, with a shadow copy
// of the previous input for rollback.
//
// The main register (q) drives the CL copies.  The shadow holds the input
// the stage worked on one cycle earlier.  On a normal cycle (load) the main
// register takes the new input and the shadow takes the old main value.  On
// a rollback or re-computation cycle (swap) the two exchange their contents,
// so the input whose result was found wrong is presented to the CL again and
// the input that followed it is kept, not lost; a second swap restores the
// original order.  The shadow is an edge-triggered register here, where the
// architecture calls it a shadow latch; the swap scheme is this design's
// own way of re-computing without dropping the following input.
//
// Interface: load and swap are mutually exclusive (asserted below); with
// neither, both registers hold.  Each register carries a valid bit.
// Timing: one rising clk edge; rst_n is active-low synchronous.
module shadow_input_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         swap,
  input  logic [W-1:0] d,
  input  logic         d_valid,
  output logic [W-1:0] q,
  output logic         q_valid
);

  logic [W-1:0] sh_q;
  logic         sh_vld_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q        <= '0;
      q_valid  <= 1'b0;
      sh_q     <= '0;
      sh_vld_q <= 1'b0;
    end else if (swap) begin
      q        <= sh_q;
      q_valid  <= sh_vld_q;
      sh_q     <= q;
      sh_vld_q <= q_valid;
    end else if (load) begin
      q        <= d;
      q_valid  <= d_valid;
      sh_q     <= q;
      sh_vld_q <= q_valid;
    end
  end

  a_load_swap_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(load && swap))
    else $error("shadow_input_reg: load and swap asserted together");

endmodule
