// full_tmr: pipeline stage protected by full triple modular redundancy.
//
// The whole stage is triplicated: three input registers, three CL copies and
// three output registers, each copy a complete independent lane, with a
// majority voter after the output registers.  An error in any one lane, in
// its CL or its registers, is masked, and no fault is shared by the three
// lanes.  The structure follows the full-TMR architecture; the valid bit
// (itself triplicated and voted) and the reset are this design's choices.
//
// Interface: in_data/in_valid are captured on every rising clk edge;
// out_data/out_valid (voted, combinational from the output registers) appear
// two edges after they were presented.  No back-pressure.  flt_flip, flt_sa0
// and flt_sa1 are per-copy fault-injection masks on the CL outputs (see
// cl_example); flt_seu flips bits of the value a lane's output register
// stores (a single-event upset).  All are zero in normal use.  rst_n is an active-low synchronous reset.
module full_tmr #(
  parameter int unsigned W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     in_data,
  input  logic             in_valid,
  output logic [W-1:0]     out_data,
  output logic             out_valid,
  input  logic [2:0][W-1:0] flt_flip,
  input  logic [2:0][W-1:0] flt_sa0,
  input  logic [2:0][W-1:0] flt_sa1,
  input  logic [2:0][W-1:0] flt_seu
);

  logic [2:0][W-1:0] in_q;
  logic [2:0]        in_vld_q;
  logic [2:0][W-1:0] cl_y;
  logic [2:0][W-1:0] out_q;
  logic [2:0]        out_vld_q;

  for (genvar i = 0; i < 3; i++) begin : g_lane
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        in_q[i]      <= '0;
        in_vld_q[i]  <= 1'b0;
        out_q[i]     <= '0;
        out_vld_q[i] <= 1'b0;
      end else begin
        in_q[i]      <= in_data;
        in_vld_q[i]  <= in_valid;
        out_q[i]     <= cl_y[i] ^ flt_seu[i];
        out_vld_q[i] <= in_vld_q[i];
      end
    end

    cl_example #(.W(W)) u_cl (
      .x       (in_q[i]),
      .flt_flip(flt_flip[i]),
      .flt_sa0 (flt_sa0[i]),
      .flt_sa1 (flt_sa1[i]),
      .y       (cl_y[i])
    );
  end

  tmr_voter #(.W(W)) u_voter (
    .a(out_q[0]), .b(out_q[1]), .c(out_q[2]), .y(out_data)
  );

  tmr_voter #(.W(1)) u_voter_vld (
    .a(out_vld_q[0]), .b(out_vld_q[1]), .c(out_vld_q[2]), .y(out_valid)
  );

endmodule
