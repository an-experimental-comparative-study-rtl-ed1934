// partial_tmr: pipeline stage protected by partial triple modular redundancy.
//
// Only the combinational logic is triplicated: one input register feeds three
// CL copies, a majority voter merges their results and one output register
// captures the voted value.  An error in one CL copy is masked; a fault on
// the shared input register or its fan-out reaches all three copies alike and
// is not masked (common-mode failure), and neither register is protected.
// The structure follows the partial-TMR architecture; the register widths,
// the valid bit and the reset are this design's choices.
//
// Interface: in_data/in_valid are captured on every rising clk edge;
// out_data/out_valid appear two edges after they were presented.  No
// back-pressure.  flt_flip/flt_sa0/flt_sa1 are per-copy fault-injection masks
// (see cl_example); flt_in_flip is XORed onto the shared net from the input
// register to the three copies, the place where one fault reaches every copy;
// flt_seu flips bits of the value the output register stores (a single-event
// upset in the register).  All are zero in normal use.  rst_n is an active-low synchronous reset.
module partial_tmr #(
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
  input  logic [W-1:0]      flt_in_flip,
  input  logic [W-1:0]      flt_seu
);

  logic [W-1:0]      in_q;
  logic              in_vld_q;
  logic [W-1:0]      cl_x;
  logic [2:0][W-1:0] cl_y;
  logic [W-1:0]      voted;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_q     <= '0;
      in_vld_q <= 1'b0;
      out_data <= '0;
      out_valid <= 1'b0;
    end else begin
      in_q      <= in_data;
      in_vld_q  <= in_valid;
      out_data  <= voted ^ flt_seu;
      out_valid <= in_vld_q;
    end
  end

  // shared fan-out to the three copies
  always_comb cl_x = in_q ^ flt_in_flip;

  for (genvar i = 0; i < 3; i++) begin : g_cl
    cl_example #(.W(W)) u_cl (
      .x       (cl_x),
      .flt_flip(flt_flip[i]),
      .flt_sa0 (flt_sa0[i]),
      .flt_sa1 (flt_sa1[i]),
      .y       (cl_y[i])
    );
  end

  tmr_voter #(.W(W)) u_voter (
    .a(cl_y[0]), .b(cl_y[1]), .c(cl_y[2]), .y(voted)
  );

endmodule
