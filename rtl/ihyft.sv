// ihyft: improved hybrid fault-tolerant (iHyFT) pipeline stage.
//
// A pipeline stage (input register -> combinational logic -> output
// register) protected by a mix of three kinds of redundancy:
//   * information redundancy: two copies of the CL compute every result and
//     a comparator checks them (error detection);
//   * time redundancy: on a mismatch the input register is rolled back from
//     its shadow copy and the result is computed again (transient errors);
//   * hardware redundancy: a third CL copy stands by and is switched in by
//     the reconfiguration demultiplexer/multiplexer when an error persists
//     (permanent errors).
// Only two copies switch at any time, which is where the scheme saves power
// against triple modular redundancy.  In the improved version the
// comparator takes both running results directly from the output
// multiplexer, in front of the output register, and compares them at the
// capture edge, so whatever the output register captures has been checked.
//
// Structure: shadow_input_reg -> cl_demux -> 3 x cl_example -> cl_mux ->
// (output register, window_comparator) with hyft_control driving them.
//
// Interface: upstream valid/ready (in_data is taken on a rising edge with
// in_valid && in_ready); downstream out_data/out_valid without back-pressure.
// A result is valid two edges after its input was taken when no error
// occurs; a corrected transient error costs two extra cycles (in_ready low
// for two cycles), each reconfiguration two more.  fatal is a sticky flag for
// an error that no configuration removed; cfg, ev_* report the recovery
// activity.  flt_* are per-copy fault-injection masks (see cl_example), zero
// in normal use.  rst_n is an active-low synchronous reset.
module ihyft
  import ft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [W-1:0]      out_data,
  output logic              out_valid,
  output logic              fatal,
  output cfg_t              cfg,
  output logic              ev_rollback,
  output logic              ev_reconfig,
  output logic              ev_corrected,
  input  logic [2:0][W-1:0] flt_flip,
  input  logic [2:0][W-1:0] flt_sa0,
  input  logic [2:0][W-1:0] flt_sa1
);

  logic              load, swap, dc, error, cap_valid;
  logic [W-1:0]      x_q;
  logic              x_vld;
  logic [2:0][W-1:0] x_copy, y_copy;
  logic [W-1:0]      y_a, y_b;

  shadow_input_reg #(.W(W)) u_in_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .swap   (swap),
    .d      (in_data),
    .d_valid(in_valid),
    .q      (x_q),
    .q_valid(x_vld)
  );

  cl_demux #(.W(W)) u_demux (.cfg(cfg), .x(x_q), .x_copy(x_copy));

  for (genvar i = 0; i < 3; i++) begin : g_cl
    cl_example #(.W(W)) u_cl (
      .x       (x_copy[i]),
      .flt_flip(flt_flip[i]),
      .flt_sa0 (flt_sa0[i]),
      .flt_sa1 (flt_sa1[i]),
      .y       (y_copy[i])
    );
  end

  cl_mux #(.W(W)) u_mux (.cfg(cfg), .y_copy(y_copy), .y_a(y_a), .y_b(y_b));

  window_comparator #(.W(W)) u_cmp (.a(y_a), .b(y_b), .dc(dc), .error(error));

  hyft_control u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .error       (error),
    .in_q_valid  (x_vld),
    .dc          (dc),
    .load        (load),
    .swap        (swap),
    .in_ready    (in_ready),
    .cap_valid   (cap_valid),
    .cfg         (cfg),
    .fatal       (fatal),
    .ev_rollback (ev_rollback),
    .ev_reconfig (ev_reconfig),
    .ev_corrected(ev_corrected)
  );

  // Output register: captures the path-A result every cycle; the valid bit
  // marks only results the comparator accepted.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_data  <= y_a;
      out_valid <= cap_valid;
    end
  end

endmodule
