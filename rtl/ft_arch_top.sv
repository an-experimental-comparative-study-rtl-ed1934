// ft_arch_top: the three fault-tolerant pipeline stages side by side.
//
// The improved hybrid stage (ihyft), the partial-TMR stage and the full-TMR
// stage each protect the same combinational function (cl_example).  They
// share the clock and reset and are otherwise independent: every stage has
// its own input, output and fault-injection ports (prefixes hy_, pt_, ft_),
// so they can be driven with the same stimulus and the same faults and their
// behaviour compared.
//
// Timing: see the individual stages; all are rising-edge, synchronous
// active-low reset.
module ft_arch_top
  import ft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // improved hybrid stage
  input  logic [W-1:0]      hy_in_data,
  input  logic              hy_in_valid,
  output logic              hy_in_ready,
  output logic [W-1:0]      hy_out_data,
  output logic              hy_out_valid,
  output logic              hy_fatal,
  output cfg_t              hy_cfg,
  output logic              hy_ev_rollback,
  output logic              hy_ev_reconfig,
  output logic              hy_ev_corrected,
  input  logic [2:0][W-1:0] hy_flt_flip,
  input  logic [2:0][W-1:0] hy_flt_sa0,
  input  logic [2:0][W-1:0] hy_flt_sa1,
  // partial TMR stage
  input  logic [W-1:0]      pt_in_data,
  input  logic              pt_in_valid,
  output logic [W-1:0]      pt_out_data,
  output logic              pt_out_valid,
  input  logic [2:0][W-1:0] pt_flt_flip,
  input  logic [2:0][W-1:0] pt_flt_sa0,
  input  logic [2:0][W-1:0] pt_flt_sa1,
  input  logic [W-1:0]      pt_flt_in_flip,
  input  logic [W-1:0]      pt_flt_seu,
  // full TMR stage
  input  logic [W-1:0]      ft_in_data,
  input  logic              ft_in_valid,
  output logic [W-1:0]      ft_out_data,
  output logic              ft_out_valid,
  input  logic [2:0][W-1:0] ft_flt_flip,
  input  logic [2:0][W-1:0] ft_flt_sa0,
  input  logic [2:0][W-1:0] ft_flt_sa1,
  input  logic [2:0][W-1:0] ft_flt_seu
);

  ihyft #(.W(W)) u_ihyft (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_data     (hy_in_data),
    .in_valid    (hy_in_valid),
    .in_ready    (hy_in_ready),
    .out_data    (hy_out_data),
    .out_valid   (hy_out_valid),
    .fatal       (hy_fatal),
    .cfg         (hy_cfg),
    .ev_rollback (hy_ev_rollback),
    .ev_reconfig (hy_ev_reconfig),
    .ev_corrected(hy_ev_corrected),
    .flt_flip    (hy_flt_flip),
    .flt_sa0     (hy_flt_sa0),
    .flt_sa1     (hy_flt_sa1)
  );

  partial_tmr #(.W(W)) u_partial_tmr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (pt_in_data),
    .in_valid (pt_in_valid),
    .out_data (pt_out_data),
    .out_valid(pt_out_valid),
    .flt_flip (pt_flt_flip),
    .flt_sa0  (pt_flt_sa0),
    .flt_sa1  (pt_flt_sa1),
    .flt_in_flip(pt_flt_in_flip),
    .flt_seu  (pt_flt_seu)
  );

  full_tmr #(.W(W)) u_full_tmr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (ft_in_data),
    .in_valid (ft_in_valid),
    .out_data (ft_out_data),
    .out_valid(ft_out_valid),
    .flt_flip (ft_flt_flip),
    .flt_sa0  (ft_flt_sa0),
    .flt_sa1  (ft_flt_sa1),
    .flt_seu  (ft_flt_seu)
  );

endmodule
