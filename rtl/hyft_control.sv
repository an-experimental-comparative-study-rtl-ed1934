// hyft_control: control logic of the hybrid fault-tolerant stage.
//
// Two parts, as in the architecture.  The configuration part (cfg) decides
// which two of the three CL copies run.  The sequencing part drives the
// comparison window (dc), the input register (load / swap for rollback), the
// output register's valid bit and the upstream handshake.
//
// Recovery, on a mismatch between the two running copies:
//   RUN      --error--> ROLLBACK : the wrong result is not marked valid; the
//                                  input register swaps with its shadow so
//                                  the failing input is presented again.
//   ROLLBACK ---------> RECOMP   : comparison off (the output register holds
//                                  the result of the following input, which
//                                  is discarded); swap again.
//   RECOMP   --ok-----> RUN      : transient error corrected, two cycles lost.
//   RECOMP   --error--> ROLLBACK : error persisted, taken as permanent: the
//                                  next configuration brings the standby copy
//                                  in, and the input is re-computed again.
// If the error persists in every configuration (two copies faulty, or a
// fault outside the copies) the sticky fatal flag is raised, the input is
// dropped (never marked valid) and the stage keeps running fail-safe: from
// then on a mismatch still blocks out_valid but starts no recovery.
// Rollback for a first error, reconfiguration for a repeated one and the
// two-cycle recovery follow the architecture; the retry limit, the order of
// configurations and the fatal behaviour are this design's choices.
//
// Interface: error is the comparator output sampled at the rising edge;
// in_q_valid is the valid bit of the input register.  cap_valid is the next
// value of the output register's valid bit.  ev_* are one-cycle event pulses
// (rollback started, reconfiguration, error corrected) for monitoring.
// rst_n is active-low synchronous; reset selects configuration CL1+CL2.
module hyft_control
  import ft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  error,
  input  logic  in_q_valid,
  output logic  dc,
  output logic  load,
  output logic  swap,
  output logic  in_ready,
  output logic  cap_valid,
  output cfg_t  cfg,
  output logic  fatal,
  output logic  ev_rollback,
  output logic  ev_reconfig,
  output logic  ev_corrected
);

  // Number of configurations of three copies taken two at a time.
  localparam int unsigned NUM_CFG = 3;

  ctrl_state_t state_q, state_d;
  cfg_t        cfg_d;
  logic [1:0]  tries_q, tries_d;
  logic        fatal_d;

  always_comb begin
    state_d      = state_q;
    cfg_d        = cfg;
    tries_d      = tries_q;
    fatal_d      = fatal;
    dc           = 1'b0;
    load         = 1'b0;
    swap         = 1'b0;
    in_ready     = 1'b0;
    cap_valid    = 1'b0;
    ev_rollback  = 1'b0;
    ev_reconfig  = 1'b0;
    ev_corrected = 1'b0;
    unique case (state_q)
      ST_RUN: begin
        dc        = in_q_valid;
        load      = 1'b1;
        in_ready  = 1'b1;
        cap_valid = in_q_valid && !error;
        if (error && !fatal) begin
          state_d     = ST_ROLLBACK;
          ev_rollback = 1'b1;
        end
      end
      ST_ROLLBACK: begin
        swap    = 1'b1;
        state_d = ST_RECOMP;
      end
      ST_RECOMP: begin
        dc        = in_q_valid;
        swap      = 1'b1;
        cap_valid = in_q_valid && !error;
        if (!error) begin
          state_d      = ST_RUN;
          tries_d      = '0;
          ev_corrected = 1'b1;
        end else if (tries_q < 2'(NUM_CFG - 1)) begin
          state_d     = ST_ROLLBACK;
          cfg_d       = next_cfg(cfg);
          tries_d     = tries_q + 2'd1;
          ev_reconfig = 1'b1;
        end else begin
          state_d = ST_RUN;
          tries_d = '0;
          fatal_d = 1'b1;
        end
      end
      default: state_d = ST_RUN;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_RUN;
      cfg     <= CFG_12;
      tries_q <= '0;
      fatal   <= 1'b0;
    end else begin
      state_q <= state_d;
      cfg     <= cfg_d;
      tries_q <= tries_d;
      fatal   <= fatal_d;
    end
  end

  // A recovery always re-computes valid data.
  a_recomp_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state_q == ST_RECOMP) |-> in_q_valid)
    else $error("hyft_control: re-computation of an empty slot");

endmodule
