// ft_pkg: types and helpers shared by the fault-tolerant pipeline stages.
//
// cfg_t names which two of the three combinational-logic (CL) copies of the
// hybrid architecture are running; the third copy is the standby spare.
// The first copy named in a configuration feeds the output register (path A),
// the second one only feeds the comparator (path B).  The order in which
// configurations are tried after a persistent error (12 -> 13 -> 23 -> 12)
// is a choice of this design: it visits every pair within two steps, so a
// single faulty copy is always left out after at most two reconfigurations.
//
// ctrl_state_t is the recovery state machine of the hybrid control logic:
// RUN (normal flow), ROLLBACK (input register restored from its shadow,
// comparison disabled) and RECOMP (the rolled-back input is computed again
// and compared).
package ft_pkg;

  typedef enum logic [1:0] {
    CFG_12 = 2'd0,   // CL1 -> output register, CL2 -> comparator, CL3 standby
    CFG_13 = 2'd1,   // CL1 -> output register, CL3 -> comparator, CL2 standby
    CFG_23 = 2'd2    // CL2 -> output register, CL3 -> comparator, CL1 standby
  } cfg_t;

  typedef enum logic [1:0] {
    ST_RUN      = 2'd0,
    ST_ROLLBACK = 2'd1,
    ST_RECOMP   = 2'd2
  } ctrl_state_t;

  function automatic cfg_t next_cfg(input cfg_t c);
    unique case (c)
      CFG_12:  return CFG_13;
      CFG_13:  return CFG_23;
      default: return CFG_12;
    endcase
  endfunction

  // Copy (0..2) driving path A / path B in a configuration.
  function automatic logic [1:0] copy_a(input cfg_t c);
    return (c == CFG_23) ? 2'd1 : 2'd0;
  endfunction

  function automatic logic [1:0] copy_b(input cfg_t c);
    return (c == CFG_12) ? 2'd1 : 2'd2;
  endfunction

endpackage
