// tb_ft_arch_top: fault-injection campaigns on the three stages of the top
// level, run side by side with the same faults at the same instants.
//
// Every stage gets its own random input stream and its own scoreboard (an
// in-order queue of reference results computed independently of the RTL).
// Each injected fault is classified per stage by what happened before the
// next fault: "corrected" if the hybrid stage started a recovery, "fail-silent"
// if any result marked valid was wrong, otherwise "silent".
//   A. transient campaign: one single-bit, one-cycle flip on a random copy
//      every 400 cycles (250K faults/s at a 100 MHz clock);
//   B. permanent campaign: one random stuck-at bit on a random copy per run,
//      with a reset between runs;
//   C. fault accumulation: two copies permanently wrong in overlapping bits;
//   D. upsets in the output registers of the TMR stages: partial TMR has one
//      unprotected register, full TMR votes one register per lane.
// Expected in this cycle-level model: no fail-silent outcome for single
// faults in any stage; with two wrong copies the TMR stages give wrong
// results silently while the hybrid stage raises fatal and marks nothing
// valid.  One transient in ten hits the net that feeds all three copies of
// the partial-TMR stage instead (only that stage has such a net); these are
// the only single faults allowed to end fail-silent (common mode).  Every
// mechanism (rollback, correction, reconfiguration, fatal, recovery stall,
// TMR masking, TMR outvoting, silent standby faults, common-mode failure)
// must occur at least once.
module tb_ft_arch_top;
  import ft_pkg::*;
  localparam int W = 8;
  localparam int FAULT_PERIOD = 400;   // cycles between transient faults
  localparam int N_TRANSIENT  = 2000;
  localparam int N_PERMANENT  = 48;
  localparam int PERM_CYCLES  = 300;

  logic clk = 0, rst_n;
  logic [W-1:0] hy_in, hy_out, pt_in, pt_out, ft_in, ft_out;
  logic hy_iv, hy_rdy, hy_ov, hy_fatal, hy_rb, hy_rc, hy_ok, pt_iv, pt_ov, ft_iv, ft_ov;
  cfg_t hy_cfg;
  logic [2:0][W-1:0] flip, sa0, sa1;
  logic [W-1:0] pt_in_flip, pt_seu;
  logic [2:0][W-1:0] ft_seu;

  ft_arch_top dut (
    .clk(clk), .rst_n(rst_n),
    .hy_in_data(hy_in), .hy_in_valid(hy_iv), .hy_in_ready(hy_rdy), .hy_out_data(hy_out),
    .hy_out_valid(hy_ov), .hy_fatal(hy_fatal), .hy_cfg(hy_cfg), .hy_ev_rollback(hy_rb),
    .hy_ev_reconfig(hy_rc), .hy_ev_corrected(hy_ok),
    .hy_flt_flip(flip), .hy_flt_sa0(sa0), .hy_flt_sa1(sa1),
    .pt_in_data(pt_in), .pt_in_valid(pt_iv), .pt_out_data(pt_out), .pt_out_valid(pt_ov),
    .pt_flt_flip(flip), .pt_flt_sa0(sa0), .pt_flt_sa1(sa1), .pt_flt_in_flip(pt_in_flip),
    .pt_flt_seu(pt_seu),
    .ft_in_data(ft_in), .ft_in_valid(ft_iv), .ft_out_data(ft_out), .ft_out_valid(ft_ov),
    .ft_flt_flip(flip), .ft_flt_sa0(sa0), .ft_flt_sa1(sa1),
    .ft_flt_seu(ft_seu));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // per-fault flags and campaign tallies: [0]=hybrid [1]=partial TMR [2]=full TMR
  bit   wrong[3];
  bit   recovered;
  int   n_silent[3], n_corr[3], n_fs[3];
  // mechanism counters
  int   m_rollback = 0, m_corrected = 0, m_reconfig = 0, m_fatal = 0, m_stall = 0;
  int   m_tmr_masked = 0, m_tmr_outvoted = 0, m_standby = 0, n_out[3];
  int   m_common = 0, n_input_faults = 0, m_seu_through = 0, m_seu_masked = 0;
  localparam int N_SEU = 200;
  bit   at_input;
  logic [W-1:0] q_hy[$], q_pt[$], q_ft[$];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_f(input int v);
    return 8'((v * 5 + 3) % 256) ^ 8'(((v % 16) * 16) + (v / 16));
  endfunction

  always @(posedge clk) if (rst_n) begin
    m_rollback  += int'(hy_rb);
    m_corrected += int'(hy_ok);
    m_reconfig  += int'(hy_rc);
    m_stall     += int'(!hy_rdy);
    if (hy_rb) recovered = 1;
  end

  task automatic score(input int s, input logic v, input logic [W-1:0] d, ref logic [W-1:0] q[$]);
    logic [W-1:0] e;
    if (!v) return;
    n_out[s]++;
    if (q.size() == 0) begin
      wrong[s] = 1;
      return;
    end
    e = q.pop_front();
    if (e !== d) wrong[s] = 1;
  endtask

  // one cycle: check outputs at the falling edge, then drive new inputs
  task automatic step();
    @(negedge clk);
    score(0, hy_ov, hy_out, q_hy);
    score(1, pt_ov, pt_out, q_pt);
    score(2, ft_ov, ft_out, q_ft);
    hy_iv = 1'($urandom % 8 != 0); hy_in = W'($urandom);
    if (hy_iv && hy_rdy) q_hy.push_back(ref_f(int'(hy_in)));
    pt_iv = 1; pt_in = W'($urandom); q_pt.push_back(ref_f(int'(pt_in)));
    ft_iv = 1; ft_in = W'($urandom); q_ft.push_back(ref_f(int'(ft_in)));
  endtask

  task automatic do_reset();
    rst_n = 0; hy_iv = 0; pt_iv = 0; ft_iv = 0; hy_in = '0; pt_in = '0; ft_in = '0;
    flip = '0; sa0 = '0; sa1 = '0; pt_in_flip = '0; pt_seu = '0; ft_seu = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    q_hy.delete(); q_pt.delete(); q_ft.delete();
  endtask

  task automatic open_fault();
    wrong = '{0, 0, 0}; recovered = 0; at_input = 0;
  endtask

  task automatic close_fault();
    if (at_input && wrong[1]) m_common++;
    n_fs[0] += int'(wrong[0]);
    n_corr[0] += int'(recovered && !wrong[0]);
    n_silent[0] += int'(!recovered && !wrong[0]);
    for (int s = 1; s < 3; s++) begin
      n_fs[s] += int'(wrong[s]);
      n_silent[s] += int'(!wrong[s]);
    end
  endtask

  function automatic real pct(input int n, input int tot);
    return (tot == 0) ? 0.0 : 100.0 * real'(n) / real'(tot);
  endfunction

  task automatic report(input string name, input int tot);
    string arch[3] = '{"iHyFT", "Partial-TMR", "Full-TMR"};
    $display("%s campaign, %0d faults:", name, tot);
    for (int s = 0; s < 3; s++)
      $display("  %-12s silent %6.2f%%  corrected %6.2f%%  fail-silent %6.2f%%", arch[s],
               pct(n_silent[s], tot), pct(n_corr[s], tot), pct(n_fs[s], tot));
  endtask

  task automatic clear_tally();
    n_silent = '{0, 0, 0}; n_corr = '{0, 0, 0}; n_fs = '{0, 0, 0};
  endtask

  initial begin
    int copy, cyc0, stall0, rb0;
    n_out = '{0, 0, 0};
    do_reset();

    // ---------------- A. transient faults ----------------
    clear_tally();
    for (int f = 0; f < N_TRANSIENT; f++) begin
      int at;
      open_fault();
      at = $urandom % (FAULT_PERIOD - 20);
      for (int c = 0; c < FAULT_PERIOD; c++) begin
        step();
        flip = '0;
        pt_in_flip = '0;
        if (c == at && $urandom % 10 == 0) begin
          // shared input net of the partial-TMR copies; the other stages have
          // no net feeding several copies, so they get no fault this time
          at_input = 1;
          n_input_faults++;
          pt_in_flip = W'(1 << ($urandom % W));
        end else if (c == at) begin
          copy = $urandom % 3;
          flip[copy] = W'(1 << ($urandom % W));
          // the hybrid stage's standby copy is the one outside the running pair
          if ((hy_cfg == CFG_12 && copy == 2) || (hy_cfg == CFG_13 && copy == 1) ||
              (hy_cfg == CFG_23 && copy == 0)) m_standby++;
          else if (!wrong[1]) m_tmr_masked++;
        end
      end
      close_fault();
    end
    flip = '0;
    pt_in_flip = '0;
    report("transient", N_TRANSIENT);
    $display("  of which %0d on the shared partial-TMR input net, %0d of them fail-silent (common mode)",
             n_input_faults, m_common);
    for (int s = 0; s < 3; s++) begin
      checks++;
      // fail-silent outcomes are expected only from the common-mode location
      if (n_fs[s] != ((s == 1) ? m_common : 0)) begin
        failures++; $display("FAIL stage %0d: fail-silent transient from a single-copy fault", s);
      end
    end
    checks++;
    if (m_stall != 2 * (m_rollback + m_reconfig)) begin
      failures++; $display("FAIL recovery cost %0d stall cycles, %0d rollbacks %0d reconfigs",
                           m_stall, m_rollback, m_reconfig);
    end

    // ---------------- B. permanent faults ----------------
    clear_tally();
    for (int f = 0; f < N_PERMANENT; f++) begin
      do_reset();
      open_fault();
      copy = f % 3;
      if ($urandom % 2) sa1[copy] = W'(1 << ($urandom % W));
      else              sa0[copy] = W'(1 << ($urandom % W));
      for (int c = 0; c < PERM_CYCLES; c++) step();
      if (hy_fatal) m_fatal++;
      close_fault();
    end
    report("permanent", N_PERMANENT);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (n_fs[s] != 0) begin failures++; $display("FAIL stage %0d: fail-silent permanent", s); end
    end
    checks++;
    if (m_fatal != 0) begin failures++; $display("FAIL single permanent fault gave fatal"); end

    // ---------------- C. fault accumulation ----------------
    do_reset();
    open_fault();
    flip[0] = 8'h03;   // CL1 wrong in bits 0,1
    flip[1] = 8'h06;   // CL2 wrong in bits 1,2: bit 1 wrong in two copies
    cyc0 = n_out[0];
    for (int c = 0; c < PERM_CYCLES; c++) step();
    m_tmr_outvoted = int'(wrong[1]) + int'(wrong[2]);
    checks += 3;
    if (!hy_fatal) begin failures++; $display("FAIL accumulated faults: fatal not raised"); end
    else m_fatal++;
    if (wrong[0]) begin failures++; $display("FAIL accumulated faults: wrong hybrid result marked valid"); end
    if (!wrong[1] || !wrong[2]) begin failures++; $display("FAIL accumulated faults: TMR should be outvoted"); end
    $display("accumulation: hybrid fatal=%b, valid hybrid results %0d, TMR stages outvoted %0d of 2",
             hy_fatal, n_out[0] - cyc0, m_tmr_outvoted);
    flip = '0;

    // ---------------- D. register upsets (TMR stages) ----------------
    // one-cycle upsets in the output register(s): partial TMR has a single
    // register, full TMR one per lane
    do_reset();
    for (int f = 0; f < N_SEU; f++) begin
      open_fault();
      for (int c = 0; c < 50; c++) begin
        step();
        pt_seu = '0; ft_seu = '0;
        if (c == 10) begin
          pt_seu = W'(1 << ($urandom % W));
          ft_seu[$urandom % 3] = W'(1 << ($urandom % W));
        end
      end
      m_seu_through += int'(wrong[1]);
      m_seu_masked  += int'(!wrong[2]);
    end
    $display("register upsets, %0d faults: partial TMR fail-silent %0d, full TMR masked %0d",
             N_SEU, m_seu_through, m_seu_masked);
    checks += 2;
    if (m_seu_through != N_SEU) begin failures++; $display("FAIL partial TMR masked a register upset"); end
    if (m_seu_masked != N_SEU)  begin failures++; $display("FAIL full TMR let a register upset through"); end

    // ---------------- mechanisms ----------------
    $display("mechanisms: rollback %0d corrected %0d reconfiguration %0d fatal %0d stall-cycles %0d",
             m_rollback, m_corrected, m_reconfig, m_fatal, m_stall);
    $display("            TMR-masked %0d TMR-outvoted %0d standby-silent %0d common-mode %0d",
             m_tmr_masked, m_tmr_outvoted, m_standby, m_common);
    checks += 9;
    if (m_common == 0)       begin failures++; $display("FAIL no common-mode failure"); end
    if (m_rollback == 0)     begin failures++; $display("FAIL no rollback"); end
    if (m_corrected == 0)    begin failures++; $display("FAIL no correction"); end
    if (m_reconfig == 0)     begin failures++; $display("FAIL no reconfiguration"); end
    if (m_fatal == 0)        begin failures++; $display("FAIL no fatal"); end
    if (m_stall == 0)        begin failures++; $display("FAIL no recovery stall"); end
    if (m_tmr_masked == 0)   begin failures++; $display("FAIL no TMR masking"); end
    if (m_tmr_outvoted == 0) begin failures++; $display("FAIL no TMR outvoting"); end
    if (m_standby == 0)      begin failures++; $display("FAIL no standby fault"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
