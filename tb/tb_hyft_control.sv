// tb_hyft_control: drives the comparator result directly and checks, cycle
// by cycle, the control outputs through: error-free flow, a corrected
// transient (exactly two stall cycles), a persistent error that walks through
// all three configurations and ends in the fatal flag, fail-safe operation
// afterwards, and an error cured by one reconfiguration.
module tb_hyft_control;
  import ft_pkg::*;
  logic clk = 0, rst_n, error, in_q_valid;
  logic dc, load, swap, in_ready, cap_valid, fatal, ev_rb, ev_rc, ev_ok;
  cfg_t cfg;
  int checks = 0, failures = 0;

  hyft_control dut (.clk(clk), .rst_n(rst_n), .error(error), .in_q_valid(in_q_valid),
                    .dc(dc), .load(load), .swap(swap), .in_ready(in_ready), .cap_valid(cap_valid),
                    .cfg(cfg), .fatal(fatal), .ev_rollback(ev_rb), .ev_reconfig(ev_rc),
                    .ev_corrected(ev_ok));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle: apply error, check outputs {dc,load,swap,in_ready,cap_valid,rb,rc,ok},
  // cfg and fatal just before the rising edge, then clock.
  task automatic cyc(input logic err, input logic [7:0] exp, input cfg_t exp_cfg,
                     input logic exp_fatal, input string what);
    error = err;
    #4;
    checks++;
    if ({dc, load, swap, in_ready, cap_valid, ev_rb, ev_rc, ev_ok} !== exp ||
        cfg !== exp_cfg || fatal !== exp_fatal) begin
      failures++;
      $display("FAIL %s: got %b cfg=%0d fatal=%b, exp %b cfg=%0d fatal=%b", what,
               {dc, load, swap, in_ready, cap_valid, ev_rb, ev_rc, ev_ok}, cfg, fatal,
               exp, exp_cfg, exp_fatal);
    end
    @(posedge clk); #1;
  endtask

  //                            dc ld sw rdy cap rb rc ok
  localparam logic [7:0] RUN_OK  = 8'b1_1_0_1_1_0_0_0;
  localparam logic [7:0] RUN_ERR = 8'b1_1_0_1_0_1_0_0;
  localparam logic [7:0] RUN_FS  = 8'b1_1_0_1_0_0_0_0;  // fail-safe: no recovery
  localparam logic [7:0] RB      = 8'b0_0_1_0_0_0_0_0;
  localparam logic [7:0] RC_OK   = 8'b1_0_1_0_1_0_0_1;
  localparam logic [7:0] RC_ERR  = 8'b1_0_1_0_0_0_1_0;
  localparam logic [7:0] RC_FAT  = 8'b1_0_1_0_0_0_0_0;

  initial begin
    int stall;
    rst_n = 0; error = 0; in_q_valid = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // error-free flow
    repeat (5) cyc(0, RUN_OK, CFG_12, 0, "flow");
    // empty slot: no comparison, nothing captured
    in_q_valid = 0;
    cyc(0, 8'b0_1_0_1_0_0_0_0, CFG_12, 0, "bubble");
    in_q_valid = 1;
    // transient: one mismatch
    cyc(1, RUN_ERR, CFG_12, 0, "transient detect");
    cyc(0, RB,      CFG_12, 0, "rollback");
    cyc(0, RC_OK,   CFG_12, 0, "recompute ok");
    cyc(0, RUN_OK,  CFG_12, 0, "resume");
    // count the stall: exactly two cycles with in_ready low
    stall = 0;
    cyc(1, RUN_ERR, CFG_12, 0, "transient 2");
    for (int i = 0; i < 6; i++) begin
      #4; if (!in_ready) stall++; error = 0; @(posedge clk); #1;
    end
    checks++;
    if (stall != 2) begin failures++; $display("FAIL recovery stall %0d cycles, exp 2", stall); end
    // persistent error in every configuration
    cyc(1, RUN_ERR, CFG_12, 0, "perm detect");
    cyc(1, RB,      CFG_12, 0, "perm rb1");
    cyc(1, RC_ERR,  CFG_12, 0, "perm rc1");
    cyc(1, RB,      CFG_13, 0, "perm rb2");
    cyc(1, RC_ERR,  CFG_13, 0, "perm rc2");
    cyc(1, RB,      CFG_23, 0, "perm rb3");
    cyc(1, RC_FAT,  CFG_23, 0, "perm rc3");
    cyc(1, RUN_FS,  CFG_23, 1, "fail-safe mismatch");
    cyc(0, RUN_OK,  CFG_23, 1, "fail-safe ok");
    // after reset: an error cured by the first reconfiguration
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    cyc(1, RUN_ERR, CFG_12, 0, "perm2 detect");
    cyc(0, RB,      CFG_12, 0, "perm2 rb1");
    cyc(1, RC_ERR,  CFG_12, 0, "perm2 rc1");
    cyc(0, RB,      CFG_13, 0, "perm2 rb2");
    cyc(0, RC_OK,   CFG_13, 0, "perm2 rc2");
    cyc(0, RUN_OK,  CFG_13, 0, "perm2 resume");
    // retry budget restarts for the next error
    cyc(1, RUN_ERR, CFG_13, 0, "next detect");
    cyc(0, RB,      CFG_13, 0, "next rb");
    cyc(1, RC_ERR,  CFG_13, 0, "next rc1");
    cyc(0, RB,      CFG_23, 0, "next rb2");
    cyc(1, RC_ERR,  CFG_23, 0, "next rc2");
    cyc(0, RB,      CFG_12, 0, "next rb3");
    cyc(0, RC_OK,   CFG_12, 0, "next rc3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
