// tb_ihyft: end-to-end checks of the improved hybrid stage with a scoreboard
// of accepted inputs and an independent reference of the CL function.
//   1. latency (two edges) and full throughput without faults;
//   2. random one-cycle transients on random copies: every result still
//      correct and in order, each corrected error costs exactly two stall
//      cycles, faults on the standby copy stay silent;
//   3. a stuck-at fault on CL2, then on CL1: the stage reconfigures to the
//      pair that excludes the faulty copy and keeps producing correct data;
//   4. different stuck-at faults on two copies: no configuration cures it,
//      fatal rises, and no wrong result is ever marked valid.
// Inputs are driven and outputs checked on the falling edge.
module tb_ihyft;
  import ft_pkg::*;
  localparam int W = 8;
  logic clk = 0, rst_n, in_valid, in_ready, out_valid, fatal, ev_rb, ev_rc, ev_ok;
  logic [W-1:0] in_data, out_data;
  logic [2:0][W-1:0] flip, sa0, sa1;
  cfg_t cfg;
  int checks = 0, failures = 0;
  int n_out = 0, n_rb = 0, n_rc = 0, n_ok = 0, n_stall = 0;
  logic [W-1:0] expq[$];
  bit allow_drop = 0;

  ihyft #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .in_data(in_data), .in_valid(in_valid),
                      .in_ready(in_ready), .out_data(out_data), .out_valid(out_valid),
                      .fatal(fatal), .cfg(cfg), .ev_rollback(ev_rb), .ev_reconfig(ev_rc),
                      .ev_corrected(ev_ok), .flt_flip(flip), .flt_sa0(sa0), .flt_sa1(sa1));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_f(input int v);
    return 8'((v * 5 + 3) % 256) ^ 8'(((v % 16) * 16) + (v / 16));
  endfunction

  // events are sampled at the rising edge they take effect on
  always @(posedge clk) if (rst_n) begin
    n_rb += int'(ev_rb); n_rc += int'(ev_rc); n_ok += int'(ev_ok);
    n_stall += int'(!in_ready);
  end

  // Falling edge: check the output register, then present the next input.
  task automatic step(input bit v, input logic [W-1:0] d);
    @(negedge clk);
    if (out_valid) begin
      logic [W-1:0] e;
      checks++;
      n_out++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL t=%0t unexpected output %h", $time, out_data);
      end else begin
        e = expq.pop_front();
        while (allow_drop && e !== out_data && expq.size() > 0) e = expq.pop_front();
        if (e !== out_data) begin
          failures++; $display("FAIL t=%0t out=%h exp=%h", $time, out_data, e);
        end
      end
    end
    in_valid = v; in_data = d;
    if (v && in_ready) expq.push_back(ref_f(int'(d)));
  endtask

  task automatic do_reset();
    rst_n = 0; in_valid = 0; flip = '0; sa0 = '0; sa1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expq.delete();
    n_rb = 0; n_rc = 0; n_ok = 0; n_stall = 0; n_out = 0;
  endtask

  task automatic drain();
    for (int i = 0; i < 12; i++) step(0, '0);
    checks++;
    if (expq.size() != 0 && !allow_drop) begin
      failures++; $display("FAIL %0d results never appeared", expq.size());
    end
  endtask

  initial begin
    int lat;
    do_reset();
    // 1. latency and throughput
    step(1, 8'h3C);
    lat = 0;
    while (!out_valid && lat < 10) begin step(0, '0); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL latency: valid %0d edges after issue", lat); end
    drain();
    n_out = 0;
    for (int i = 0; i < 100; i++) step(1, W'($urandom));
    drain();
    checks++;
    if (n_out != 100 || n_stall != 0) begin
      failures++; $display("FAIL throughput: %0d outputs, %0d stalls", n_out, n_stall);
    end

    // 2. transients
    do_reset();
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      step(1'($urandom % 4 != 0), d);
      flip = '0;
      if ($urandom % 10 == 0) flip[$urandom % 3] = W'(1 << ($urandom % W));
    end
    flip = '0;
    drain();
    checks += 3;
    if (n_ok == 0 || n_rb != n_ok) begin
      failures++; $display("FAIL transients: %0d rollbacks %0d corrected", n_rb, n_ok);
    end
    if (n_stall != 2 * n_rb + 2 * n_rc) begin
      failures++; $display("FAIL recovery cost: %0d stall cycles for %0d rollbacks", n_stall, n_rb);
    end
    if (fatal) begin failures++; $display("FAIL fatal after transients"); end
    $display("transients: %0d corrected, %0d reconfigurations, %0d stall cycles", n_ok, n_rc, n_stall);

    // 3a. permanent fault on CL2
    do_reset();
    sa1[1] = 8'h10;
    for (int i = 0; i < 300; i++) step(1, W'($urandom));
    drain();
    checks++;
    if (cfg !== CFG_13 || n_rc != 1 || fatal) begin
      failures++; $display("FAIL CL2 stuck: cfg=%0d reconfigs=%0d fatal=%b", cfg, n_rc, fatal);
    end
    // 3b. permanent fault on CL1
    do_reset();
    sa0[0] = 8'h04;
    for (int i = 0; i < 300; i++) step(1, W'($urandom));
    drain();
    checks++;
    if (cfg !== CFG_23 || n_rc != 2 || fatal) begin
      failures++; $display("FAIL CL1 stuck: cfg=%0d reconfigs=%0d fatal=%b", cfg, n_rc, fatal);
    end

    // 4. two faulty copies: detected, flagged, never a wrong valid result
    do_reset();
    allow_drop = 1;
    sa1[0] = 8'h01; sa1[1] = 8'h02;
    for (int i = 0; i < 300; i++) step(1, W'($urandom));
    drain();
    checks++;
    if (!fatal) begin failures++; $display("FAIL two faulty copies not flagged"); end
    allow_drop = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
