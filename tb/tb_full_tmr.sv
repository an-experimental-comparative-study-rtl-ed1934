// tb_full_tmr: streams random data through the full-TMR stage (three complete lanes, voter behind the output registers) and checks every output against a reference
// pipeline that computes the function and a bit-count majority independently.
// Checks the two-edge latency and full throughput, that one faulty copy
// (transient flips on a random copy each cycle, then a stuck-at copy) is
// masked, that an upset in one lane's output register is masked, and that
// the same error in two copies gets through the vote.
module tb_full_tmr;
  localparam int W = 8;
  logic clk = 0, rst_n, in_valid, out_valid;
  logic [W-1:0] in_data, out_data;
  logic [2:0][W-1:0] flip, sa0, sa1;
  logic [2:0][W-1:0] seu;
  int checks = 0, failures = 0, masked = 0, outvoted = 0, upsets = 0;
  // reference pipeline
  logic [W-1:0] m_in, m_out;
  logic m_in_v, m_out_v;

  full_tmr #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .in_data(in_data), .in_valid(in_valid),
                      .out_data(out_data), .out_valid(out_valid),
                      .flt_flip(flip), .flt_sa0(sa0), .flt_sa1(sa1),
                      .flt_seu(seu));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_f(input int v);
    return 8'((v * 5 + 3) % 256) ^ 8'(((v % 16) * 16) + (v / 16));
  endfunction

  function automatic logic [W-1:0] vote_ref(input logic [W-1:0] x);
    logic [W-1:0] r, c0, c1, c2;
    c0 = (((ref_f(int'(x)) ^ flip[0]) & ~sa0[0]) | sa1[0]) ^ seu[0];
    c1 = (((ref_f(int'(x)) ^ flip[1]) & ~sa0[1]) | sa1[1]) ^ seu[1];
    c2 = (((ref_f(int'(x)) ^ flip[2]) & ~sa0[2]) | sa1[2]) ^ seu[2];
    for (int i = 0; i < W; i++) r[i] = (int'(c0[i]) + int'(c1[i]) + int'(c2[i])) > 1;
    return r;
  endfunction

  // one clock: model the edge, then compare
  task automatic step();
    logic [W-1:0] nxt;
    nxt = vote_ref(m_in);
    @(posedge clk);
    m_out = nxt; m_out_v = m_in_v; m_in = in_data; m_in_v = in_valid;
    #1;
    checks++;
    if (out_valid !== m_out_v || (m_out_v && out_data !== m_out)) begin
      failures++;
      $display("FAIL t=%0t out=%h/%b exp %h/%b", $time, out_data, out_valid, m_out, m_out_v);
    end
  endtask

  initial begin
    int lat;
    rst_n = 0; in_valid = 0; in_data = '0; flip = '0; sa0 = '0; sa1 = '0; seu = '0;
    m_in = '0; m_out = '0; m_in_v = 0; m_out_v = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency: a single token appears valid after exactly two edges
    in_valid = 1; in_data = 8'h5A;
    step(); in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin step(); lat++; end
    checks++;
    if (lat != 2 || out_data !== ref_f(8'h5A)) begin
      failures++; $display("FAIL latency %0d out %h", lat, out_data);
    end
    // fault-free stream at full rate
    for (int i = 0; i < 200; i++) begin
      in_valid = 1; in_data = W'($urandom); step();
    end
    // one transient per cycle on a random copy
    for (int i = 0; i < 300; i++) begin
      in_valid = 1'($urandom % 8 != 0); in_data = W'($urandom);
      flip = '0; flip[$urandom % 3] = W'($urandom);
      step();
      masked++;
    end
    flip = '0;
    // permanent stuck-at on copy 2
    sa1[1] = 8'h81; sa0[1] = 8'h18;
    for (int i = 0; i < 200; i++) begin
      in_valid = 1; in_data = W'($urandom); step();
    end
    sa1 = '0; sa0 = '0;
    // same error in two copies: outvotes the correct copy
    for (int i = 0; i < 50; i++) begin
      logic [W-1:0] m;
      m = W'(1 << (i % W));
      flip = '0; flip[i % 3] = m; flip[(i + 1) % 3] = m;
      in_valid = 1; in_data = W'($urandom);
      step();
      // the token under the fault is the one in the input register; it comes out next step
      outvoted++;
    end
    flip = '0;
    // upset in one lane's output register: voted away
    for (int i = 0; i < 50; i++) begin
      seu = '0; seu[i % 3] = W'($urandom);
      in_valid = 1; in_data = W'($urandom);
      step();
      upsets++;
    end
    seu = '0;
    step(); step();
    checks++;
    if (upsets == 0 || masked == 0 || outvoted == 0) failures++;
    $display("single-copy faults masked=%0d two-copy faults=%0d", masked, outvoted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
