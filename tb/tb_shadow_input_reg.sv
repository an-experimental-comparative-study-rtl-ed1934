// tb_shadow_input_reg: random load / swap / hold sequences against a
// two-entry reference model; also checks that a swap pair restores order.
module tb_shadow_input_reg;
  localparam int W = 8;
  logic clk = 0, rst_n, load, swap, dv, qv;
  logic [W-1:0] d, q;
  logic [W-1:0] m_q, m_sh;
  logic m_qv, m_shv;
  int checks = 0, failures = 0, swaps = 0;

  shadow_input_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .load(load), .swap(swap),
                                 .d(d), .d_valid(dv), .q(q), .q_valid(qv));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; swap = 0; d = '0; dv = 0;
    m_q = '0; m_sh = '0; m_qv = 0; m_shv = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int r;
      r = $urandom % 4;
      load = (r == 0 || r == 1); swap = (r == 2); d = W'($urandom); dv = 1'($urandom);
      @(posedge clk);
      if (swap) begin
        {m_q, m_sh} = {m_sh, m_q}; {m_qv, m_shv} = {m_shv, m_qv}; swaps++;
      end else if (load) begin
        m_sh = m_q; m_shv = m_qv; m_q = d; m_qv = dv;
      end
      #1;
      checks++;
      if (q !== m_q || qv !== m_qv) begin
        failures++;
        $display("FAIL cycle %0d: q=%h/%b exp %h/%b", i, q, qv, m_q, m_qv);
      end
    end
    checks++;
    if (swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
