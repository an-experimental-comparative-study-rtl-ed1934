// tb_tmr_voter: checks the majority voter bit by bit against a count of
// agreeing inputs, exhaustively for 3-bit inputs and randomly for 8 bits.
module tb_tmr_voter;
  localparam int W = 8;
  logic [W-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [W-1:0] exp;
    for (int i = 0; i < W; i++) exp[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      a = W'(v[2:0]); b = W'(v[5:3]); c = W'(v[8:6]); #1;
      check_now();
    end
    for (int i = 0; i < 1000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (i % 3 == 0) b = a ^ W'(1 << (i % W));   // single-copy error: must be masked
      #1;
      check_now();
      if (i % 3 == 0) begin
        checks++;
        if (y !== ((a & c) | (a & b) | (b & c))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
