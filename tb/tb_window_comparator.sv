// tb_window_comparator: error must follow a mismatch only while the window
// (dc) is open, including single-bit differences in every position.
module tb_window_comparator;
  localparam int W = 8;
  logic [W-1:0] a, b;
  logic dc, err;
  int checks = 0, failures = 0;

  window_comparator #(.W(W)) dut (.a(a), .b(b), .dc(dc), .error(err));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp);
    checks++;
    if (err !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h dc=%b err=%b exp=%b", a, b, dc, err, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin
      a = W'($urandom); b = a ^ W'(1 << i);
      dc = 1; #1; check(1);
      dc = 0; #1; check(0);
      b = a;
      dc = 1; #1; check(0);
    end
    for (int i = 0; i < 500; i++) begin
      a = W'($urandom); b = ($urandom % 2) ? a : W'($urandom); dc = 1'($urandom);
      #1;
      check(dc && (a != b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
