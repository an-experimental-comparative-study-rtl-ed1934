// tb_cl_example: checks the stand-in CL function and its fault-injection
// masks against an independently written reference, for random inputs and
// for every 8-bit input value.
module tb_cl_example;
  localparam int W = 8;
  logic [W-1:0] x, flip, sa0, sa1, y;
  int checks = 0, failures = 0;

  cl_example #(.W(W)) dut (.x(x), .flt_flip(flip), .flt_sa0(sa0), .flt_sa1(sa1), .y(y));

  function automatic logic [7:0] ref_f(input int v);
    int lin;
    lin = (v * 5 + 3) % 256;
    return 8'(lin) ^ 8'(((v % 16) * 16) + (v / 16));
  endfunction

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x=%h flip=%h sa0=%h sa1=%h y=%h exp=%h", what, x, flip, sa0, sa1, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flip = '0; sa0 = '0; sa1 = '0;
    for (int v = 0; v < 256; v++) begin
      x = 8'(v); #1;
      check(ref_f(v), "fault-free");
    end
    for (int i = 0; i < 500; i++) begin
      x = 8'($urandom); flip = 8'($urandom); sa0 = 8'($urandom); sa1 = 8'($urandom) & ~sa0;
      #1;
      check(((ref_f(int'(x)) ^ flip) & ~sa0) | sa1, "faulty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
