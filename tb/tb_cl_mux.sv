// tb_cl_mux: checks which copy's result drives the output-register path (A)
// and the comparator-only path (B) in every configuration.
module tb_cl_mux;
  import ft_pkg::*;
  localparam int W = 8;
  cfg_t cfg;
  logic [2:0][W-1:0] yc;
  logic [W-1:0] ya, yb;
  int checks = 0, failures = 0;

  cl_mux #(.W(W)) dut (.cfg(cfg), .y_copy(yc), .y_a(ya), .y_b(yb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int i = 0; i < 300; i++) begin
      cfg = cfg_t'(i % 3);
      yc[0] = W'($urandom); yc[1] = W'($urandom); yc[2] = W'($urandom);
      #1;
      ea = (i % 3 == 2) ? 1 : 0;
      eb = (i % 3 == 0) ? 1 : 2;
      checks += 2;
      if (ya !== yc[ea]) begin failures++; $display("FAIL A cfg=%0d", i % 3); end
      if (yb !== yc[eb]) begin failures++; $display("FAIL B cfg=%0d", i % 3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
