// tb_cl_demux: checks that the input reaches exactly the two running copies
// of every configuration and that the standby copy sees zero.
module tb_cl_demux;
  import ft_pkg::*;
  localparam int W = 8;
  cfg_t cfg;
  logic [W-1:0] x;
  logic [2:0][W-1:0] xc;
  int checks = 0, failures = 0;

  cl_demux #(.W(W)) dut (.cfg(cfg), .x(x), .x_copy(xc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int standby;
    for (int i = 0; i < 300; i++) begin
      cfg = cfg_t'(i % 3);
      x = W'($urandom) | W'(1);
      #1;
      // standby copy: 3 in CL1+CL2, 2 in CL1+CL3, 1 in CL2+CL3 (numbered 1..3)
      standby = (i % 3 == 0) ? 2 : (i % 3 == 1) ? 1 : 0;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (xc[k] !== ((k == standby) ? W'(0) : x)) begin
          failures++;
          $display("FAIL cfg=%0d copy=%0d got %h", i % 3, k + 1, xc[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
