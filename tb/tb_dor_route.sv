// tb_dor_route: every source/destination pair of the 8 x 8 mesh; the port
// must correct x first, then y, then be the host port.
module tb_dor_route;
  import dvc_pkg::*;
  logic [NODE_W-1:0] here, dst;
  logic [PORT_W-1:0] oport, exp_p;
  int checks = 0, failures = 0;

  dor_route dut (.*);

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        here = NODE_W'(a); dst = NODE_W'(b);
        #1;
        if      ((b % 8) > (a % 8)) exp_p = P_XP;
        else if ((b % 8) < (a % 8)) exp_p = P_XM;
        else if ((b / 8) > (a / 8)) exp_p = P_YP;
        else if ((b / 8) < (a / 8)) exp_p = P_YM;
        else                        exp_p = P_HOST;
        checks++;
        if (oport != exp_p) begin
          failures++;
          $display("FAIL %0d -> %0d: port %0d expected %0d", a, b, oport, exp_p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
