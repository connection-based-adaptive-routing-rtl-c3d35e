// tb_age_arbiter: random requests and time stamps; the grant must go to the
// requester with the largest age (now - stamp, modulo 2^16), lowest index on
// a tie, and to nobody when nothing requests.
module tb_age_arbiter;
  localparam int unsigned N = 5;
  logic [15:0]  now;
  logic [N-1:0] req, gnt;
  logic [15:0]  stamp [N];
  logic         any_gnt;
  logic [2:0]   gnt_idx;
  int checks = 0, failures = 0;

  age_arbiter #(.N(N), .TIME_W(16)) dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int best = -1;
      automatic logic [15:0] bage = '0;
      now = 16'($urandom);
      req = N'($urandom);
      for (int i = 0; i < N; i++)
        stamp[i] = (t % 3 == 0) ? now - 16'($urandom_range(3)) : now - 16'($urandom_range(30000));
      #1;
      for (int i = 0; i < N; i++)
        if (req[i] && (best < 0 || 16'(now - stamp[i]) > bage)) begin
          best = i; bage = now - stamp[i];
        end
      checks++;
      if ((best < 0 && (any_gnt || gnt != 0)) ||
          (best >= 0 && (!any_gnt || gnt != (N'(1) << best) || gnt_idx != 3'(best)))) begin
        failures++;
        $display("FAIL req %b gnt %b expected %0d", req, gnt, best);
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
