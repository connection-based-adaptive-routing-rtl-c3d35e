// tb_output_link: sends packets of several kinds and lengths back to back;
// each must appear on the link in the cycle it is sent, and the link must be
// idle again exactly after its phit count (1 RVC phit, plus DVC id, sequence
// number and length phits when present, plus the data phits).
module tb_output_link;
  import dvc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic send, idle, out_valid;
  pkt_t pkt, out_pkt;
  int checks = 0, failures = 0;

  output_link dut (.*);

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    send = 1'b0; pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      automatic int exp_n, busy;
      @(negedge clk);
      pkt = '0;
      pkt.ptype   = (t % 5 == 0) ? PK_CEP : (t % 7 == 0) ? PK_CDP : PK_DATA;
      pkt.rvc     = RVC_W'(t % 3);              // rvc 0 = diverted
      pkt.has_seq = t[1];
      pkt.len     = LEN_W'($urandom_range(31));
      pkt.is_max  = pkt.len == 31;
      pkt.payload = 32'(t);
      exp_n = 1 + ((pkt.ptype == PK_CEP || (pkt.ptype == PK_DATA && pkt.rvc == 0)) ? 1 : 0)
                + (pkt.has_seq ? 1 : 0)
                + ((pkt.ptype == PK_DATA && !pkt.is_max) ? 1 : 0)
                + ((pkt.ptype == PK_DATA) ? int'(pkt.len) : 0);
      check(idle, "idle before send");
      send = 1'b1;
      #1;
      check(out_valid && out_pkt == pkt, "packet on link in the send cycle");
      @(negedge clk);
      send = 1'b0;
      busy = 1;
      while (!idle && busy < 100) begin @(negedge clk); busy++; end
      check(busy == exp_n, $sformatf("link busy %0d cycles, expected %0d", busy, exp_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
