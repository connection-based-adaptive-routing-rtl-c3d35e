// tb_pkt_fifo: random pushes and pops against a queue model; checks order,
// head contents, count, empty and full.
module tb_pkt_fifo;
  import dvc_pkg::*;
  localparam int unsigned DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  pkt_t push_pkt, head_pkt;
  logic [15:0] push_tag, head_tag;
  logic [2:0] count;
  int checks = 0, failures = 0;
  pkt_t        mq [$];
  logic [15:0] mt [$];

  pkt_fifo #(.DEPTH(DEPTH), .TAG_W(16)) dut (.*);

  initial begin
    push = 0; pop = 0; push_pkt = '0; push_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(mq.size()) || empty != (mq.size() == 0) || full != (mq.size() == DEPTH) ||
          (mq.size() != 0 && (head_pkt != mq[0] || head_tag != mt[0]))) begin
        failures++;
        $display("FAIL t=%0d count %0d model %0d", t, count, mq.size());
      end
      pop  = (mq.size() != 0) && ($urandom_range(1) == 1);
      push = ((mq.size() < DEPTH) || pop) && ($urandom_range(1) == 1);
      push_pkt = pkt_t'({$urandom, $urandom});
      push_tag = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) begin void'(mq.pop_front()); void'(mt.pop_front()); end
      if (push) begin mq.push_back(push_pkt); mt.push_back(push_tag); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
