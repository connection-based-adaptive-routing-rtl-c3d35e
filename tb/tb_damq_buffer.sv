// tb_damq_buffer: random enqueues to random logical queues and dequeues from
// random non-empty queues, against one FIFO model per queue. Checks every
// queue head (packet, input RVC, time stamp), the valid flags and full, and
// that the queues share the slots (a queue may use all of them).
module tb_damq_buffer;
  import dvc_pkg::*;
  localparam int unsigned NSLOT = 4, NQ = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic enq, deq, full;
  logic [PORT_W-1:0] enq_q, deq_q;
  pkt_t enq_pkt;
  logic [RVC_W-1:0] enq_rvc;
  logic [TIME_W-1:0] enq_time;
  logic [NQ-1:0] q_valid;
  pkt_t head_pkt [NQ];
  logic [RVC_W-1:0] head_rvc [NQ];
  logic [TIME_W-1:0] head_time [NQ];
  int checks = 0, failures = 0;
  pkt_t        mp [NQ][$];
  logic [RVC_W-1:0] mr [NQ][$];
  logic [TIME_W-1:0] mt [NQ][$];
  int max_in_one = 0;

  damq_buffer #(.NSLOT(NSLOT), .NQ(NQ)) dut (.*);

  function automatic int total();
    int s = 0;
    for (int q = 0; q < NQ; q++) s += mp[q].size();
    return s;
  endfunction

  initial begin
    enq = 0; deq = 0; enq_q = '0; deq_q = '0; enq_pkt = '0; enq_rvc = '0; enq_time = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (full != (total() == NSLOT)) begin failures++; $display("FAIL full t=%0d", t); end
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (q_valid[q] != (mp[q].size() != 0) ||
            (mp[q].size() != 0 && (head_pkt[q] != mp[q][0] || head_rvc[q] != mr[q][0] ||
                                   head_time[q] != mt[q][0]))) begin
          failures++;
          $display("FAIL queue %0d t=%0d", q, t);
        end
        if (mp[q].size() > max_in_one) max_in_one = mp[q].size();
      end
      deq = 1'b0;
      if (total() != 0 && $urandom_range(2) != 0) begin
        do deq_q = PORT_W'($urandom_range(NQ - 1)); while (mp[deq_q].size() == 0);
        deq = 1'b1;
      end
      enq = (total() < NSLOT) && ($urandom_range(1) == 1);
      // favour one queue now and then so that it fills the whole buffer
      enq_q    = (t % 500 < 100) ? PORT_W'(2) : PORT_W'($urandom_range(NQ - 1));
      if (t % 500 < 100) deq = 1'b0;
      enq_pkt  = pkt_t'({$urandom, $urandom});
      enq_rvc  = RVC_W'($urandom);
      enq_time = TIME_W'(t);
      @(posedge clk);
      #1;
      if (deq) begin
        void'(mp[deq_q].pop_front()); void'(mr[deq_q].pop_front()); void'(mt[deq_q].pop_front());
      end
      if (enq) begin
        mp[enq_q].push_back(enq_pkt); mr[enq_q].push_back(enq_rvc); mt[enq_q].push_back(enq_time);
      end
    end
    checks++;
    if (max_in_one != NSLOT) begin failures++; $display("FAIL one queue never held all slots"); end
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
